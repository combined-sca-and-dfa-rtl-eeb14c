// dpl_aes_datapath -- AES-128 encryption datapath in the dual-rail
// "WDDL without early evaluation" style: one round per evaluation phase.
//
// Structure: a 128-pair state register and a 128-pair round-key register.
// Their outputs are gated by the single-rail phase signal `eval`: while it is
// low (precharge) both rails of every pair are forced to 0, so the whole
// combinational network settles to NULL0; while it is high the register
// contents enter the network and propagate as VALID tokens. On `cap` (the
// last cycle of an evaluation phase) the registers capture the round result.
//
// Round logic (all dual-rail gates): 16 S-boxes, ShiftRows (wiring),
// MixColumns (skipped when `last`), AddRoundKey with the next round key, which
// is expanded on the fly by 4 more S-boxes, the round constant and XOR gates.
// With `load` the state register takes plaintext XOR key and the key register
// takes the key (the initial AddRoundKey). The round constant, plaintext and
// key arrive already dual-rail and precharged (see dpl_wrapper).
//
// The control signals eval, load, last and cap are single-rail, as the
// controller that drives them handles no secret; the load/last selections are
// rail-by-rail multiplexers. A NULL anywhere in the state or key propagates,
// because no gate evaluates early, and is captured as NULL, so a faulted
// value never becomes a wrong VALID by a one-wire fault.
//
// Byte n of a block is bits [127-8n -: 8]; byte r+4c is row r, column c.
// The iterative one-round-per-phase architecture, the phase gating and the
// NULL0 reset value are this design's choices.
module dpl_aes_datapath
  import dpl_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          eval,     // 1: evaluation phase, 0: precharge phase
  input  logic          load,     // this phase performs the initial key addition
  input  logic          last,     // this phase is the final round (no MixColumns)
  input  logic          cap,      // capture the round result at this clock edge
  input  dr_t [7:0]     rcon,     // round constant, dual-rail
  input  dr_t [127:0]   pt,       // plaintext, dual-rail
  input  dr_t [127:0]   key,      // cipher key, dual-rail
  output dr_t [127:0]   state     // state register (ciphertext after round 10)
);
  dr_t [127:0] s_q, k_q, s_g, k_g;
  dr_t [127:0] sb, sr, mc, mc_sel, k_nx, ark, s_ld, s_d, k_d;

  // ---- precharge gating ----
  for (genvar i = 0; i < 128; i++) begin : g_gate
    assign s_g[i] = '{t: s_q[i].t & eval, f: s_q[i].f & eval};
    assign k_g[i] = '{t: k_q[i].t & eval, f: k_q[i].f & eval};
  end

  // ---- SubBytes + ShiftRows ----
  for (genvar n = 0; n < 16; n++) begin : g_sb
    dpl_aes_sbox u_sbox (.x(s_g[127-8*n -: 8]), .y(sb[127-8*n -: 8]));
  end
  for (genvar r = 0; r < 4; r++) begin : g_sr_r
    for (genvar c = 0; c < 4; c++) begin : g_sr_c
      assign sr[127-8*(r+4*c) -: 8] = sb[127-8*(r+4*((c+r)%4)) -: 8];
    end
  end

  // ---- MixColumns: out_i = a_i ^ (a0^a1^a2^a3) ^ 02*(a_i ^ a_(i+1)) ----
  for (genvar c = 0; c < 4; c++) begin : g_mc
    dr_t [7:0] a [4];
    dr_t [7:0] u [4];
    dr_t [7:0] xt [4];
    dr_t [7:0] v [4];
    dr_t [7:0] t01, t23, tall;
    for (genvar i = 0; i < 4; i++) begin : g_a
      assign a[i] = sr[127-8*(4*c+i) -: 8];
    end
    dpl_gate_vec #(.W(8), .FUNC(FN_XOR)) u_t01 (.a(a[0]), .b(a[1]), .y(t01));
    dpl_gate_vec #(.W(8), .FUNC(FN_XOR)) u_t23 (.a(a[2]), .b(a[3]), .y(t23));
    dpl_gate_vec #(.W(8), .FUNC(FN_XOR)) u_tal (.a(t01),  .b(t23),  .y(tall));
    for (genvar i = 0; i < 4; i++) begin : g_row
      dpl_gate_vec #(.W(8), .FUNC(FN_XOR)) u_u (.a(a[i]), .b(a[(i+1)%4]), .y(u[i]));
      dpl_gf256_xtime u_xt (.a(u[i]), .y(xt[i]));
      dpl_gate_vec #(.W(8), .FUNC(FN_XOR)) u_v (.a(a[i]), .b(tall), .y(v[i]));
      dpl_gate_vec #(.W(8), .FUNC(FN_XOR)) u_o (.a(v[i]), .b(xt[i]), .y(mc[127-8*(4*c+i) -: 8]));
    end
  end

  // ---- key expansion: next round key from the current one ----
  dr_t [31:0] w0, w1, w2, w3, rot, sub, t, w0n, w1n, w2n, w3n;
  assign {w0, w1, w2, w3} = k_g;
  assign rot = {w3[23:0], w3[31:24]};
  for (genvar n = 0; n < 4; n++) begin : g_ks
    dpl_aes_sbox u_sbox (.x(rot[31-8*n -: 8]), .y(sub[31-8*n -: 8]));
  end
  dpl_gate_vec #(.W(8), .FUNC(FN_XOR)) u_rcon (.a(sub[31:24]), .b(rcon), .y(t[31:24]));
  assign t[23:0] = sub[23:0];
  dpl_gate_vec #(.W(32), .FUNC(FN_XOR)) u_w0 (.a(w0), .b(t),   .y(w0n));
  dpl_gate_vec #(.W(32), .FUNC(FN_XOR)) u_w1 (.a(w1), .b(w0n), .y(w1n));
  dpl_gate_vec #(.W(32), .FUNC(FN_XOR)) u_w2 (.a(w2), .b(w1n), .y(w2n));
  dpl_gate_vec #(.W(32), .FUNC(FN_XOR)) u_w3 (.a(w3), .b(w2n), .y(w3n));
  assign k_nx = {w0n, w1n, w2n, w3n};

  // ---- AddRoundKey, initial key addition, selection ----
  assign mc_sel = last ? sr : mc;
  dpl_gate_vec #(.W(128), .FUNC(FN_XOR)) u_ark (.a(mc_sel), .b(k_nx), .y(ark));
  dpl_gate_vec #(.W(128), .FUNC(FN_XOR)) u_ld  (.a(pt),     .b(key),  .y(s_ld));
  assign s_d = load ? s_ld : ark;
  assign k_d = load ? key  : k_nx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      k_q <= '0;
    end else if (cap) begin
      s_q <= s_d;
      k_q <= k_d;
    end
  end

  assign state = s_q;

  // Precharge rule: with eval low (and NULL0 on pt, key and rcon, as the
  // wrapper guarantees) every pair of the round result is NULL0.
  a_precharge_null: assert property (@(posedge clk) disable iff (!rst_n)
    !eval |-> (s_d == '0 && k_d == '0));
endmodule
