// dpl_wrapper -- boundary between the single-rail part of the coprocessor
// (host interface, controller) and the dual-rail datapath.
//
// Inputs: each bit x of plaintext, key and round constant becomes the VALID
// pair (x, ~x) during an evaluation phase (eval = 1) and the NULL0 spacer
// (0, 0) during precharge, so the datapath inputs follow the same
// precharge/evaluate rhythm as its registers.
//
// Output: when the controller signals done, the wrapper checks that every one
// of the 128 state pairs is VALID. If so it releases the true rails as the
// ciphertext (ct_ok = 1). If any pair is NULL -- the trace of a fault that
// the NULL-propagating logic has spread -- it withholds the ciphertext
// (ct = 0) and raises fault for that cycle. Combinational. Withholding the
// output on a NULL is this design's choice of how to consume the NULL tokens.
module dpl_wrapper
  import dpl_pkg::*;
(
  input  logic          eval,
  input  logic [127:0]  pt,
  input  logic [127:0]  key,
  input  logic [7:0]    rcon,
  output dr_t  [127:0]  pt_dr,
  output dr_t  [127:0]  key_dr,
  output dr_t  [7:0]    rcon_dr,
  input  logic          done,
  input  dr_t  [127:0]  state_dr,
  output logic [127:0]  ct,
  output logic          ct_ok,
  output logic          fault
);
  logic [127:0] all_valid;

  for (genvar i = 0; i < 128; i++) begin : g_bit
    assign pt_dr[i]  = eval ? dr_encode(pt[i])  : DR_NULL0;
    assign key_dr[i] = eval ? dr_encode(key[i]) : DR_NULL0;
    assign all_valid[i] = dr_is_valid(state_dr[i]);
  end
  for (genvar i = 0; i < 8; i++) begin : g_rcon
    assign rcon_dr[i] = eval ? dr_encode(rcon[i]) : DR_NULL0;
  end

  always_comb begin
    ct_ok = done && (&all_valid);
    fault = done && !(&all_valid);
    for (int i = 0; i < 128; i++) ct[i] = ct_ok & state_dr[i].t;
  end
endmodule
