// aes_dpl_top -- AES-128 encryption coprocessor whose datapath is built in
// the dual-rail "WDDL without early evaluation" logic style, resisting both
// power analysis (constant activity: one wire of each pair toggles per phase)
// and fault injection (a NULL created by a fault spreads to and erases the
// output instead of producing an exploitable faulty ciphertext).
//
// Parts: aes_controller (single-rail sequencing), dpl_wrapper (single/dual-
// rail conversion, output check) and dpl_aes_datapath (the secured
// datapath). Only the datapath is dual-rail; control carries no secret.
//
// Interface: hold key and pt stable and pulse start while idle. 22 cycles
// later done pulses for one cycle. If the computed state was all VALID,
// ct_ok is high and ct is the ciphertext; otherwise fault is high and ct is 0.
module aes_dpl_top
  import dpl_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic         busy,
  output logic         done,
  output logic [127:0] ct,
  output logic         ct_ok,
  output logic         fault
);
  logic        eval, cap, load, last;
  logic [7:0]  rcon;
  dr_t [127:0] pt_dr, key_dr, state_dr;
  dr_t [7:0]   rcon_dr;

  aes_controller u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .eval, .cap, .load, .last, .rcon
  );

  dpl_wrapper u_wrap (
    .eval, .pt, .key, .rcon,
    .pt_dr, .key_dr, .rcon_dr,
    .done, .state_dr, .ct, .ct_ok, .fault
  );

  dpl_aes_datapath u_dp (
    .clk, .rst_n, .eval, .load, .last, .cap,
    .rcon(rcon_dr), .pt(pt_dr), .key(key_dr), .state(state_dr)
  );
endmodule
