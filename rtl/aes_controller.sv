// aes_controller -- single-rail sequencer of the dual-rail AES datapath.
//
// Every datapath step takes two clock cycles: a precharge cycle (eval = 0)
// in which the combinational network returns to NULL0, then an evaluation
// cycle (eval = 1) at whose end the registers capture (cap = 1). Step 0 is the
// initial key addition (load = 1); steps 1..10 are the AES rounds, step 10
// without MixColumns (last = 1). rcon carries the round constant of the
// current round (01, 02, 04, ... 1B, 36), kept as a register that is
// multiplied by 02 after each round.
//
// Interface: start is taken in IDLE only; busy is high from the cycle after
// start until done; done is a one-cycle pulse, 22 cycles after start, during
// which the ciphertext is in the state register. The controller handles no
// secret data and is plain single-rail logic. The two-cycle step and this
// handshake are this design's choices.
module aes_controller
  import dpl_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic       eval,
  output logic       cap,
  output logic       load,
  output logic       last,
  output logic [7:0] rcon
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_EVAL, S_DONE} state_e;
  localparam int unsigned NROUNDS = 10;

  state_e     st_q;
  logic [3:0] rnd_q;
  logic [7:0] rcon_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= S_IDLE;
      rnd_q  <= '0;
      rcon_q <= 8'h01;
    end else begin
      unique case (st_q)
        S_IDLE: if (start) begin
          st_q   <= S_PRE;
          rnd_q  <= '0;
          rcon_q <= 8'h01;
        end
        S_PRE:  st_q <= S_EVAL;
        S_EVAL: begin
          if (rnd_q == 4'(NROUNDS)) begin
            st_q <= S_DONE;
          end else begin
            st_q  <= S_PRE;
            rnd_q <= rnd_q + 4'd1;
            if (rnd_q != 4'd0) rcon_q <= gf_xtime(rcon_q);
          end
        end
        S_DONE: st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (st_q == S_PRE) || (st_q == S_EVAL);
  assign done = (st_q == S_DONE);
  assign eval = (st_q == S_EVAL);
  assign cap  = (st_q == S_EVAL);
  assign load = (rnd_q == 4'd0);
  assign last = (rnd_q == 4'(NROUNDS));
  assign rcon = rcon_q;

  a_cap_in_eval: assert property (@(posedge clk) disable iff (!rst_n) cap |-> eval);
  a_one_hot_mode: assert property (@(posedge clk) disable iff (!rst_n) !(load && last));
endmodule
