// prbs31_checker: bit error counter for a received PRBS-31 stream.
//
// Works in two phases, as the receiver of the link tests:
//  * load (B): for LOAD_CYCLES cycles the 31-bit register is filled with the
//    received bits themselves (two per cycle; 16 cycles = 100 ns at 160 MHz
//    fill it completely);
//  * check (A): the feedback path is closed, the register then runs free and
//    predicts the sequence in step with the input. Every received bit is
//    compared with the prediction; mismatching bits are added to err_cnt and
//    all compared bits to bit_cnt.
// An error in the received stream therefore costs one error count per wrong
// bit, without corrupting the reference. start (re)enters the load phase and
// clears both counters. din[1] is the earlier bit of the pair.
//
// Timing: counters update on the edge at which the pair is compared.
module prbs31_checker
  import prbs_pkg::*;
#(
  parameter int LOAD_CYCLES = 16,
  parameter int ERR_W       = 32,
  parameter int BIT_W       = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [1:0]       din,
  output logic             checking,
  output logic [ERR_W-1:0] err_cnt,
  output logic [BIT_W-1:0] bit_cnt
);

  logic [PRBS_W-1:0] ref_q;
  logic [5:0]        load_cnt;
  logic [1:0]        pred, diff;

  assign pred = prbs31_next2(ref_q);
  assign diff = din ^ pred;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q    <= PRBS_SEED;
      load_cnt <= '0;
      checking <= 1'b0;
      err_cnt  <= '0;
      bit_cnt  <= '0;
    end else if (start) begin
      ref_q    <= prbs31_shift2(ref_q, din);
      load_cnt <= 6'd1;
      checking <= 1'b0;
      err_cnt  <= '0;
      bit_cnt  <= '0;
    end else if (!checking) begin
      ref_q <= prbs31_shift2(ref_q, din);
      if (int'(load_cnt) >= LOAD_CYCLES - 1) checking <= 1'b1;
      else load_cnt <= load_cnt + 1'b1;
    end else begin
      ref_q   <= prbs31_shift2(ref_q, pred);
      err_cnt <= err_cnt + ERR_W'(diff[1]) + ERR_W'(diff[0]);
      bit_cnt <= bit_cnt + BIT_W'(2);
    end
  end

endmodule
