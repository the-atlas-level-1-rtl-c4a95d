// phase_scan_ctrl: sequencer of the sampling-phase scan.
//
// The scan is a series of steps in two stages. Stage 0 steps the delay tap
// from 0 to N_TMAX-1 while the transition detectors watch Q1 and Q2; stage 1
// repeats the taps watching Q3 and Q4. 2 stages x 20 taps x 2 ports give
// 80 points that cover the 6.25 ns of one receiver cycle in 78.125 ps
// steps. Each step: set the tap, wait SETTLE cycles for the delay lines,
// clear the detectors (one cycle), measure for DWELL cycles, then pulse rec
// for one cycle with rec_stage/rec_tap naming the step, so that every
// channel stores its detector status. The slave delay line is set to tap+1
// by the channel front end.
//
// start (while idle) begins a scan; busy is high during it and done pulses
// after the last record. A scan takes 2*N_TMAX*(SETTLE+1+DWELL+1) cycles.
module phase_scan_ctrl
  import ber_pkg::*;
#(
  parameter int TMAX   = N_TMAX,
  parameter int SETTLE = 16,
  parameter int DWELL  = 65536
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [TAP_W-1:0] tap,
  output logic             stage,
  output logic             det_clr,
  output logic             det_en,
  output logic             rec,
  output logic             rec_stage,
  output logic [TAP_W-1:0] rec_tap,
  output logic             busy,
  output logic             done
);

  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_CLEAR, S_MEASURE, S_RECORD} state_e;
  state_e      st;
  logic [31:0] cnt;

  assign det_clr   = (st == S_CLEAR);
  assign det_en    = (st == S_MEASURE);
  assign rec       = (st == S_RECORD);
  assign rec_stage = stage;
  assign rec_tap   = tap;
  assign busy      = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      cnt   <= '0;
      tap   <= '0;
      stage <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st    <= S_SETTLE;
          tap   <= '0;
          stage <= 1'b0;
          cnt   <= '0;
        end
        S_SETTLE: begin
          if (cnt == 32'(SETTLE - 1)) begin st <= S_CLEAR; cnt <= '0; end
          else cnt <= cnt + 1;
        end
        S_CLEAR: st <= S_MEASURE;
        S_MEASURE: begin
          if (cnt == 32'(DWELL - 1)) begin st <= S_RECORD; cnt <= '0; end
          else cnt <= cnt + 1;
        end
        S_RECORD: begin
          if (int'(tap) == TMAX - 1) begin
            tap <= '0;
            if (stage) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end else begin
              stage <= 1'b1;
              st    <= S_SETTLE;
            end
          end else begin
            tap <= tap + 1'b1;
            st  <= S_SETTLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (SETTLE >= 1 && DWELL >= 1 && TMAX >= 1 && TMAX < 2 ** TAP_W)
      else $error("phase_scan_ctrl: bad parameters");
  end

endmodule
