// cand_counters: monitoring counters of the topological encoding unit.
//
// Three 32-bit counters count the bunch crossings in which, after the veto,
// exactly one, exactly two, or more than two muon candidates were present.
// Each counter wraps around at 2^32. count is high for one cycle per
// crossing with that crossing's candidate count on ncand; clr zeroes all
// three (and wins over count). Counters update on the edge after count.
module cand_counters
  import muctpi_pkg::*;
#(
  parameter int CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             count,
  input  ncand_e           ncand,
  output logic [CNT_W-1:0] cnt_one,
  output logic [CNT_W-1:0] cnt_two,
  output logic [CNT_W-1:0] cnt_more
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_one  <= '0;
      cnt_two  <= '0;
      cnt_more <= '0;
    end else if (clr) begin
      cnt_one  <= '0;
      cnt_two  <= '0;
      cnt_more <= '0;
    end else if (count) begin
      unique case (ncand)
        NCAND_ONE:  cnt_one  <= cnt_one  + 1'b1;
        NCAND_TWO:  cnt_two  <= cnt_two  + 1'b1;
        NCAND_MORE: cnt_more <= cnt_more + 1'b1;
        default: ;
      endcase
    end
  end

endmodule
