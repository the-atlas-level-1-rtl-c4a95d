// sync_pipeline: programmable-length pipelines that align the sector inputs.
//
// The sectors of an octant deliver their candidates with different cable and
// processing delays. Each sector's data (its two candidates) passes through
// its own pipeline whose length, 0 to DEPTH bunch crossings, is set in
// delay[s], so that the data of one crossing from all sectors leave together.
// The pipelines advance once per crossing, on the edge where bc is high.
// With delay 0 the sector's data pass straight through (combinational);
// with delay d the output shows the data captured d crossings earlier.
module sync_pipeline
  import muctpi_pkg::*;
#(
  parameter int NS    = N_SECT,
  parameter int DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       bc,
  input  logic [$clog2(DEPTH+1)-1:0] delay [NS],
  input  cand_t                      cand_in  [2*NS],
  output cand_t                      cand_out [2*NS]
);

  cand_t pipe [NS][DEPTH][2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++)
        for (int d = 0; d < DEPTH; d++)
          for (int c = 0; c < 2; c++) pipe[s][d][c] <= '0;
    end else if (bc) begin
      for (int s = 0; s < NS; s++) begin
        pipe[s][0][0] <= cand_in[2*s];
        pipe[s][0][1] <= cand_in[2*s+1];
        for (int d = 1; d < DEPTH; d++) pipe[s][d] <= pipe[s][d-1];
      end
    end
  end

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      if (delay[s] == '0 || int'(delay[s]) > DEPTH) begin
        cand_out[2*s]   = cand_in[2*s];
        cand_out[2*s+1] = cand_in[2*s+1];
      end else begin
        cand_out[2*s]   = pipe[s][int'(delay[s]) - 1][0];
        cand_out[2*s+1] = pipe[s][int'(delay[s]) - 1][1];
      end
    end
  end

endmodule
