// veto_unit: first stage of the topological encoding unit of one octant.
//
// Registers the 26 muon candidates of a bunch crossing together with the veto
// flags that the overlap handling unit raised for them, and forwards the
// candidates to the sorter with every flagged candidate suppressed (its pT
// forced to 0, which means "no candidate"). The veto flags are held in
// registers of this unit only: the multiplicity path keeps its own copy, so
// the two paths can be placed and timed independently, as in the original
// firmware.
//
// Interface: load is high for one 160 MHz cycle per bunch crossing; the inputs
// are captured on that edge and cand_out stays stable for the rest of the
// crossing (four cycles). cand_out is a combinational function of the
// registers. Reset clears all candidates.
module veto_unit
  import muctpi_pkg::*;
#(
  parameter int N = N_CAND
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  cand_t        cand_in  [N],
  input  logic [N-1:0] veto_in,
  output cand_t        cand_out [N]
);

  cand_t        cand_q [N];
  logic [N-1:0] veto_q;   // topology-path copy of the veto flags

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cand_q[i] <= '0;
      veto_q <= '0;
    end else if (load) begin
      cand_q <= cand_in;
      veto_q <= veto_in;
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      cand_out[i] = cand_q[i];
      if (veto_q[i]) cand_out[i].pt = '0;
    end
  end

endmodule
