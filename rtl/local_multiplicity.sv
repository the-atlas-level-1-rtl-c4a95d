// local_multiplicity: muon candidate multiplicity of one octant.
//
// For each of the six pT thresholds, counts the candidates of the crossing
// that passed at least that threshold and were not flagged by the overlap
// handling unit (so that a muon seen by two overlapping sectors is counted
// once). Each count saturates at 7 (3 bits). These counts are what the octant
// contributes to the total multiplicity sent to the Central Trigger Processor.
// The unit keeps its own register copy of the veto flags, separate from the
// one in the topological path.
//
// Timing: inputs are captured at the load edge; mult is registered and valid
// one cycle after that and then held until the next crossing.
module local_multiplicity
  import muctpi_pkg::*;
#(
  parameter int N = N_CAND
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  cand_t             cand_in [N],
  input  logic [N-1:0]      veto_in,
  output logic [MULT_W-1:0] mult [N_THR]
);

  cand_t             cand_q [N];
  logic [N-1:0]      veto_q;   // multiplicity-path copy of the veto flags
  logic              calc;
  logic [MULT_W-1:0] count [N_THR];

  // saturating count of unvetoed candidates at or above each threshold
  always_comb begin
    for (int k = 0; k < N_THR; k++) begin
      logic [$clog2(N+1)-1:0] n;
      n = '0;
      for (int i = 0; i < N; i++)
        if (!veto_q[i] && int'(cand_q[i].pt) >= k + 1) n = n + 1'b1;
      count[k] = (int'(n) > 7) ? MULT_W'(7) : MULT_W'(n);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cand_q[i] <= '0;
      veto_q <= '0;
      calc   <= 1'b0;
      for (int k = 0; k < N_THR; k++) mult[k] <= '0;
    end else begin
      calc <= load;
      if (load) begin
        cand_q <= cand_in;
        veto_q <= veto_in;
      end
      if (calc) mult <= count;
    end
  end

endmodule
