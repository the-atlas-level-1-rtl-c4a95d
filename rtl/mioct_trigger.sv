// mioct_trigger: trigger path of one octant module (MIOCT) with the Run-2
// topological encoding unit.
//
// Data flow per bunch crossing (BC, 25 ns = four 160 MHz cycles):
//   sector inputs -> sync_pipeline -> (external overlap handling unit, which
//   returns one veto flag per candidate) -> two branches:
//   * local_multiplicity: six 3-bit counts for the total multiplicity;
//   * topological encoding unit: veto_unit -> sorter_unit -> topo_encoder ->
//     two topo_serializers, one per electrical trigger output (1st and 2nd
//     highest-pT candidate), plus cand_counters for monitoring.
// The veto, sort and encode logic forms one combinational path that is given
// two 160 MHz cycles (a multicycle path): the veto registers load at the bc
// edge and the encoded words are captured two edges later.
//
// Cycle timing (edge E0 = the edge at which bc is high):
//   E0  veto and multiplicity registers capture cand_sync and veto_in
//   E1  mult valid
//   E2  topo1/topo2 and ncand_q captured, monitoring counters updated
//   E3  serializers load the words
//   E4..E7 ser1/ser2 carry bits [7:6], [5:4], [3:2], [1:0]
// so a topological word leaves the octant one BC after its candidates were
// captured, and a new word follows every BC. bc must pulse every 4 cycles.
//
// veto_in must hold the overlap flags that belong to the cand_sync value of
// the same cycle. The look-up table and pT map are common to both outputs.
module mioct_trigger
  import muctpi_pkg::*;
#(
  parameter int SYNC_DEPTH = 8
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            bc,
  // sector inputs and synchronisation
  input  logic [$clog2(SYNC_DEPTH+1)-1:0] sync_delay [N_SECT],
  input  cand_t                           cand_in    [N_CAND],
  output cand_t                           cand_sync  [N_CAND],
  // from the overlap handling unit
  input  logic [N_CAND-1:0]               veto_in,
  // configuration
  input  logic                            lut_we,
  input  logic [SECT_W-1:0]               lut_sector,
  input  logic [ROI_W-1:0]                lut_roi,
  input  logic [5:0]                      lut_wdata,
  input  logic [2*N_THR-1:0]              pt_map,
  input  ser_mode_e                       ser_mode,
  input  logic                            cnt_clr,
  // multiplicity
  output logic [MULT_W-1:0]               mult [N_THR],
  // topological information (also kept for debugging read-out)
  output topo_word_t                      topo1,
  output topo_word_t                      topo2,
  output ncand_e                          ncand_q,
  output logic [1:0]                      ser1,
  output logic [1:0]                      ser2,
  // monitoring counters
  output logic [31:0]                     cnt_one,
  output logic [31:0]                     cnt_two,
  output logic [31:0]                     cnt_more
);

  // position inside the bunch crossing: 0 at the bc edge
  logic [1:0] ph;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= '0;
    else        ph <= bc ? 2'd1 : ph + 2'd1;
  end

  logic capture, ser_load;
  assign capture  = (ph == 2'd2);
  assign ser_load = (ph == 2'd3);

  sync_pipeline #(.NS(N_SECT), .DEPTH(SYNC_DEPTH)) u_sync (
    .clk, .rst_n, .bc,
    .delay   (sync_delay),
    .cand_in (cand_in),
    .cand_out(cand_sync)
  );

  local_multiplicity #(.N(N_CAND)) u_mult (
    .clk, .rst_n,
    .load   (bc),
    .cand_in(cand_sync),
    .veto_in(veto_in),
    .mult   (mult)
  );

  cand_t cand_v [N_CAND];

  veto_unit #(.N(N_CAND)) u_veto (
    .clk, .rst_n,
    .load    (bc),
    .cand_in (cand_sync),
    .veto_in (veto_in),
    .cand_out(cand_v)
  );

  sorted_cand_t first, second;
  ncand_e       ncand;
  logic [N_CAND-1:0] win1, win2;

  sorter_unit #(.N(N_CAND)) u_sort (
    .cand  (cand_v),
    .first (first),
    .second(second),
    .ncand (ncand),
    .win1  (win1),
    .win2  (win2)
  );

  topo_word_t w1, w2;

  topo_encoder u_enc (
    .clk,
    .lut_we, .lut_sector, .lut_roi, .lut_wdata, .pt_map,
    .first, .second, .ncand,
    .word1(w1),
    .word2(w2)
  );

  // end of the two-cycle path
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      topo1   <= '{eta: ETA_NONE, phi: 3'b000, pt: 2'b00};
      topo2   <= '{eta: ETA_NONE, phi: 3'b000, pt: 2'b00};
      ncand_q <= NCAND_ZERO;
    end else if (capture) begin
      topo1   <= w1;
      topo2   <= w2;
      ncand_q <= ncand;
    end
  end

  cand_counters #(.CNT_W(32)) u_cnt (
    .clk, .rst_n,
    .clr  (cnt_clr),
    .count(capture),
    .ncand(ncand),
    .cnt_one, .cnt_two, .cnt_more
  );

  topo_serializer u_ser1 (
    .clk, .rst_n,
    .load   (ser_load),
    .word_in(topo1),
    .mode   (ser_mode),
    .dout   (ser1)
  );

  topo_serializer u_ser2 (
    .clk, .rst_n,
    .load   (ser_load),
    .word_in(topo2),
    .mode   (ser_mode),
    .dout   (ser2)
  );

  // the BC strobe must arrive every fourth cycle
  property p_bc_period;
    @(posedge clk) disable iff (!rst_n) bc |-> ##1 (!bc [*3]) ##1 bc;
  endproperty
  a_bc_period: assert property (p_bc_period) else $error("mioct_trigger: bc not every 4 cycles");

endmodule
