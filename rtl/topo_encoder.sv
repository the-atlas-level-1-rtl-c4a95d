// topo_encoder: turns the two highest-pT candidates of an octant into two
// 8-bit topological words, one per electrical trigger output.
//
// Word layout: [7:5] eta code, [4:2] phi code, [1:0] pT code.
//  * eta/phi: a programmable look-up table, addressed by sector number and
//    RoI, gives each candidate position a coarse (eta, phi) bin. Seven eta codes
//    and eight phi codes give 7 x 8 = 56 locations per octant (bins of about
//    0.3 x 0.1 in eta x phi); the eighth eta code (ETA_NONE) marks "no
//    candidate". The octant number and side are implied by which cable the
//    word travels on, so they are not sent.
//  * pT: a programmable map sends each of the six pT thresholds to one of three
//    codes (00, 01, 10). Code 11 is unused for the first candidate; for the
//    second candidate it means "more than two candidates were present".
// The table contents are supplied by configuration software through the write
// port; a table entry is {eta, phi}. pt_map holds the 2-bit code of threshold
// k in bits [2k+1:2k] (threshold k+1). An absent candidate is sent as
// {ETA_NONE, 000, 00}.
//
// Reads are combinational (two read ports); writes are synchronous.
module topo_encoder
  import muctpi_pkg::*;
#(
  parameter int N_SECTORS = N_SECT,
  parameter int ROI_BITS  = ROI_W
) (
  input  logic                         clk,
  // table write port
  input  logic                         lut_we,
  input  logic [SECT_W-1:0]            lut_sector,
  input  logic [ROI_BITS-1:0]          lut_roi,
  input  logic [5:0]                   lut_wdata,   // {eta, phi}
  input  logic [2*N_THR-1:0]           pt_map,
  // candidates from the sorter
  input  sorted_cand_t                 first,
  input  sorted_cand_t                 second,
  input  ncand_e                       ncand,
  output topo_word_t                   word1,
  output topo_word_t                   word2
);

  localparam int DEPTH = N_SECTORS * (2 ** ROI_BITS);

  logic [5:0] lut [DEPTH];

  function automatic int lut_index(input logic [SECT_W-1:0] sec, input logic [ROI_BITS-1:0] roi);
    return int'(sec) * (2 ** ROI_BITS) + int'(roi);
  endfunction

  always_ff @(posedge clk) begin
    if (lut_we && int'(lut_sector) < N_SECTORS)
      lut[lut_index(lut_sector, lut_roi)] <= lut_wdata;
  end

  function automatic logic [1:0] pt_code(input logic [PT_W-1:0] pt, input logic [2*N_THR-1:0] map);
    logic [1:0] c;
    c = 2'b00;
    for (int k = 0; k < N_THR; k++)
      if (int'(pt) == k + 1) c = map[2*k +: 2];
    return c;
  endfunction

  function automatic logic [5:0] lookup(input sorted_cand_t c);
    logic [5:0] v;
    v = {ETA_NONE, 3'b000};
    if (int'(c.sector) < N_SECTORS) v = lut[lut_index(c.sector, c.roi[ROI_BITS-1:0])];
    return v;
  endfunction

  always_comb begin
    word1 = '{eta: ETA_NONE, phi: 3'b000, pt: 2'b00};
    word2 = '{eta: ETA_NONE, phi: 3'b000, pt: 2'b00};
    if (first.valid) begin
      {word1.eta, word1.phi} = lookup(first);
      word1.pt = pt_code(first.pt, pt_map);
    end
    if (second.valid) begin
      {word2.eta, word2.phi} = lookup(second);
      word2.pt = (ncand == NCAND_MORE) ? PT2_MORE : pt_code(second.pt, pt_map);
    end
  end

endmodule
