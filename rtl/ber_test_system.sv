// ber_test_system: firmware of the error rate test system for the octant
// electrical trigger outputs.
//
// N_CH receiver channels share one phase-scan sequencer and one memory
// interface:
//  * phase_scan_ctrl steps the delay-line tap (tap_master; tap_slave is one
//    tap later) through two stages of N_TMAX steps; each channel builds its
//    own transition map from which the control software picks a tap
//    (tap_cfg, common to all channels, used whenever no scan runs) and a
//    sample pair per channel for reliable sampling;
//  * each ber_channel then counts PRBS-31 bit errors (link tests) or aligns
//    the topological words (verification of the octant firmware);
//  * mem_interface stores the aligned words of all channels, two bunch
//    crossings per 512-bit word, in the external memory.
// The delay lines and the deserializers belong to the FPGA input blocks and
// are outside this module: it receives their four samples per cycle and per
// path, and drives their tap number. Configuration and read-out, done over
// Ethernet in the complete system, are plain ports here.
//
// frame is a free-running strobe, once every four cycles; each channel's
// last aligned word is held until its next one.
module ber_test_system
  import ber_pkg::*;
#(
  parameter int NC     = N_CH,
  parameter int TMAX   = N_TMAX,
  parameter int SETTLE = 16,
  parameter int DWELL  = 65536
) (
  input  logic              clk,
  input  logic              rst_n,
  // front end (delay lines and oversampling deserializers)
  input  logic [N_Q-1:0]    master [NC],
  input  logic [N_Q-1:0]    slave  [NC],
  output logic [TAP_W-1:0]  tap_master,
  output logic [TAP_W-1:0]  tap_slave,
  input  logic [TAP_W-1:0]  tap_cfg,
  // control
  input  logic              scan_start,
  output logic              scan_busy,
  output logic              scan_done,
  output logic [TMAX-1:0]   trans_map [NC][N_Q],
  input  qsel_e             qsel [NC],
  input  logic              prbs_start,
  input  logic              align_start,
  // per-channel results
  output logic [NC-1:0]     prbs_checking,
  output logic [31:0]       err_cnt [NC],
  output logic [47:0]       bit_cnt [NC],
  output logic [NC-1:0]     locked,
  output logic [NC-1:0]     offset,
  output logic [WORD_W-1:0] word [NC],
  output logic [NC-1:0]     word_valid,
  // capture to the external memory
  input  logic              mem_start,
  input  logic [MEM_AW:0]   mem_n_words,
  output logic              mem_wr_en,
  output logic [MEM_AW-1:0] mem_wr_addr,
  output logic [MEM_W-1:0]  mem_wr_data,
  input  logic              mem_wr_ready,
  output logic              mem_busy,
  output logic              mem_done,
  output logic              mem_overflow
);

  logic             det_clr, det_en, stage, rec, rec_stage;
  logic [TAP_W-1:0] tap, rec_tap;

  phase_scan_ctrl #(.TMAX(TMAX), .SETTLE(SETTLE), .DWELL(DWELL)) u_scan (
    .clk, .rst_n,
    .start    (scan_start),
    .tap      (tap),
    .stage    (stage),
    .det_clr  (det_clr),
    .det_en   (det_en),
    .rec      (rec),
    .rec_stage(rec_stage),
    .rec_tap  (rec_tap),
    .busy     (scan_busy),
    .done     (scan_done)
  );

  // the scan owns the delay lines while it runs; otherwise the configured tap
  assign tap_master = scan_busy ? tap : tap_cfg;
  assign tap_slave  = tap_master + 1'b1;

  logic [WORD_W-1:0] word_c [NC];
  logic [NC-1:0]     word_v;

  for (genvar c = 0; c < NC; c++) begin : g_ch
    ber_channel #(.TMAX(TMAX)) u_ch (
      .clk, .rst_n,
      .master       (master[c]),
      .slave        (slave[c]),
      .det_clr, .det_en, .stage, .rec, .rec_stage, .rec_tap,
      .trans_map    (trans_map[c]),
      .qsel         (qsel[c]),
      .prbs_start   (prbs_start),
      .align_start  (align_start),
      .prbs_checking(prbs_checking[c]),
      .err_cnt      (err_cnt[c]),
      .bit_cnt      (bit_cnt[c]),
      .locked       (locked[c]),
      .offset       (offset[c]),
      .word         (word_c[c]),
      .word_valid   (word_v[c])
    );
  end

  // the channels' aligners already hold their last word
  assign word       = word_c;
  assign word_valid = word_v;

  logic [1:0] fcnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fcnt <= '0;
    else        fcnt <= fcnt + 2'd1;
  end

  mem_interface #(.NC(NC)) u_mem (
    .clk, .rst_n,
    .start   (mem_start),
    .n_words (mem_n_words),
    .frame   (fcnt == 2'd0),
    .words   (word_c),
    .wr_en   (mem_wr_en),
    .wr_addr (mem_wr_addr),
    .wr_data (mem_wr_data),
    .wr_ready(mem_wr_ready),
    .busy    (mem_busy),
    .done    (mem_done),
    .overflow(mem_overflow)
  );

endmodule
