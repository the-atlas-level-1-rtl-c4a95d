// ber_channel: one input channel of the error rate test system.
//
// Inputs are the four oversampled bits of one 160 MHz cycle from the master
// delay path (used for data) and from the slave path one tap later (used
// only for transition detection). The channel contains:
//  * a transition_detector, driven by the shared phase_scan_ctrl, and an
//    80-point transition map: trans_map[q][tap] = 1 where a data edge was seen
//    between master and slave when sampling at phase Q(q+1) with that tap;
//  * sample-pair selection: with two samples per bit, the bits of a cycle
//    are taken from Q1 and Q3 (SEL_Q1Q3) or from Q2 and Q4 (SEL_Q2Q4), the
//    choice made from the transition map so that both sit far from the edges;
//  * a prbs31_checker counting bit errors of a PRBS-31 stream;
//  * a word_aligner that recovers the 8-bit topological words.
//
// Timing: the selected bit pair is registered once; checker and aligner work
// on the registered pair.
module ber_channel
  import ber_pkg::*;
#(
  parameter int TMAX = N_TMAX
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_Q-1:0]    master,
  input  logic [N_Q-1:0]    slave,
  // phase scan
  input  logic              det_clr,
  input  logic              det_en,
  input  logic              stage,
  input  logic              rec,
  input  logic              rec_stage,
  input  logic [TAP_W-1:0]  rec_tap,
  output logic [TMAX-1:0]   trans_map [N_Q],
  // data path
  input  qsel_e             qsel,
  input  logic              prbs_start,
  input  logic              align_start,
  output logic              prbs_checking,
  output logic [31:0]       err_cnt,
  output logic [47:0]       bit_cnt,
  output logic              locked,
  output logic              offset,
  output logic [WORD_W-1:0] word,
  output logic              word_valid
);

  logic [1:0] status;

  transition_detector u_td (
    .clk, .rst_n,
    .clr   (det_clr),
    .en    (det_en),
    .stage (stage),
    .master(master),
    .slave (slave),
    .status(status)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < N_Q; q++) trans_map[q] <= '0;
    end else if (rec && int'(rec_tap) < TMAX) begin
      trans_map[2*int'(rec_stage)][rec_tap]     <= !status[0];
      trans_map[2*int'(rec_stage) + 1][rec_tap] <= !status[1];
    end
  end

  logic [1:0] din_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) din_q <= '0;
    else        din_q <= (qsel == SEL_Q2Q4) ? {master[1], master[3]} : {master[0], master[2]};
  end

  prbs31_checker u_prbs (
    .clk, .rst_n,
    .start   (prbs_start),
    .din     (din_q),
    .checking(prbs_checking),
    .err_cnt (err_cnt),
    .bit_cnt (bit_cnt)
  );

  word_aligner u_align (
    .clk, .rst_n,
    .align_start(align_start),
    .din        (din_q),
    .locked     (locked),
    .offset     (offset),
    .word       (word),
    .word_valid (word_valid)
  );

endmodule
