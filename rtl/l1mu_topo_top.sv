// l1mu_topo_top: the Level-1 muon topological trigger output chain.
//
// Sixteen octant modules (MIOCT, eight per detector side) each receive the
// 26 muon candidates of their 13 trigger sectors every bunch crossing,
// compute their local multiplicity and, in the topological encoding unit,
// select the two highest-pT candidates and send each as an 8-bit
// (eta, phi, pT) word at 320 Mb/s on one electrical trigger output: 32
// outputs in all. Octant m drives trig_out[2m] (highest candidate) and
// trig_out[2m+1] (second candidate). The octant number and side are implied
// by the cable, so 16 x 56 = 896 locations are distinguished.
//
// Beside them stands the 32-channel error rate test system that receives
// those outputs: channel k is meant to be cabled to trig_out[k]. The
// parts between the two are not logic of this design and are left as ports:
// the DDR output buffers and cables (trig_out, two bits per 160 MHz cycle,
// [1] first) and the receiver's delay lines and oversampling deserializers
// (rx_master/rx_slave in, rx_tap_master/rx_tap_slave out). The overlap
// handling units that supply the veto flags of each octant are outside too
// (cand_sync out, veto_in in).
//
// Both sides run on one 160 MHz clock (four times the bunch crossing rate);
// bc marks the first cycle of each crossing for the octants.
module l1mu_topo_top
  import muctpi_pkg::*;
  import ber_pkg::*;
#(
  parameter int N_MIOCT    = 16,
  parameter int SYNC_DEPTH = 8,
  parameter int SETTLE     = 16,
  parameter int DWELL      = 65536
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            bc,
  // ---- octant modules ----
  input  logic [$clog2(SYNC_DEPTH+1)-1:0] sync_delay [N_MIOCT][N_SECT],
  input  cand_t                           cand_in    [N_MIOCT][N_CAND],
  output cand_t                           cand_sync  [N_MIOCT][N_CAND],
  input  logic [N_CAND-1:0]               veto_in    [N_MIOCT],
  input  logic [N_MIOCT-1:0]              lut_sel,
  input  logic                            lut_we,
  input  logic [SECT_W-1:0]               lut_sector,
  input  logic [ROI_W-1:0]                lut_roi,
  input  logic [5:0]                      lut_wdata,
  input  logic [2*N_THR-1:0]              pt_map,
  input  ser_mode_e                       ser_mode,
  input  logic                            cnt_clr,
  output logic [MULT_W-1:0]               mult     [N_MIOCT][N_THR],
  output topo_word_t                      topo1    [N_MIOCT],
  output topo_word_t                      topo2    [N_MIOCT],
  output ncand_e                          ncand    [N_MIOCT],
  output logic [31:0]                     cnt_one  [N_MIOCT],
  output logic [31:0]                     cnt_two  [N_MIOCT],
  output logic [31:0]                     cnt_more [N_MIOCT],
  output logic [1:0]                      trig_out [2*N_MIOCT],
  // ---- error rate test system ----
  input  logic [N_Q-1:0]                  rx_master [2*N_MIOCT],
  input  logic [N_Q-1:0]                  rx_slave  [2*N_MIOCT],
  output logic [TAP_W-1:0]                rx_tap_master,
  output logic [TAP_W-1:0]                rx_tap_slave,
  input  logic [TAP_W-1:0]                rx_tap_cfg,
  input  logic                            scan_start,
  output logic                            scan_busy,
  output logic                            scan_done,
  output logic [N_TMAX-1:0]               trans_map [2*N_MIOCT][N_Q],
  input  qsel_e                           qsel [2*N_MIOCT],
  input  logic                            prbs_start,
  input  logic                            align_start,
  output logic [2*N_MIOCT-1:0]            prbs_checking,
  output logic [31:0]                     err_cnt [2*N_MIOCT],
  output logic [47:0]                     bit_cnt [2*N_MIOCT],
  output logic [2*N_MIOCT-1:0]            locked,
  output logic [2*N_MIOCT-1:0]            offset,
  output logic [WORD_W-1:0]               rx_word [2*N_MIOCT],
  output logic [2*N_MIOCT-1:0]            rx_word_valid,
  input  logic                            mem_start,
  input  logic [MEM_AW:0]                 mem_n_words,
  output logic                            mem_wr_en,
  output logic [MEM_AW-1:0]               mem_wr_addr,
  output logic [MEM_W-1:0]                mem_wr_data,
  input  logic                            mem_wr_ready,
  output logic                            mem_busy,
  output logic                            mem_done,
  output logic                            mem_overflow
);

  for (genvar m = 0; m < N_MIOCT; m++) begin : g_mioct
    mioct_trigger #(.SYNC_DEPTH(SYNC_DEPTH)) u_mioct (
      .clk, .rst_n, .bc,
      .sync_delay(sync_delay[m]),
      .cand_in   (cand_in[m]),
      .cand_sync (cand_sync[m]),
      .veto_in   (veto_in[m]),
      .lut_we    (lut_we && lut_sel[m]),
      .lut_sector, .lut_roi, .lut_wdata, .pt_map, .ser_mode, .cnt_clr,
      .mult      (mult[m]),
      .topo1     (topo1[m]),
      .topo2     (topo2[m]),
      .ncand_q   (ncand[m]),
      .ser1      (trig_out[2*m]),
      .ser2      (trig_out[2*m+1]),
      .cnt_one   (cnt_one[m]),
      .cnt_two   (cnt_two[m]),
      .cnt_more  (cnt_more[m])
    );
  end

  ber_test_system #(.NC(2*N_MIOCT), .TMAX(N_TMAX), .SETTLE(SETTLE), .DWELL(DWELL)) u_ber (
    .clk, .rst_n,
    .master       (rx_master),
    .slave        (rx_slave),
    .tap_master   (rx_tap_master),
    .tap_slave    (rx_tap_slave),
    .tap_cfg      (rx_tap_cfg),
    .scan_start, .scan_busy, .scan_done,
    .trans_map    (trans_map),
    .qsel         (qsel),
    .prbs_start, .align_start,
    .prbs_checking(prbs_checking),
    .err_cnt      (err_cnt),
    .bit_cnt      (bit_cnt),
    .locked       (locked),
    .offset       (offset),
    .word         (rx_word),
    .word_valid   (rx_word_valid),
    .mem_start, .mem_n_words,
    .mem_wr_en, .mem_wr_addr, .mem_wr_data, .mem_wr_ready,
    .mem_busy, .mem_done, .mem_overflow
  );

endmodule
