// ber_pkg: constants of the error rate test system that receives the
// 320 Mb/s electrical trigger outputs.
//
// The receiver runs at 160 MHz. Each input is seen through two programmable
// delay lines (master and slave, one tap of 78.125 ps apart) and four
// oversampling phases Q1..Q4 spaced by 1/(4 x 160 MHz) = 1.5625 ns, so a
// cycle gives four samples of two bit periods (3.125 ns each). A delay scan
// uses taps 0..19: 20 taps x 78.125 ps = 1.5625 ns covers one sampling
// segment without overlapping the next.
package ber_pkg;

  localparam int N_CH      = 32;    // receiver inputs
  localparam int TAP_W     = 5;     // delay line tap number (32 taps)
  localparam int N_TMAX    = 20;    // taps used per sampling segment
  localparam int N_Q       = 4;     // oversampling phases Q1..Q4
  localparam int WORD_W    = 8;     // topological word
  localparam int MEM_W     = 512;   // external memory word
  localparam int MEM_AW    = 24;    // external memory address (512-bit words)

  localparam logic [WORD_W-1:0] ALIGN_REF = 8'hFE;  // word alignment reference

  // Sample-pair selection: which two of the four samples carry the two bits
  typedef enum logic {
    SEL_Q1Q3 = 1'b0,
    SEL_Q2Q4 = 1'b1
  } qsel_e;

endpackage
