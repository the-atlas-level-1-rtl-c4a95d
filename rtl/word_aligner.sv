// word_aligner: recovers the 8-bit word boundary of a 320 Mb/s stream.
//
// The stream arrives two bits per 160 MHz cycle (din[1] first), so a word
// spans four cycles and may start on either bit of a pair. While the
// transmitter sends its training pattern, the aligner compares the last
// eight bits at both bit offsets with the 8-bit alignment reference every
// cycle. At the first match it locks: the bit offset is kept and the word
// phase is set so that a word is cut at the matching position and then every
// four cycles. align_start clears the lock and restarts the search. The
// reference must occur in the training sequence at only one position per
// 16 bits (true for the default pattern FE01 and reference FE).
//
// Timing: word/word_valid are registered; word_valid pulses once every four
// cycles while locked, first on the edge after the reference was received.
module word_aligner
  import ber_pkg::*;
#(
  parameter logic [WORD_W-1:0] REF = ALIGN_REF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              align_start,
  input  logic [1:0]        din,
  output logic              locked,
  output logic              offset,
  output logic [WORD_W-1:0] word,
  output logic              word_valid
);

  logic [WORD_W-2:0] hist;    // the last seven bits, hist[0] newest
  logic [WORD_W:0]   hist_n;
  logic [1:0]        ph;
  logic [WORD_W-1:0] win0, win1;

  assign hist_n = {hist[WORD_W-2:0], din};
  assign win0   = hist_n[WORD_W-1:0];   // word ends with the second bit of this pair
  assign win1   = hist_n[WORD_W:1];     // word ends with the first bit of this pair

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist       <= '0;
      ph         <= '0;
      locked     <= 1'b0;
      offset     <= 1'b0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      hist       <= hist_n[WORD_W-2:0];
      word_valid <= 1'b0;
      if (align_start) begin
        locked <= 1'b0;
      end else if (!locked) begin
        if (win0 == REF || win1 == REF) begin
          locked     <= 1'b1;
          offset     <= (win0 != REF);
          word       <= REF;
          word_valid <= 1'b1;
          ph         <= 2'd1;
        end
      end else begin
        ph <= ph + 2'd1;
        if (ph == 2'd0) begin
          word       <= offset ? win1 : win0;
          word_valid <= 1'b1;
        end
      end
    end
  end

endmodule
