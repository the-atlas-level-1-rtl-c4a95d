// topo_serializer: one electrical trigger output of an octant at 320 Mb/s.
//
// The 8-bit topological word of each bunch crossing is loaded into a shift
// register that sends the most significant bit first, two bits per 160 MHz
// cycle (dout[1] on the rising-edge half of the DDR output, dout[0] on the
// falling-edge half), so one word takes the four cycles of a crossing.
// Two other sources can replace the data:
//  * SER_TRAIN: a fixed 16-bit training pattern, sent as its upper byte in one
//    crossing and its lower byte in the next, used by the receiver for phase
//    and word alignment;
//  * SER_PRBS: the PRBS-31 sequence used in the link feasibility tests.
//
// Timing: load must pulse once every four cycles. Bits [7:6] of the word
// captured at a load edge appear on dout after the next edge, bits [1:0]
// three edges later. The training pattern starts with its upper byte at the
// first load after entering SER_TRAIN.
module topo_serializer
  import muctpi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [7:0] word_in,
  input  ser_mode_e  mode,
  output logic [1:0] dout
);

  logic [7:0] sh;
  logic       train_lo;     // next training byte is the lower one
  logic [1:0] prbs_bits;

  prbs31_gen u_prbs (
    .clk  (clk),
    .rst_n(rst_n),
    .init (1'b0),
    .en   (mode == SER_PRBS),
    .out  (prbs_bits)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh       <= '0;
      train_lo <= 1'b0;
      dout     <= '0;
    end else begin
      if (load) begin
        unique case (mode)
          SER_TRAIN: begin
            sh       <= train_lo ? TRAIN_PATTERN[7:0] : TRAIN_PATTERN[15:8];
            train_lo <= !train_lo;
          end
          default: begin
            sh       <= word_in;
            train_lo <= 1'b0;
          end
        endcase
      end else begin
        sh <= {sh[5:0], 2'b00};
      end
      dout <= (mode == SER_PRBS) ? prbs_bits : sh[7:6];
    end
  end

endmodule
