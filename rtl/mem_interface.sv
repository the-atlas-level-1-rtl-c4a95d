// mem_interface: writes the aligned words of all receiver channels to the
// external memory module, from which a computer reads them for checking.
//
// At every frame strobe (one per bunch crossing) the current word of each of
// the N_CH channels is taken. Two consecutive crossings of 32 x 8 bits make
// one 512-bit memory word: bits [8c+7:8c] hold channel c of the earlier
// crossing, bits [256+8c+7:256+8c] channel c of the later one. Memory words
// are written to consecutive addresses from 0 until n_words have been
// accepted; then done pulses and capture stops.
//
// Memory side: wr_en/wr_addr/wr_data form a valid/ready request held until
// wr_ready is high. If the next memory word is complete while the previous
// one is still waiting, the new word is dropped and overflow is set (sticky
// until the next start). start (re)arms the capture from address 0.
module mem_interface
  import ber_pkg::*;
#(
  parameter int NC = N_CH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [MEM_AW:0]   n_words,
  input  logic              frame,
  input  logic [WORD_W-1:0] words [NC],
  output logic              wr_en,
  output logic [MEM_AW-1:0] wr_addr,
  output logic [MEM_W-1:0]  wr_data,
  input  logic              wr_ready,
  output logic              busy,
  output logic              done,
  output logic              overflow
);

  localparam int HALF = NC * WORD_W;

  logic [HALF-1:0]  lo_q;
  logic [HALF-1:0]  cur;
  logic             half;
  logic [MEM_AW:0]  n_done;
  logic             armed;

  always_comb begin
    for (int c = 0; c < NC; c++) cur[c*WORD_W +: WORD_W] = words[c];
  end

  assign busy = armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_q     <= '0;
      half     <= 1'b0;
      n_done   <= '0;
      armed    <= 1'b0;
      wr_en    <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
      done     <= 1'b0;
      overflow <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        armed    <= (n_words != '0);
        half     <= 1'b0;
        n_done   <= '0;
        wr_en    <= 1'b0;
        wr_addr  <= '0;
        overflow <= 1'b0;
      end else begin
        // request accepted by the memory
        if (wr_en && wr_ready) begin
          wr_en   <= 1'b0;
          wr_addr <= wr_addr + 1'b1;
          n_done  <= n_done + 1'b1;
          if (n_done + 1'b1 == n_words) begin
            armed <= 1'b0;
            done  <= 1'b1;
          end
        end
        // capture
        if (armed && frame) begin
          if (!half) begin
            lo_q <= cur;
            half <= 1'b1;
          end else begin
            half <= 1'b0;
            if (wr_en && !wr_ready) begin
              overflow <= 1'b1;
            end else if (n_done + (MEM_AW+1)'(wr_en) < n_words) begin
              wr_en   <= 1'b1;
              wr_data <= {cur, lo_q};
            end
          end
        end
      end
    end
  end

  initial assert (NC * WORD_W * 2 == MEM_W) else $error("mem_interface: words do not fill a memory word");

endmodule
