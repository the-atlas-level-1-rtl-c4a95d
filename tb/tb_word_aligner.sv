// tb_word_aligner: a transmitter model sends the training pattern and then
// random words, with the word boundary at either bit of a pair and at any
// cycle phase. After alignment every recovered word must equal the sent one.
module tb_word_aligner;
  import ber_pkg::*;
  import muctpi_pkg::TRAIN_PATTERN;
  logic clk = 0, rst_n = 0, align_start = 0;
  logic [1:0] din = '0;
  logic locked, offset, word_valid;
  logic [WORD_W-1:0] word;
  int checks = 0, failures = 0;

  word_aligner dut (.*);

  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  bit tx [$];
  logic [7:0] sent [$];

  task automatic run(input int skip_bits);
    int got = 0, pos, nvalid = 0;
    logic [7:0] w;
    tx.delete(); sent.delete();
    for (int i = 0; i < skip_bits; i++) tx.push_back(1'b0);
    for (int i = 0; i < 8; i++) for (int b = 15; b >= 0; b--) tx.push_back(TRAIN_PATTERN[b]);
    for (int i = 0; i < 300; i++) begin
      w = 8'($urandom);
      if (w == ALIGN_REF) w = 8'h00;
      sent.push_back(w);
      for (int b = 7; b >= 0; b--) tx.push_back(w[b]);
    end
    align_start = 1;
    @(negedge clk) align_start = 0;
    pos = 0;
    while (pos + 1 < tx.size()) begin
      din = {tx[pos], tx[pos+1]};
      pos += 2;
      @(negedge clk);
      if (word_valid) nvalid++;
      // the first 16 words after locking are the training pattern
      if (word_valid && nvalid <= 16) begin
        checks++;
        if (word !== ((nvalid % 2) ? TRAIN_PATTERN[15:8] : TRAIN_PATTERN[7:0])) begin
          failures++; $display("training word %0d = %h", nvalid, word);
        end
      end else if (word_valid) begin
        checks++;
        if (got >= sent.size() || word !== sent[got]) begin
          failures++; if (failures < 10) $display("word %0d = %h exp %h", got, word, sent[got]);
        end
        got++;
      end
    end
    checks += 2;
    if (!locked) begin failures++; $display("not locked"); end
    if (offset !== 1'(skip_bits % 2)) begin failures++; $display("offset %0d for skip %0d", offset, skip_bits); end
    if (got < 295) begin failures++; $display("only %0d words", got); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++) run(2 * 8 + s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
