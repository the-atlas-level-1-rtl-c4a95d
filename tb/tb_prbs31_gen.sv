// tb_prbs31_gen: compares the two-bit-per-cycle generator with a bit-serial
// reference of x^31 + x^28 + 1 built on a bit array (b[n] = b[n-31] ^ b[n-28])
// starting from the all-ones seed; also checks hold (en low) and re-seeding.
module tb_prbs31_gen;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [1:0] out;
  int checks = 0, failures = 0;
  bit seq [$];

  prbs31_gen dut (.*);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(input int pairs);
    int base;
    seq.delete();
    for (int i = 0; i < 31; i++) seq.push_back(1'b1);
    for (int i = 31; i < 31 + 2 * pairs + 2; i++) seq.push_back(seq[i-31] ^ seq[i-28]);
    base = 31;
    for (int p = 0; p < pairs; p++) begin
      checks++;
      if (out !== {seq[base + 2*p], seq[base + 2*p + 1]}) begin
        failures++;
        if (failures < 10) $display("pair %0d got %b exp %b%b", p, out, seq[base+2*p], seq[base+2*p+1]);
      end
      if (p == 100) begin
        logic [1:0] held;
        en = 0; held = out;
        repeat (3) @(negedge clk);
        checks++;
        if (out !== held) failures++;
        en = 1;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; en = 1;
    run(2000);
    init = 1;
    @(negedge clk) init = 0;
    // the pair shown right after init is the first pair of the sequence again
    run(500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
