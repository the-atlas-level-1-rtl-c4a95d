// tb_prbs31_checker: feeds a PRBS-31 stream (from a bit-serial reference,
// started at an arbitrary point) with single bit errors injected at known
// positions after the load phase; err_cnt must count exactly those, and
// bit_cnt the compared bits. A second run checks that start restarts it.
module tb_prbs31_checker;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] din = '0;
  logic checking;
  logic [31:0] err_cnt;
  logic [47:0] bit_cnt;
  int checks = 0, failures = 0;
  bit seq [$];

  prbs31_checker dut (.*);

  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(input int offset, input int pairs, input int err_every);
    int injected = 0, compared = 0;
    seq.delete();
    for (int i = 0; i < 31; i++) seq.push_back(1'b1);
    for (int i = 31; i < offset + 2 * pairs + 40; i++) seq.push_back(seq[i-31] ^ seq[i-28]);
    for (int p = 0; p < pairs; p++) begin
      logic [1:0] d;
      d = {seq[offset + 2*p], seq[offset + 2*p + 1]};
      start = (p == 0);
      if (p > 20 && err_every > 0 && p % err_every == 0) begin d[p % 2] ^= 1'b1; injected++; end
      din = d;
      if (checking && !start) compared += 2;
      @(negedge clk);
    end
    start = 0;
    checks += 3;
    if (!checking) begin failures++; $display("never reached the check phase"); end
    if (err_cnt != 32'(injected)) begin failures++; $display("errors %0d exp %0d", err_cnt, injected); end
    if (bit_cnt != 48'(compared)) begin failures++; $display("bits %0d exp %0d", bit_cnt, compared); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1000, 3000, 97);
    run(12345, 2000, 0);
    run(777, 2000, 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
