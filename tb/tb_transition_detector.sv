// tb_transition_detector: random master/slave samples with rare mismatches;
// the two status bits must follow a reference "latched low on mismatch"
// model for the selected stage, and clr must set them again.
module tb_transition_detector;
  import ber_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, stage = 0;
  logic [N_Q-1:0] master = '0, slave = '0;
  logic [1:0] status;
  int checks = 0, failures = 0;

  transition_detector dut (.*);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [1:0] e;
    int seen_low = 0;
    e = 2'b11;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      clr = ($urandom_range(0, 40) == 0);
      en = ($urandom_range(0, 5) != 0);
      if (t % 1000 == 0) stage = ~stage;
      master = N_Q'($urandom);
      slave = master;
      if ($urandom_range(0, 30) == 0) slave[$urandom_range(0, 3)] ^= 1'b1;
      @(negedge clk);
      if (clr) e = 2'b11;
      else if (en) e &= stage ? ~(master[3:2] ^ slave[3:2]) : ~(master[1:0] ^ slave[1:0]);
      checks++;
      if (status !== e) begin failures++; if (failures < 10) $display("t=%0d status %b exp %b", t, status, e); end
      if (e != 2'b11) seen_low++;
    end
    checks++;
    if (seen_low == 0) begin failures++; $display("no transition ever detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
