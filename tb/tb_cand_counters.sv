// tb_cand_counters: random candidate counts, one count pulse per crossing;
// the three counters must match a reference tally, including after clr.
module tb_cand_counters;
  import muctpi_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, count = 0;
  ncand_e ncand = NCAND_ZERO;
  logic [31:0] cnt_one, cnt_two, cnt_more;
  int checks = 0, failures = 0;
  int e1 = 0, e2 = 0, e3 = 0;

  cand_counters dut (.*);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check();
    checks++;
    if (cnt_one != 32'(e1) || cnt_two != 32'(e2) || cnt_more != 32'(e3)) begin
      failures++;
      $display("counters %0d %0d %0d exp %0d %0d %0d", cnt_one, cnt_two, cnt_more, e1, e2, e3);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      count = ($urandom_range(0, 3) != 0);
      ncand = ncand_e'($urandom_range(0, 3));
      clr = (t == 2000);
      @(negedge clk);
      if (clr) begin e1 = 0; e2 = 0; e3 = 0; end
      else if (count) case (ncand)
        NCAND_ONE: e1++;
        NCAND_TWO: e2++;
        NCAND_MORE: e3++;
        default: ;
      endcase
      count = 0; clr = 0;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
