// tb_local_multiplicity: random candidates and vetoes; each of the six counts
// must equal the number of unvetoed candidates at or above the threshold,
// saturated at 7, one cycle after the load.
module tb_local_multiplicity;
  import muctpi_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  cand_t cand_in [N_CAND];
  logic [N_CAND-1:0] veto_in;
  logic [MULT_W-1:0] mult [N_THR];
  int checks = 0, failures = 0;

  local_multiplicity dut (.*);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int expv [N_THR];
    veto_in = '0;
    for (int i = 0; i < N_CAND; i++) cand_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int density;
      density = $urandom_range(1, 10);
      for (int i = 0; i < N_CAND; i++) begin
        cand_in[i].pt = ($urandom_range(0, 9) < density) ? PT_W'($urandom_range(1, 6)) : '0;
        cand_in[i].roi = ROI_W'($urandom);
      end
      veto_in = N_CAND'($urandom) & N_CAND'($urandom) & N_CAND'($urandom);
      for (int k = 0; k < N_THR; k++) begin
        expv[k] = 0;
        for (int i = 0; i < N_CAND; i++) if (!veto_in[i] && cand_in[i].pt >= k + 1) expv[k]++;
        if (expv[k] > 7) expv[k] = 7;
      end
      load = 1;
      @(negedge clk);
      load = 0;
      @(negedge clk);
      for (int k = 0; k < N_THR; k++) begin
        checks++;
        if (int'(mult[k]) != expv[k]) begin
          failures++;
          if (failures < 10) $display("t=%0d thr %0d: %0d exp %0d", t, k + 1, mult[k], expv[k]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
