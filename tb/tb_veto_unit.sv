// tb_veto_unit: random candidates and veto flags; after each load the output
// must equal the captured candidates with flagged ones set to pT 0, and must
// hold while load is low.
module tb_veto_unit;
  import muctpi_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  cand_t cand_in [N_CAND];
  cand_t cand_out [N_CAND];
  logic [N_CAND-1:0] veto_in;
  int checks = 0, failures = 0;

  veto_unit dut (.*);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  cand_t exp_c [N_CAND];
  initial begin
    for (int i = 0; i < N_CAND; i++) cand_in[i] = '0;
    veto_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int i = 0; i < N_CAND; i++) begin
        cand_in[i].pt  = PT_W'($urandom_range(0, 6));
        cand_in[i].roi = ROI_W'($urandom);
        exp_c[i] = cand_in[i];
      end
      veto_in = N_CAND'($urandom) & N_CAND'($urandom);
      for (int i = 0; i < N_CAND; i++) if (veto_in[i]) exp_c[i].pt = '0;
      load = 1;
      @(negedge clk);
      load = 0;
      // change inputs: outputs must hold
      for (int i = 0; i < N_CAND; i++) cand_in[i] = cand_t'($urandom);
      veto_in = ~veto_in;
      for (int k = 0; k < 3; k++) begin
        for (int i = 0; i < N_CAND; i++) begin
          checks++;
          if (cand_out[i] !== exp_c[i]) begin
            failures++;
            if (failures < 10) $display("mismatch t=%0d i=%0d got %h exp %h", t, i, cand_out[i], exp_c[i]);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
