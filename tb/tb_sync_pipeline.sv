// tb_sync_pipeline: each sector gets a different programmable delay; the
// data of crossing n tagged into the RoI field must come out at crossing
// n + delay for that sector.
module tb_sync_pipeline;
  import muctpi_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0, bc = 0;
  logic [$clog2(DEPTH+1)-1:0] delay [N_SECT];
  cand_t cand_in [N_CAND];
  cand_t cand_out [N_CAND];
  int checks = 0, failures = 0;

  sync_pipeline #(.NS(N_SECT), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic cand_t tag(input int n, input int i);
    cand_t c;
    c.roi = ROI_W'(n);
    c.pt = PT_W'((i + n) % 7);
    return c;
  endfunction

  initial begin
    for (int s = 0; s < N_SECT; s++) delay[s] = 4'(s % (DEPTH + 1));
    for (int i = 0; i < N_CAND; i++) cand_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < N_CAND; i++) cand_in[i] = tag(n, i);
      #1;
      if (n >= DEPTH) begin
        for (int i = 0; i < N_CAND; i++) begin
          checks++;
          if (cand_out[i] !== tag(n - int'(delay[i/2]), i)) begin
            failures++;
            if (failures < 10) $display("n=%0d cand %0d got %h", n, i, cand_out[i]);
          end
        end
      end
      bc = 1;
      @(negedge clk);
      bc = 0;
      repeat (3) @(negedge clk);
      if (n == 200) for (int s = 0; s < N_SECT; s++) delay[s] = 4'((s * 5 + 3) % (DEPTH + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
