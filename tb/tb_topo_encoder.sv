// tb_topo_encoder: fills the whole eta/phi table from a formula, then checks
// random candidate pairs: table look-up, the programmable pT map, the
// "no candidate" code and the "more than two candidates" code of the second
// word.
module tb_topo_encoder;
  import muctpi_pkg::*;
  logic clk = 0;
  logic lut_we = 0;
  logic [SECT_W-1:0] lut_sector;
  logic [ROI_W-1:0] lut_roi;
  logic [5:0] lut_wdata;
  logic [2*N_THR-1:0] pt_map;
  sorted_cand_t first, second;
  ncand_e ncand;
  topo_word_t word1, word2;
  int checks = 0, failures = 0;

  topo_encoder dut (.*);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [5:0] table_val(input int s, input int r);
    return 6'((s * 37 + r * 11 + (r >> 3)) % 56) ^ 6'(r & 7);
  endfunction

  function automatic topo_word_t ref_word(input sorted_cand_t c, input logic second_w, input ncand_e n,
                                          input logic [2*N_THR-1:0] map);
    topo_word_t w;
    logic [5:0] v;
    if (!c.valid) return '{eta: 3'b111, phi: 3'b000, pt: 2'b00};
    v = table_val(int'(c.sector), int'(c.roi));
    w.eta = v[5:3]; w.phi = v[2:0];
    w.pt = map[2*(int'(c.pt)-1) +: 2];
    if (second_w && n == NCAND_MORE) w.pt = 2'b11;
    return w;
  endfunction

  task automatic rand_cand(output sorted_cand_t c);
    c.pt = PT_W'($urandom_range(0, 6));
    c.valid = (c.pt != 0);
    c.sector = SECT_W'($urandom_range(0, N_SECT - 1));
    c.roi = ROI_W'($urandom);
  endtask

  initial begin
    pt_map = 12'b10_10_01_01_00_00;
    first = '0; second = '0; ncand = NCAND_ZERO;
    for (int s = 0; s < N_SECT; s++)
      for (int r = 0; r < 256; r++) begin
        @(negedge clk);
        lut_we = 1; lut_sector = SECT_W'(s); lut_roi = ROI_W'(r); lut_wdata = table_val(s, r);
      end
    @(negedge clk) lut_we = 0;
    for (int t = 0; t < 3000; t++) begin
      topo_word_t e1, e2;
      if (t % 500 == 0) pt_map = {2'($urandom_range(0,2)), 2'($urandom_range(0,2)), 2'($urandom_range(0,2)),
                                  2'($urandom_range(0,2)), 2'($urandom_range(0,2)), 2'($urandom_range(0,2))};
      rand_cand(first); rand_cand(second);
      if (!first.valid) second.valid = 0;
      ncand = !first.valid ? NCAND_ZERO : !second.valid ? NCAND_ONE : ncand_e'($urandom_range(2, 3));
      #1;
      e1 = ref_word(first, 0, ncand, pt_map);
      e2 = ref_word(second, 1, ncand, pt_map);
      checks += 2;
      if (word1 !== e1) begin failures++; if (failures < 10) $display("w1 %h exp %h", word1, e1); end
      if (word2 !== e2) begin failures++; if (failures < 10) $display("w2 %h exp %h", word2, e2); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
