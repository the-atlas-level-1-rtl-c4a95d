// tb_mioct_trigger: one octant end to end. The eta/phi table is filled from
// a formula, then 600 bunch crossings of random candidates and veto flags
// are sent. A reference model (veto, best-two scan, table and pT map)
// predicts each crossing's two words, multiplicity and candidate count.
// Checked: the 8-bit words on both serial outputs, MSB first, sampled at
// rising edges 5..8 after the crossing's bc edge (one crossing of latency);
// the parallel words two edges after bc; the multiplicity one edge after bc;
// the three monitoring counters; the training pattern on both outputs.
module tb_mioct_trigger;
  import muctpi_pkg::*;
  logic clk = 0, rst_n = 0, bc = 0;
  logic [3:0] sync_delay [N_SECT];
  cand_t cand_in [N_CAND];
  cand_t cand_sync [N_CAND];
  logic [N_CAND-1:0] veto_in = '0;
  logic lut_we = 0;
  logic [SECT_W-1:0] lut_sector = '0;
  logic [ROI_W-1:0] lut_roi = '0;
  logic [5:0] lut_wdata = '0;
  logic [2*N_THR-1:0] pt_map = 12'b10_10_01_01_00_00;
  ser_mode_e ser_mode = SER_DATA;
  logic cnt_clr = 0;
  logic [MULT_W-1:0] mult [N_THR];
  topo_word_t topo1, topo2;
  ncand_e ncand_q;
  logic [1:0] ser1, ser2;
  logic [31:0] cnt_one, cnt_two, cnt_more;
  int checks = 0, failures = 0;
  int cyc = 0;

  mioct_trigger dut (.*);

  always #5 clk = ~clk;
  initial begin wait (cyc == 30000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [5:0] table_val(input int s, input int r);
    return 6'((s * 37 + r * 11 + (r >> 3)) % 56) ^ 6'(r & 7);
  endfunction

  // serial outputs sampled at each rising edge before its update
  logic [1:0] s1 [$], s2 [$];
  int bc_cyc [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    s1.push_back(ser1);
    s2.push_back(ser2);
    if (bc && rst_n) bc_cyc.push_back(cyc);
  end

  function automatic logic [7:0] ser_word(input logic [1:0] q [$], input int c);
    return {q[c+5], q[c+6], q[c+7], q[c+8]};
  endfunction

  // reference model
  task automatic model(input cand_t c [N_CAND], input logic [N_CAND-1:0] v,
                       output topo_word_t w1, output topo_word_t w2, output int m [N_THR], output int n);
    int b1, b2;
    cand_t cv [N_CAND];
    logic [5:0] t;
    n = 0; b1 = -1; b2 = -1;
    for (int i = 0; i < N_CAND; i++) begin
      cv[i] = c[i];
      if (v[i]) cv[i].pt = 0;
      if (cv[i].pt != 0) n++;
    end
    for (int k = 0; k < N_THR; k++) begin
      m[k] = 0;
      for (int i = 0; i < N_CAND; i++) if (cv[i].pt >= k + 1) m[k]++;
      if (m[k] > 7) m[k] = 7;
    end
    for (int i = 0; i < N_CAND; i++) begin
      if (cv[i].pt == 0) continue;
      if (b1 < 0 || cv[i].pt > cv[b1].pt) begin b2 = b1; b1 = i; end
      else if (b2 < 0 || cv[i].pt > cv[b2].pt) b2 = i;
    end
    w1 = '{eta: 3'b111, phi: 3'b000, pt: 2'b00};
    w2 = w1;
    if (b1 >= 0) begin
      t = table_val(b1 / 2, int'(cv[b1].roi));
      w1 = '{eta: t[5:3], phi: t[2:0], pt: pt_map[2*(int'(cv[b1].pt)-1) +: 2]};
    end
    if (b2 >= 0) begin
      t = table_val(b2 / 2, int'(cv[b2].roi));
      w2 = '{eta: t[5:3], phi: t[2:0], pt: (n > 2) ? 2'b11 : pt_map[2*(int'(cv[b2].pt)-1) +: 2]};
    end
  endtask

  // crossings with no candidates, keeping bc running
  task automatic idle_bc(input int n);
    for (int i = 0; i < N_CAND; i++) cand_in[i] = '0;
    veto_in = '0;
    repeat (n) begin bc = 1; @(negedge clk); bc = 0; repeat (3) @(negedge clk); end
  endtask

  localparam int NBC = 600;
  topo_word_t e1 [NBC], e2 [NBC];
  int e_n [NBC];
  int hist_n [4];
  int n_veto = 0, n_none = 0, n_more = 0;

  initial begin
    int first_bc;
    int m [N_THR];
    int c1 = 0, c2 = 0, c3 = 0;
    for (int s = 0; s < N_SECT; s++) sync_delay[s] = '0;
    for (int i = 0; i < N_CAND; i++) cand_in[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < N_SECT; s++)
      for (int r = 0; r < 256; r++) begin
        lut_we = 1; lut_sector = SECT_W'(s); lut_roi = ROI_W'(r); lut_wdata = table_val(s, r);
        @(negedge clk);
      end
    lut_we = 0;
    first_bc = bc_cyc.size();
    for (int b = 0; b < NBC; b++) begin
      int dens;
      dens = $urandom_range(0, 12);
      for (int i = 0; i < N_CAND; i++) begin
        cand_in[i].pt = ($urandom_range(0, 25) < dens) ? PT_W'($urandom_range(1, 6)) : '0;
        cand_in[i].roi = ROI_W'($urandom);
      end
      veto_in = N_CAND'($urandom) & N_CAND'($urandom) & N_CAND'($urandom);
      for (int i = 0; i < N_CAND; i++) if (veto_in[i] && cand_in[i].pt != 0) n_veto++;
      model(cand_in, veto_in, e1[b], e2[b], m, e_n[b]);
      hist_n[(e_n[b] > 3) ? 3 : e_n[b]]++;
      if (e_n[b] == 0) n_none++;
      if (e_n[b] > 2) n_more++;
      if (e_n[b] == 1) c1++; else if (e_n[b] == 2) c2++; else if (e_n[b] > 2) c3++;
      bc = 1;
      @(negedge clk);            // E0 passed
      bc = 0;
      @(negedge clk);            // E1 passed: multiplicity valid
      for (int k = 0; k < N_THR; k++) begin
        checks++;
        if (int'(mult[k]) != m[k]) begin failures++; if (failures < 10) $display("bc %0d mult[%0d]=%0d exp %0d", b, k, mult[k], m[k]); end
      end
      @(negedge clk);            // E2 passed: words captured
      checks += 2;
      if (topo1 !== e1[b] || topo2 !== e2[b]) begin
        failures++; if (failures < 10) $display("bc %0d words %h %h exp %h %h", b, topo1, topo2, e1[b], e2[b]);
      end
      @(negedge clk);
    end
    idle_bc(3);
    for (int b = 0; b < NBC; b++) begin
      int c;
      c = bc_cyc[first_bc + b];
      checks += 2;
      if (ser_word(s1, c) !== e1[b]) begin failures++; if (failures < 10) $display("bc %0d serial 1 %h exp %h", b, ser_word(s1, c), e1[b]); end
      if (ser_word(s2, c) !== e2[b]) begin failures++; if (failures < 10) $display("bc %0d serial 2 %h exp %h", b, ser_word(s2, c), e2[b]); end
    end
    // the idle crossings add nothing to the counters
    checks += 3;
    if (cnt_one != 32'(c1)) begin failures++; $display("cnt_one %0d exp %0d", cnt_one, c1); end
    if (cnt_two != 32'(c2)) begin failures++; $display("cnt_two %0d exp %0d", cnt_two, c2); end
    if (cnt_more != 32'(c3)) begin failures++; $display("cnt_more %0d exp %0d", cnt_more, c3); end
    // every case must have occurred
    checks++;
    if (n_veto == 0 || n_none == 0 || n_more == 0 || c1 == 0 || c2 == 0) begin
      failures++; $display("case not covered: veto %0d none %0d one %0d two %0d more %0d", n_veto, n_none, c1, c2, c3);
    end
    // training pattern
    ser_mode = SER_TRAIN;
    first_bc = bc_cyc.size();
    idle_bc(13);
    for (int b = 1; b < 10; b++) begin
      int c;
      c = bc_cyc[first_bc + b];
      checks++;
      if (ser_word(s1, c) !== ser_word(s2, c) ||
          {ser_word(s1, c), ser_word(s1, c + 4)} !== ((ser_word(s1, c) == TRAIN_PATTERN[15:8]) ? TRAIN_PATTERN : {TRAIN_PATTERN[7:0], TRAIN_PATTERN[15:8]})) begin
        failures++; $display("training bc %0d: %h", b, ser_word(s1, c));
      end
    end
    $display("crossings with 0/1/2/>2 candidates: %0d %0d %0d %0d, vetoed candidates %0d", hist_n[0], hist_n[1], hist_n[2], hist_n[3], n_veto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
