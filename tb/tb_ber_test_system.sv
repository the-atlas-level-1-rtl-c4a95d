// tb_ber_test_system: all 32 receiver channels, each behind a cable model
// with its own skew. Runs the hardware phase scan, lets a software model
// pick one common tap and a sample pair per channel (maximising the
// smallest margin to an edge over all channels), checks
// a clean PRBS-31 link on every channel, aligns the words of a training
// sequence, captures 16 memory words and checks their layout.
module tb_ber_test_system;
  import ber_pkg::*;
  import muctpi_pkg::TRAIN_PATTERN;
  localparam int NC = N_CH, DW = 64;
  logic clk = 0, rst_n = 0;
  logic [1:0] tx [NC];
  logic [N_Q-1:0] master [NC], slave [NC];
  logic [TAP_W-1:0] tap_master, tap_slave;
  logic scan_start = 0, scan_busy, scan_done;
  logic [N_TMAX-1:0] trans_map [NC][N_Q];
  qsel_e qsel [NC];
  logic prbs_start = 0, align_start = 0;
  logic [NC-1:0] prbs_checking, locked, offset, word_valid;
  logic [31:0] err_cnt [NC];
  logic [47:0] bit_cnt [NC];
  logic [WORD_W-1:0] word [NC];
  logic mem_start = 0, mem_wr_en, mem_wr_ready = 1, mem_busy, mem_done, mem_overflow;
  logic [MEM_AW:0] mem_n_words = '0;
  logic [MEM_AW-1:0] mem_wr_addr;
  logic [MEM_W-1:0] mem_wr_data;
  logic [TAP_W-1:0] tap_cfg = '0;
  int checks = 0, failures = 0;
  int cyc = 0;


  for (genvar c = 0; c < NC; c++) begin : g_fe
    rx_frontend_model #(.SKEW(100000 + c * 1733), .JITTER(700)) fe (
      .clk, .tx(tx[c]), .tap_master(tap_master), .tap_slave(tap_slave),
      .master(master[c]), .slave(slave[c]));
  end

  ber_test_system #(.DWELL(DW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin wait (cyc == 80000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // transmitters: 0 random, 1 PRBS-31, 2 training then numbered words
  int src = 0;
  int nsent = 0;
  bit prbs [$];
  function automatic logic [7:0] wv(input int c, input int n);
    return 8'(n * 3 + c);
  endfunction
  always @(negedge clk) begin
    static int pos = 0;
    if (src == 1) begin
      while (prbs.size() < pos + 4) prbs.push_back(prbs[prbs.size()-31] ^ prbs[prbs.size()-28]);
      for (int c = 0; c < NC; c++) tx[c] <= {prbs[pos], prbs[pos+1]};
      pos += 2;
    end else if (src == 2) begin
      // four cycles per word; bit pair index inside the word = cyc % 4
      int ph, n;
      ph = cyc % 4;
      n = nsent;
      for (int c = 0; c < NC; c++) begin
        logic [7:0] w;
        if (n < 16) w = (n % 2) ? TRAIN_PATTERN[7:0] : TRAIN_PATTERN[15:8];
        else w = wv(c, n);
        tx[c] <= w[7 - 2*ph -: 2];
      end
      if (ph == 3) nsent++;
    end else begin
      for (int c = 0; c < NC; c++) tx[c] <= 2'($urandom);
    end
  end

  task automatic run_all();
    int best_t;
    int best_m;
    for (int i = 0; i < 31; i++) prbs.push_back(1'b1);
    for (int c = 0; c < NC; c++) qsel[c] = SEL_Q1Q3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- scan ----
    scan_start = 1; @(negedge clk); scan_start = 0;
    wait (scan_done); @(negedge clk);
    checks++;
    if (cyc > 2 * N_TMAX * (16 + 1 + DW + 1) + 20) begin failures++; $display("scan too slow"); end
    // ---- software: common tap, per-channel sample pair ----
    best_m = -1; best_t = 0;
    for (int t = 0; t < N_TMAX; t++) begin
      int worst = 1000;
      for (int c = 0; c < NC; c++) begin
        int bestc = -1;
        for (int q = 0; q < 2; q++) begin
          int d = 1000;
          for (int qq = 0; qq < N_Q; qq++)
            for (int tt = 0; tt < N_TMAX; tt++)
              if (trans_map[c][qq][tt]) begin
                int x = (((qq * 20 + tt) - (q * 20 + t)) % 40 + 40) % 40;
                if (x > 20) x = 40 - x;
                if (x < d) d = x;
              end
          if (d > bestc) bestc = d;
        end
        if (bestc < worst) worst = bestc;
      end
      if (worst > best_m) begin best_m = worst; best_t = t; end
    end
    for (int c = 0; c < NC; c++) begin
      int dq [2];
      int edges = 0;
      for (int q = 0; q < 2; q++) begin
        dq[q] = 1000;
        for (int qq = 0; qq < N_Q; qq++)
          for (int tt = 0; tt < N_TMAX; tt++)
            if (trans_map[c][qq][tt]) begin
              int x = (((qq * 20 + tt) - (q * 20 + best_t)) % 40 + 40) % 40;
              if (x > 20) x = 40 - x;
              if (x < dq[q]) dq[q] = x;
              edges++;
            end
      end
      qsel[c] = (dq[1] > dq[0]) ? SEL_Q2Q4 : SEL_Q1Q3;
      checks++;
      if (edges == 0) begin failures++; $display("channel %0d: no edge in the scan", c); end
    end
    $display("common tap %0d, worst margin %0d taps", best_t, best_m);
    checks++;
    if (best_m < 6) begin failures++; $display("margin too small"); end
    tap_cfg = 5'(best_t);
    repeat (2) @(negedge clk);
    checks++;
    if (tap_master != 5'(best_t) || tap_slave != 5'(best_t + 1)) begin failures++; $display("tap not applied"); end
    // ---- PRBS on all channels ----
    src = 1;
    repeat (10) @(negedge clk);
    prbs_start = 1; @(negedge clk); prbs_start = 0;
    repeat (2000) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (!prbs_checking[c] || err_cnt[c] != 0 || bit_cnt[c] < 3900) begin
        failures++; $display("channel %0d: %0d errors in %0d bits", c, err_cnt[c], bit_cnt[c]);
      end
    end
    // ---- training, alignment, capture ----
    wait (cyc % 4 == 3); @(negedge clk);
    nsent = 0; src = 2;
    align_start = 1; @(negedge clk); align_start = 0;
    wait (nsent == 40);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (!locked[c]) begin failures++; $display("channel %0d not locked", c); end
    end
    mem_n_words = 25'd16;
    mem_start = 1; @(negedge clk); mem_start = 0;
    begin
      logic [MEM_W-1:0] mem [16];
      int nw = 0;
      while (nw < 16) begin
        @(posedge clk);
        if (mem_wr_en && mem_wr_ready) begin mem[mem_wr_addr] = mem_wr_data; nw++; end
      end
      @(negedge clk);
      checks++;
      if (mem_overflow) begin failures++; $display("overflow"); end
      for (int c = 0; c < NC; c++) begin
        int k;
        k = ((int'(mem[0][8*c +: 8]) - c) * 171) & 255;
        for (int a = 0; a < 16; a++) begin
          checks += 2;
          if (mem[a][8*c +: 8] !== wv(c, k + 2*a)) begin failures++; if (failures < 10) $display("mem %0d ch %0d lo %h", a, c, mem[a][8*c +: 8]); end
          if (mem[a][256 + 8*c +: 8] !== wv(c, k + 2*a + 1)) begin failures++; if (failures < 10) $display("mem %0d ch %0d hi", a, c); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial run_all();
endmodule
