// tb_l1mu_topo_top: the whole chain end to end. Sixteen octants send their
// topological words over 32 cable models (each with its own skew) to the
// 32-channel error rate test system, which scans the sampling phase, checks
// PRBS-31, aligns on the training pattern and stores the received words in
// a memory model. Every word found in memory is compared with a reference
// model of the octants (synchronisation delays, veto, best-two selection,
// eta/phi table, pT map), as are the multiplicities and the monitoring
// counters. Each mechanism of the design is counted and must occur at least
// once: veto, zero/one/two/more candidates, "no candidate" and "more than
// two" codes, a non-zero sync delay, PRBS, training and data modes, a phase
// scan with edges found, both word-alignment bit offsets, memory
// back-pressure and a memory overflow.
//
// The top is instantiated with all its default parameters, including the
// full 65536-cycle dwell per scan step (about 2.6 million cycles of scan).
module tb_l1mu_topo_top;
  import muctpi_pkg::*;
  import ber_pkg::*;
  localparam int NM = 16, NC = 2 * NM;
  localparam int NBC = 240;           // data crossings sent
  localparam int NMEM = 64;           // memory words captured (128 crossings)
  logic clk = 0, rst_n = 0, bc = 0;
  logic [3:0] sync_delay [NM][N_SECT];
  cand_t cand_in [NM][N_CAND];
  cand_t cand_sync [NM][N_CAND];
  logic [N_CAND-1:0] veto_in [NM];
  logic [NM-1:0] lut_sel = '1;
  logic lut_we = 0;
  logic [SECT_W-1:0] lut_sector = '0;
  logic [ROI_W-1:0] lut_roi = '0;
  logic [5:0] lut_wdata = '0;
  logic [2*N_THR-1:0] pt_map = 12'b10_10_01_00_01_00;
  ser_mode_e ser_mode = SER_PRBS;
  logic cnt_clr = 0;
  logic [MULT_W-1:0] mult [NM][N_THR];
  topo_word_t topo1 [NM], topo2 [NM];
  ncand_e ncand [NM];
  logic [31:0] cnt_one [NM], cnt_two [NM], cnt_more [NM];
  logic [1:0] trig_out [NC];
  logic [N_Q-1:0] rx_master [NC], rx_slave [NC];
  logic [TAP_W-1:0] rx_tap_master, rx_tap_slave, rx_tap_cfg = '0;
  logic scan_start = 0, scan_busy, scan_done;
  logic [N_TMAX-1:0] trans_map [NC][N_Q];
  qsel_e qsel [NC];
  logic prbs_start = 0, align_start = 0;
  logic [NC-1:0] prbs_checking, locked, offset, rx_word_valid;
  logic [31:0] err_cnt [NC];
  logic [47:0] bit_cnt [NC];
  logic [WORD_W-1:0] rx_word [NC];
  logic mem_start = 0, mem_wr_ready = 1;
  logic [MEM_AW:0] mem_n_words = '0;
  logic mem_wr_en, mem_busy, mem_done, mem_overflow;
  logic [MEM_AW-1:0] mem_wr_addr;
  logic [MEM_W-1:0] mem_wr_data;
  int checks = 0, failures = 0;
  longint cyc = 0;

  l1mu_topo_top dut (.*);

  for (genvar c = 0; c < NC; c++) begin : g_fe
    rx_frontend_model #(.SKEW(100000 + c * 1733), .JITTER(700)) fe (
      .clk, .tx(trig_out[c]), .tap_master(rx_tap_master), .tap_slave(rx_tap_slave),
      .master(rx_master[c]), .slave(rx_slave[c]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    wait (cyc == 64'd6000000);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- bunch crossings and octant inputs ----------------
  // bc is high in every fourth cycle; inputs change at the negedge before it.
  int bcn = 0;                 // crossings issued so far
  bit data_on = 0;
  bit mon_on = 0;               // parallel checks and counter tally active
  cand_t in_hist [NM][$];      // per octant: 26 candidates per crossing, flattened
  logic [N_CAND-1:0] veto_hist [NM][$];

  function automatic logic [5:0] table_val(input int s, input int r);
    return 6'((s * 37 + r * 11 + (r >> 3)) % 56) ^ 6'(r & 7);
  endfunction

  always @(negedge clk) begin
    if (rst_n && cyc % 4 == 3) begin
      for (int m = 0; m < NM; m++) begin
        int dens;
        dens = $urandom_range(0, 10);
        for (int i = 0; i < N_CAND; i++) begin
          cand_t c;
          c.pt = (data_on && $urandom_range(0, 25) < dens) ? PT_W'($urandom_range(1, 6)) : '0;
          c.roi = ROI_W'($urandom);
          cand_in[m][i] = c;
          in_hist[m].push_back(c);
        end
        veto_in[m] = data_on ? (N_CAND'($urandom) & N_CAND'($urandom) & N_CAND'($urandom)) : '0;
        veto_hist[m].push_back(veto_in[m]);
      end
      bc <= 1;
      bcn++;
    end else bc <= 0;
  end

  // the candidates of octant m, candidate i, that the octant sees at crossing n
  function automatic cand_t synced(input int m, input int i, input int n);
    int src;
    src = n - int'(sync_delay[m][i/2]);
    if (src < 0) return '0;
    return in_hist[m][src * N_CAND + i];
  endfunction

  int n_veto = 0, n_cases [4] = '{0, 0, 0, 0}, n_none_code = 0, n_more_code = 0;

  function automatic void model(input int m, input int n, output topo_word_t w1, output topo_word_t w2,
                       output int mu [N_THR], output int ncnt);
    int b1, b2;
    cand_t cv [N_CAND];
    logic [5:0] t;
    ncnt = 0; b1 = -1; b2 = -1;
    for (int i = 0; i < N_CAND; i++) begin
      cv[i] = synced(m, i, n);
      if (veto_hist[m][n][i]) cv[i].pt = 0;
      if (cv[i].pt != 0) ncnt++;
    end
    for (int k = 0; k < N_THR; k++) begin
      mu[k] = 0;
      for (int i = 0; i < N_CAND; i++) if (cv[i].pt >= k + 1) mu[k]++;
      if (mu[k] > 7) mu[k] = 7;
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
      w2 = '{eta: t[5:3], phi: t[2:0], pt: (ncnt > 2) ? 2'b11 : pt_map[2*(int'(cv[b2].pt)-1) +: 2]};
    end
  endfunction

  // ---------------- parallel checks per crossing ----------------
  // crossing n is captured at the bc edge; mult valid after one more edge,
  // the words after two
  int bc_edge_n = -1;
  logic [31:0] e_cnt [NM][3];
  initial for (int m = 0; m < NM; m++) e_cnt[m] = '{0, 0, 0};
  always @(posedge clk) if (rst_n && bc) bc_edge_n <= bcn - 1;

  always @(negedge clk) begin
    if (rst_n && cyc % 4 == 2 && bc_edge_n >= 0 && mon_on) begin
      // two edges after the bc edge of crossing bc_edge_n
      for (int m = 0; m < NM; m++) begin
        topo_word_t w1, w2;
        int mu [N_THR];
        int nc;
        model(m, bc_edge_n, w1, w2, mu, nc);
        checks += 2;
        if (topo1[m] !== w1 || topo2[m] !== w2) begin
          failures++;
          if (failures < 10) $display("bc %0d octant %0d words %h %h exp %h %h", bc_edge_n, m, topo1[m], topo2[m], w1, w2);
        end
        for (int k = 0; k < N_THR; k++) begin
          checks++;
          if (int'(mult[m][k]) != mu[k]) begin failures++; if (failures < 10) $display("octant %0d mult mismatch", m); end
        end
        n_cases[(nc > 3) ? 3 : nc]++;
        if (nc == 1) e_cnt[m][0]++; else if (nc == 2) e_cnt[m][1]++; else if (nc > 2) e_cnt[m][2]++;
        if (w1.eta == 3'b111) n_none_code++;
        if (w2.pt == 2'b11) n_more_code++;
        for (int i = 0; i < N_CAND; i++) if (veto_hist[m][bc_edge_n][i] && synced(m, i, bc_edge_n).pt != 0) n_veto++;
      end
    end
  end

  // expected serial word of channel c at crossing n
  logic [7:0] exp_tab [NC][$];
  function automatic logic [7:0] exp_word(input int c, input int n);
    if (n >= exp_tab[c].size()) return 8'hxx;
    return exp_tab[c][n];
  endfunction

  // ---------------- memory model ----------------
  logic [MEM_W-1:0] mem [NMEM];
  int n_written = 0, n_stall = 0;
  bit mem_random = 0, mem_block = 0;
  always @(negedge clk) mem_wr_ready <= mem_block ? 1'b0 : mem_random ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) begin
    if (rst_n && mem_wr_en && mem_wr_ready && int'(mem_wr_addr) < NMEM) begin
      mem[mem_wr_addr] <= mem_wr_data;
      n_written <= n_written + 1;
    end
    if (rst_n && mem_wr_en && !mem_wr_ready) n_stall <= n_stall + 1;
  end

  function automatic int margin(input int c, input int q, input int t);
    int d = 1000;
    for (int qq = 0; qq < N_Q; qq++)
      for (int tt = 0; tt < N_TMAX; tt++)
        if (trans_map[c][qq][tt]) begin
          int x;
          x = (((qq * 20 + tt) - (q * 20 + t)) % 40 + 40) % 40;
          if (x > 20) x = 40 - x;
          if (x < d) d = x;
        end
    return d;
  endfunction

  task automatic run_all();
    int best_t, best_m, n_edges;
    int n_off [2] = '{0, 0};
    int n_delay = 0;
    longint t0;
    for (int m = 0; m < NM; m++) begin
      veto_in[m] = '0;
      for (int i = 0; i < N_CAND; i++) cand_in[m][i] = '0;
      for (int s = 0; s < N_SECT; s++) begin
        sync_delay[m][s] = 4'((m + s) % 4);
        if (sync_delay[m][s] != 0) n_delay++;
      end
    end
    for (int c = 0; c < NC; c++) qsel[c] = SEL_Q1Q3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- eta/phi tables of all octants (broadcast) ----
    for (int s = 0; s < N_SECT; s++)
      for (int r = 0; r < 256; r++) begin
        lut_we = 1; lut_sector = SECT_W'(s); lut_roi = ROI_W'(r); lut_wdata = table_val(s, r);
        @(negedge clk);
      end
    lut_we = 0;
    // ---- phase scan while the octants send PRBS ----
    t0 = cyc;
    scan_start = 1; @(negedge clk); scan_start = 0;
    wait (scan_done); @(negedge clk);
    $display("phase scan took %0d cycles", cyc - t0);
    n_edges = 0;
    for (int c = 0; c < NC; c++) for (int q = 0; q < N_Q; q++) n_edges += $countones(trans_map[c][q]);
    best_m = -1; best_t = 0;
    for (int t = 0; t < N_TMAX; t++) begin
      int worst = 1000;
      for (int c = 0; c < NC; c++) begin
        int b = (margin(c, 0, t) > margin(c, 1, t)) ? margin(c, 0, t) : margin(c, 1, t);
        if (b < worst) worst = b;
      end
      if (worst > best_m) begin best_m = worst; best_t = t; end
    end
    for (int c = 0; c < NC; c++) qsel[c] = (margin(c, 1, best_t) > margin(c, 0, best_t)) ? SEL_Q2Q4 : SEL_Q1Q3;
    rx_tap_cfg = 5'(best_t);
    $display("edges found %0d, common tap %0d, worst margin %0d taps", n_edges, best_t, best_m);
    checks += 2;
    if (n_edges == 0) begin failures++; $display("no edges found"); end
    if (best_m < 6) begin failures++; $display("margin too small"); end
    // ---- PRBS error test ----
    repeat (8) @(negedge clk);
    prbs_start = 1; @(negedge clk); prbs_start = 0;
    repeat (4000) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (!prbs_checking[c] || err_cnt[c] != 0 || bit_cnt[c] < 7900) begin
        failures++; $display("channel %0d: %0d errors in %0d bits", c, err_cnt[c], bit_cnt[c]);
      end
    end
    // ---- training and word alignment ----
    ser_mode = SER_TRAIN;
    repeat (16) @(negedge clk);
    align_start = 1; @(negedge clk); align_start = 0;
    repeat (64) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (!locked[c]) begin failures++; $display("channel %0d not locked", c); end
      n_off[offset[c]]++;
    end
    // ---- data ----
    wait (cyc % 4 == 1); @(negedge clk);
    cnt_clr = 1; mon_on = 1; @(negedge clk); cnt_clr = 0;
    ser_mode = SER_DATA;
    wait (cyc % 4 == 0); @(negedge clk);
    data_on = 1;
    repeat (40) @(negedge clk);
    mem_random = 1;
    mem_n_words = 25'(NMEM);
    mem_start = 1; @(negedge clk); mem_start = 0;
    wait (mem_done);
    repeat (4 * NBC - 40 - (n_written * 8)) @(negedge clk);
    data_on = 0;
    repeat (40) @(negedge clk);
    mon_on = 0;
    repeat (4) @(negedge clk);
    // expected words of every channel and crossing
    for (int n = 0; n < bcn; n++)
      for (int m = 0; m < NM; m++) begin
        topo_word_t w1, w2;
        int mu [N_THR];
        int nc;
        model(m, n, w1, w2, mu, nc);
        exp_tab[2*m].push_back(w1);
        exp_tab[2*m+1].push_back(w2);
      end
    // ---- compare the memory with the reference ----
    for (int c = 0; c < NC; c++) begin
      int base = -1;
      // find the crossing of the first stored word of this channel
      for (int n = 0; n < bcn && base < 0; n++) begin
        bit ok = 1;
        for (int a = 0; a < 8 && ok; a++) begin
          if (mem[a][8*c +: 8] !== exp_word(c, n + 2*a)) ok = 0;
          if (mem[a][256 + 8*c +: 8] !== exp_word(c, n + 2*a + 1)) ok = 0;
        end
        if (ok) base = n;
      end
      checks++;
      if (base < 0) begin failures++; $display("channel %0d: stored words match no crossing", c); continue; end
      for (int a = 0; a < NMEM; a++) begin
        checks += 2;
        if (mem[a][8*c +: 8] !== exp_word(c, base + 2*a)) begin failures++; if (failures < 10) $display("ch %0d addr %0d lo", c, a); end
        if (mem[a][256 + 8*c +: 8] !== exp_word(c, base + 2*a + 1)) begin failures++; if (failures < 10) $display("ch %0d addr %0d hi", c, a); end
      end
    end
    // ---- monitoring counters ----
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (cnt_one[m] != e_cnt[m][0] || cnt_two[m] != e_cnt[m][1] || cnt_more[m] != e_cnt[m][2]) begin
        failures++; $display("octant %0d counters %0d %0d %0d exp %0d %0d %0d", m, cnt_one[m], cnt_two[m], cnt_more[m],
                             e_cnt[m][0], e_cnt[m][1], e_cnt[m][2]);
      end
    end
    // ---- overflow: memory stops accepting ----
    mem_block = 1; data_on = 1;
    mem_n_words = 25'd8;
    mem_start = 1; @(negedge clk); mem_start = 0;
    repeat (64) @(negedge clk);
    data_on = 0; mem_block = 0;
    // ---- every mechanism must have happened ----
    $display("vetoed %0d; crossings with 0/1/2/>2 candidates %0d/%0d/%0d/%0d; no-candidate codes %0d; more-than-two codes %0d",
             n_veto, n_cases[0], n_cases[1], n_cases[2], n_cases[3], n_none_code, n_more_code);
    $display("sync delays set %0d; word offsets 0/1: %0d/%0d; memory stalls %0d; overflow %0d; memory words %0d",
             n_delay, n_off[0], n_off[1], n_stall, mem_overflow, n_written);
    checks += 11;
    if (n_veto == 0) begin failures++; $display("no veto"); end
    for (int k = 0; k < 4; k++) if (n_cases[k] == 0) begin failures++; $display("no crossing with %0d candidates", k); end
    if (n_none_code == 0) begin failures++; $display("no empty code"); end
    if (n_more_code == 0) begin failures++; $display("no more-than-two code"); end
    if (n_delay == 0) begin failures++; $display("no sync delay"); end
    if (n_off[0] == 0 || n_off[1] == 0) begin failures++; $display("one alignment offset never used"); end
    if (n_stall == 0) begin failures++; $display("memory never stalled"); end
    if (!mem_overflow) begin failures++; $display("no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial run_all();
endmodule
