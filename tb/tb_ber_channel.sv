// tb_ber_channel: one receiver channel behind a behavioural cable/delay-line
// model with an unknown skew. The test drives the phase scan steps itself,
// then checks the 80-point transition map against where the bit edges lie,
// picks the sampling point farthest from the edges (as the control software
// would), counts PRBS-31 errors (none on a clean link, exactly the injected
// ones otherwise), and recovers topological words after word alignment.
module tb_ber_channel;
  import ber_pkg::*;
  import muctpi_pkg::TRAIN_PATTERN;
  localparam longint SKEW = 2 * 50000 + 9100, JIT = 800;
  localparam int DW = 64;
  logic clk = 0, rst_n = 0;
  logic [1:0] tx = '0;
  logic [4:0] tap_m = '0, tap_s = 5'd1;
  logic [3:0] master, slave;
  logic det_clr = 0, det_en = 0, stage = 0, rec = 0, rec_stage = 0;
  logic [TAP_W-1:0] rec_tap = '0;
  logic [N_TMAX-1:0] trans_map [N_Q];
  qsel_e qsel = SEL_Q1Q3;
  logic prbs_start = 0, align_start = 0, prbs_checking, locked, offset, word_valid;
  logic [31:0] err_cnt;
  logic [47:0] bit_cnt;
  logic [WORD_W-1:0] word;
  int checks = 0, failures = 0;
  int cyc = 0;

  rx_frontend_model #(.SKEW(SKEW), .JITTER(JIT)) fe (
    .clk, .tx, .tap_master(tap_m), .tap_slave(tap_s), .master, .slave);

  ber_channel dut (
    .clk, .rst_n, .master, .slave, .det_clr, .det_en, .stage, .rec, .rec_stage, .rec_tap,
    .trans_map, .qsel, .prbs_start, .align_start, .prbs_checking, .err_cnt, .bit_cnt,
    .locked, .offset, .word, .word_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin wait (cyc == 60000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // transmitter: 0 random bits, 1 PRBS-31, 2 words from a queue
  int src = 0;
  bit prbs [$];
  int prbs_pos = 0;
  int flip_every = 0, flipped = 0;
  bit wbits [$];
  always @(negedge clk) begin
    logic [1:0] d;
    if (src == 1) begin
      while (prbs.size() < prbs_pos + 4) prbs.push_back(prbs[prbs.size()-31] ^ prbs[prbs.size()-28]);
      d = {prbs[prbs_pos], prbs[prbs_pos+1]};
      prbs_pos += 2;
      if (flip_every > 0 && prbs_pos % flip_every == 0) begin d[0] ^= 1'b1; flipped++; end
    end else if (src == 2 && wbits.size() >= 2) begin
      d[1] = wbits.pop_front(); d[0] = wbits.pop_front();
    end else d = 2'($urandom);
    tx <= d;
  end

  // expected edge dstance of map point p (master sample time, 1/8 ps, mod bit)
  function automatic longint pt_time(input int q, input int t);
    longint v;
    v = longint'(q) * 12500 + longint'(t) * 625 - SKEW;
    return ((v % 25000) + 25000) % 25000;
  endfunction

  task automatic run_all();
    int best_q, best_t;
    longint best_d;
    for (int i = 0; i < 31; i++) prbs.push_back(1'b1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- phase scan ----
    for (int st = 0; st < 2; st++)
      for (int t = 0; t < N_TMAX; t++) begin
        stage = 1'(st); tap_m = 5'(t); tap_s = 5'(t + 1);
        repeat (4) @(negedge clk);
        det_clr = 1; @(negedge clk); det_clr = 0;
        det_en = 1; repeat (DW) @(negedge clk); det_en = 0;
        rec = 1; rec_stage = 1'(st); rec_tap = 5'(t); @(negedge clk); rec = 0;
      end
    // ---- compare the map with the edge positions ----
    for (int q = 0; q < N_Q; q++)
      for (int t = 0; t < N_TMAX; t++) begin
        longint a, dst;
        a = pt_time(q, t);
        // edge lies between master (a) and slave (a + 625) samples, clear of the random zone
        if (a > 25000 - 625 + JIT && a < 25000 - JIT) begin
          checks++;
          if (!trans_map[q][t]) begin failures++; $display("edge missed at Q%0d tap %0d", q + 1, t); end
        end
        dst = (a < 25000 - a) ? a : 25000 - a;
        if (dst > 625 + JIT + 100 && 25000 - a > 625 + JIT + 100) begin
          checks++;
          if (trans_map[q][t]) begin failures++; $display("false edge at Q%0d tap %0d", q + 1, t); end
        end
      end
    // ---- software: choose the sample pair and tap farthest from any edge ----
    best_d = -1; best_q = 0; best_t = 0;
    for (int q = 0; q < 2; q++)
      for (int t = 0; t < N_TMAX; t++) begin
        longint d = 1000000;
        for (int qq = 0; qq < N_Q; qq++)
          for (int tt = 0; tt < N_TMAX; tt++)
            if (trans_map[qq][tt]) begin
              longint x = ((longint'(qq * 20 + tt) - longint'(q * 20 + t)) % 40 + 40) % 40;
              if (x > 20) x = 40 - x;
              if (x < d) d = x;
            end
        if (d > best_d) begin best_d = d; best_q = q; best_t = t; end
      end
    $display("sampling at Q%0d/Q%0d tap %0d, %0d taps from the nearest edge", best_q + 1, best_q + 3, best_t, best_d);
    checks++;
    if (best_d < 12) begin failures++; $display("eye too small"); end
    qsel = qsel_e'(best_q); tap_m = 5'(best_t); tap_s = 5'(best_t + 1);
    // ---- PRBS: clean link ----
    src = 1;
    repeat (10) @(negedge clk);
    prbs_start = 1; @(negedge clk); prbs_start = 0;
    repeat (3000) @(negedge clk);
    checks += 3;
    if (!prbs_checking) begin failures++; $display("PRBS checker not running"); end
    if (err_cnt != 0) begin failures++; $display("%0d errors on a clean link", err_cnt); end
    if (bit_cnt < 5900) begin failures++; $display("only %0d bits checked", bit_cnt); end
    // ---- PRBS with injected errors ----
    flipped = 0; flip_every = 202;
    prbs_start = 1; @(negedge clk); prbs_start = 0;
    flipped = 0;
    repeat (3000) @(negedge clk);
    flip_every = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (err_cnt != 32'(flipped) && err_cnt != 32'(flipped - 1)) begin
      failures++; $display("errors %0d, injected %0d", err_cnt, flipped);
    end
    // ---- word alignment and topological words ----
    begin
      logic [7:0] sent [$];
      int got = 0, nvalid = 0;
      for (int i = 0; i < 8; i++) for (int b = 15; b >= 0; b--) wbits.push_back(TRAIN_PATTERN[b]);
      for (int i = 0; i < 200; i++) begin
        logic [7:0] w = 8'($urandom);
        sent.push_back(w);
        for (int b = 7; b >= 0; b--) wbits.push_back(w[b]);
      end
      src = 2;
      @(negedge clk);
      align_start = 1; @(negedge clk); align_start = 0;
      while (wbits.size() > 0 || got < 1) begin
        @(negedge clk);
        if (word_valid) begin
          nvalid++;
          if (nvalid > 12 && got == 0 && word != TRAIN_PATTERN[15:8] && word != TRAIN_PATTERN[7:0]) got = 1;
          if (got > 0) begin
            if (got <= sent.size()) begin
              checks++;
              if (word !== sent[got - 1]) begin failures++; if (failures < 10) $display("word %0d = %h exp %h", got - 1, word, sent[got - 1]); end
            end
            got++;
          end
        end
      end
      repeat (40) @(negedge clk);
      checks += 2;
      if (!locked) begin failures++; $display("aligner not locked"); end
      if (got < 190) begin failures++; $display("only %0d words", got); end
      $display("word offset %0d, %0d words", offset, got - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial run_all();
endmodule
