// tb_mem_interface: 32 channels of known words per crossing; the memory model
// accepts requests with random back-pressure. Every written 512-bit word must
// hold two consecutive crossings in the documented layout at consecutive
// addresses; done must come after n_words writes. A second capture with the
// memory stalled checks that overflow is raised.
module tb_mem_interface;
  import ber_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, frame = 0, wr_ready = 1;
  logic [MEM_AW:0] n_words = '0;
  logic [WORD_W-1:0] words [N_CH];
  logic wr_en, busy, done, overflow;
  logic [MEM_AW-1:0] wr_addr;
  logic [MEM_W-1:0] wr_data;
  int checks = 0, failures = 0;

  mem_interface dut (.*);

  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [7:0] wval(input int bcn, input int c);
    return 8'((bcn * 29 + c * 7 + (bcn >> 3)) & 8'hFF);
  endfunction

  int bcn = 0;
  int first_bc = -1;
  int nwr = 0;
  int bc_of_frame [$];

  // crossing counter and frames; words change right after each frame
  initial begin
    for (int c = 0; c < N_CH; c++) words[c] = wval(0, c);
    forever begin
      @(negedge clk) frame = 1;
      @(negedge clk) frame = 0;
      bcn++;
      for (int c = 0; c < N_CH; c++) words[c] = wval(bcn, c);
      repeat (2) @(negedge clk);
    end
  end

  logic ready_random = 1;
  always @(negedge clk) wr_ready <= ready_random ? ($urandom_range(0, 2) != 0) : 1'b0;

  int base_bc;
  always @(posedge clk) begin
    if (start) base_bc <= -1;
    if (frame && busy && base_bc < 0) base_bc <= bcn;
    if (rst_n && wr_en && wr_ready) begin
      int b;
      b = base_bc + 2 * int'(wr_addr);
      checks++;
      if (int'(wr_addr) != nwr) begin failures++; $display("address %0d exp %0d", wr_addr, nwr); end
      for (int c = 0; c < N_CH; c++) begin
        checks += 2;
        if (wr_data[8*c +: 8] !== wval(b, c)) begin failures++; if (failures < 10) $display("addr %0d ch %0d lo %h", wr_addr, c, wr_data[8*c +: 8]); end
        if (wr_data[256 + 8*c +: 8] !== wval(b + 1, c)) begin failures++; if (failures < 10) $display("addr %0d ch %0d hi", wr_addr, c); end
      end
      nwr <= nwr + 1;
    end
  end

  initial begin
    int got_done = 0;
    base_bc = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n_words = 25'd100;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    fork
      begin wait (done); got_done = 1; end
      begin repeat (2000) @(negedge clk); end
    join_any
    disable fork;
    repeat (10) @(negedge clk);
    checks += 3;
    if (!got_done) begin failures++; $display("no done"); end
    if (nwr != 100) begin failures++; $display("%0d writes", nwr); end
    if (overflow) begin failures++; $display("unexpected overflow"); end
    // stalled memory: overflow
    ready_random = 0;
    n_words = 25'd10;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("overflow not raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
