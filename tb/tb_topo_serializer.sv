// tb_topo_serializer: data mode (random words, MSB first, two bits per cycle,
// first bits on the edge after the load), training mode (FE, 01, FE, ...) and
// PRBS mode (the output stream obeys b[n] = b[n-31] ^ b[n-28]).
// The output is sampled at every rising edge, before that edge's update.
module tb_topo_serializer;
  import muctpi_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] word_in = '0;
  ser_mode_e mode = SER_DATA;
  logic [1:0] dout;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit stream [$];
  int load_pos [$];

  topo_serializer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin wait (cyc == 20000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) begin
    if (load) load_pos.push_back(stream.size());
    stream.push_back(dout[1]);
    stream.push_back(dout[0]);
  end

  task automatic bc_cycle(input logic [7:0] w);
    @(negedge clk); load = 1; word_in = w;
    @(negedge clk); load = 0;
    repeat (2) @(negedge clk);
  endtask

  // word loaded at edge with stream position p is sampled from p+4 on
  function automatic logic [7:0] word_at(input int p);
    logic [7:0] r;
    for (int b = 0; b < 8; b++) r[7-b] = stream[p + 4 + b];
    return r;
  endfunction

  initial begin
    logic [7:0] w [200];
    int first_load, start;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // data mode
    first_load = load_pos.size();
    for (int i = 0; i < 200; i++) begin w[i] = 8'($urandom); bc_cycle(w[i]); end
    repeat (4) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      checks++;
      if (word_at(load_pos[first_load + i]) !== w[i]) begin
        failures++;
        if (failures < 10) $display("data word %0d: %h exp %h", i, word_at(load_pos[first_load + i]), w[i]);
      end
    end
    // training mode
    mode = SER_TRAIN;
    first_load = load_pos.size();
    for (int i = 0; i < 20; i++) bc_cycle(8'h00);
    for (int i = 0; i < 19; i++) begin
      checks++;
      if (word_at(load_pos[first_load + i]) !== ((i % 2) ? TRAIN_PATTERN[7:0] : TRAIN_PATTERN[15:8])) begin
        failures++; $display("train byte %0d = %h", i, word_at(load_pos[first_load + i]));
      end
    end
    // PRBS mode
    mode = SER_PRBS;
    start = stream.size() + 4;
    repeat (400) bc_cycle(8'h00);
    for (int n = start + 31; n < stream.size(); n++) begin
      checks++;
      if (stream[n] !== (stream[n-31] ^ stream[n-28])) begin
        failures++;
        if (failures < 10) $display("prbs bit %0d breaks the recurrence", n);
      end
    end
    begin
      int ones = 0;
      for (int n = start; n < stream.size(); n++) ones += stream[n];
      checks++;
      if (ones < 1300 || ones > 1900) begin failures++; $display("prbs ones = %0d", ones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
