// tb_phase_scan_ctrl: one scan with small settle/dwell counts. Checks the
// order of the 40 recorded steps (stage 0 taps 0..19, then stage 1), that the
// tap is stable while measuring, the detector clear precedes each
// measurement, the dwell length, and the total scan time.
module tb_phase_scan_ctrl;
  import ber_pkg::*;
  localparam int SETTLE = 3, DWELL = 7, TMAX = N_TMAX;
  logic clk = 0, rst_n = 0, start = 0;
  logic [TAP_W-1:0] tap, rec_tap;
  logic stage, det_clr, det_en, rec, rec_stage, busy, done;
  int checks = 0, failures = 0;

  phase_scan_ctrl #(.TMAX(TMAX), .SETTLE(SETTLE), .DWELL(DWELL)) dut (.*);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int nrec = 0, en_run = 0, cycles = 0;
    bit cleared = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      cycles++;
      if (det_clr) cleared = 1;
      if (det_en) begin
        en_run++;
        checks++;
        if (!cleared || int'(tap) != nrec % TMAX || stage != (nrec >= TMAX)) begin
          failures++; if (failures < 10) $display("measure step %0d tap %0d stage %0d", nrec, tap, stage);
        end
      end
      if (rec) begin
        checks += 2;
        if (int'(rec_tap) != nrec % TMAX || rec_stage != (nrec >= TMAX)) begin
          failures++; $display("record %0d: tap %0d stage %0d", nrec, rec_tap, rec_stage);
        end
        if (en_run != DWELL) begin failures++; $display("dwell %0d", en_run); end
        en_run = 0; cleared = 0; nrec++;
      end
      @(negedge clk);
    end
    checks += 3;
    if (nrec != 2 * TMAX) begin failures++; $display("records %0d", nrec); end
    if (cycles != 2 * TMAX * (SETTLE + 1 + DWELL + 1)) begin failures++; $display("scan took %0d cycles", cycles); end
    @(negedge clk);
    if (busy) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
