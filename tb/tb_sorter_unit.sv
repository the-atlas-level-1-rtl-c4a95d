// tb_sorter_unit: the parallel sorter against a sequential reference that
// scans the candidates in index order keeping the best two (ties go to the
// lower index). Cases include all empty, a single candidate, many equal pT
// values and fully random sets.
module tb_sorter_unit;
  import muctpi_pkg::*;
  cand_t cand [N_CAND];
  sorted_cand_t first, second;
  ncand_e ncand;
  logic [N_CAND-1:0] win1, win2;
  int checks = 0, failures = 0;

  sorter_unit dut (.*);

  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check_one(input int t);
    int b1, b2, n;
    b1 = -1; b2 = -1; n = 0;
    for (int i = 0; i < N_CAND; i++) begin
      if (cand[i].pt != 0) n++;
      if (b1 < 0 || cand[i].pt > cand[b1].pt) begin b2 = b1; b1 = i; end
      else if (b2 < 0 || cand[i].pt > cand[b2].pt) b2 = i;
    end
    #1;
    checks++;
    if (win1 != (N_CAND'(1) << b1) || win2 != (N_CAND'(1) << b2)) begin
      failures++;
      if (failures < 10) $display("t=%0d winners got %h/%h exp %0d/%0d", t, win1, win2, b1, b2);
    end
    checks++;
    if (first.valid != (cand[b1].pt != 0) || (first.valid && (first.pt != cand[b1].pt ||
        first.roi != cand[b1].roi || first.sector != SECT_W'(b1 / 2)))) begin
      failures++;
      if (failures < 10) $display("t=%0d first wrong %p", t, first);
    end
    checks++;
    if (second.valid != (cand[b2].pt != 0) || (second.valid && (second.pt != cand[b2].pt ||
        second.roi != cand[b2].roi || second.sector != SECT_W'(b2 / 2)))) begin
      failures++;
      if (failures < 10) $display("t=%0d second wrong %p", t, second);
    end
    checks++;
    if (int'(ncand) != ((n > 3) ? 3 : n)) begin
      failures++;
      if (failures < 10) $display("t=%0d ncand %0d exp %0d", t, ncand, n);
    end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int mode;
      mode = t % 4;
      for (int i = 0; i < N_CAND; i++) begin
        cand[i].roi = ROI_W'($urandom);
        case (mode)
          0: cand[i].pt = ($urandom_range(0, 9) == 0) ? PT_W'($urandom_range(1, 6)) : '0;
          1: cand[i].pt = PT_W'($urandom_range(0, 6));
          2: cand[i].pt = PT_W'($urandom_range(5, 6));
          default: cand[i].pt = (t < 8) ? '0 : PT_W'($urandom_range(0, 2));
        endcase
      end
      check_one(t);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
