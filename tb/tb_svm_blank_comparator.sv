// tb_svm_blank_comparator -- random counts around the threshold: each gate
// must be on exactly when its count is at least BLANK_TICKS (7 by default,
// 3 in a second instance).
module tb_svm_blank_comparator;
  localparam int CW = 13;
  logic [3*CW-1:0] uc, lc;
  logic [2:0] up, low, up3, low3;
  int checks = 0, failures = 0;

  svm_blank_comparator dut (.uc(uc), .lc(lc), .up(up), .low(low));
  svm_blank_comparator #(.BLANK_TICKS(3)) dut3 (.uc(uc), .lc(lc), .up(up3), .low(low3));

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int u [3], l [3];
      for (int k = 0; k < 3; k++) begin
        u[k] = ($urandom % 2) ? int'($urandom % 12) : int'($urandom % 8192);
        l[k] = ($urandom % 2) ? int'($urandom % 12) : int'($urandom % 8192);
        uc[k*CW +: CW] = CW'(u[k]);
        lc[k*CW +: CW] = CW'(l[k]);
      end
      #1;
      for (int k = 0; k < 3; k++) begin
        checks += 4;
        if (up[k]   != (u[k] >= 7)) failures++;
        if (low[k]  != (l[k] >= 7)) failures++;
        if (up3[k]  != (u[k] >= 3)) failures++;
        if (low3[k] != (l[k] >= 3)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
