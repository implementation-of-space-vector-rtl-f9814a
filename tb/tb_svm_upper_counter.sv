// tb_svm_upper_counter -- random switching states and ticks; each phase's
// count must equal the number of ticks seen since its state last became 1
// (0 while the state is 0), saturating at 2^CW-1.  A small CW = 4 instance
// checks the saturation.
module tb_svm_upper_counter;
  localparam int CW = 13;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [2:0] clear = 0;
  logic [3*CW-1:0] uc;
  logic [11:0] uc4;
  int checks = 0, failures = 0;

  svm_upper_counter dut (.clk(clk), .rst_n(rst_n), .tick(tick), .clear(clear), .uc(uc));
  svm_upper_counter #(.CW(4)) dut4 (.clk(clk), .rst_n(rst_n), .tick(tick), .clear(clear), .uc(uc4));

  always #10 clk = ~clk;

  initial begin
    int m [3], m4 [3], sat;
    m = '{0, 0, 0}; m4 = '{0, 0, 0}; sat = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      // long runs so the 4-bit counters saturate now and then
      if ($urandom % 40 == 0) clear[$urandom % 3] ^= 1'b1;
      tick = ($urandom % 3) == 0;
      @(posedge clk);
      for (int k = 0; k < 3; k++) begin
        if (!clear[k]) begin m[k] = 0; m4[k] = 0; end
        else if (tick) begin
          if (m[k] < 8191) m[k]++;
          if (m4[k] < 15) m4[k]++; else sat++;
        end
      end
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        checks += 2;
        if (int'(uc[k*CW +: CW]) != m[k]) begin
          failures++;
          if (failures < 10) $display("FAIL phase %0d count %0d exp %0d", k, uc[k*CW +: CW], m[k]);
        end
        if (int'(uc4[k*4 +: 4]) != m4[k]) begin
          failures++;
          if (failures < 10) $display("FAIL CW=4 phase %0d count %0d exp %0d", k, uc4[k*4 +: 4], m4[k]);
        end
      end
    end
    checks++;
    if (sat == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
