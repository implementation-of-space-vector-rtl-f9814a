// tb_svm_blanking_div -- the blanking tick must be one clock wide and come
// every 18 clocks (the first 17 edges after reset); a second instance checks
// DIV = 5.
module tb_svm_blanking_div;
  logic clk = 0, rst_n = 0, tick, tick5;
  int checks = 0, failures = 0;

  svm_blanking_div dut (.clk(clk), .rst_n(rst_n), .tick(tick));
  svm_blanking_div #(.DIV(5)) dut5 (.clk(clk), .rst_n(rst_n), .tick(tick5));

  always #10 clk = ~clk;

  initial begin
    int since, since5, n, n5;
    repeat (2) @(negedge clk);
    rst_n = 1;
    since = 0; since5 = 0; n = 0; n5 = 0;
    for (int i = 0; i < 18 * 50; i++) begin
      @(posedge clk);
      since++; since5++;
      #1;
      if (tick) begin
        checks++;
        if (since != ((n == 0) ? 17 : 18)) begin failures++; $display("FAIL tick after %0d", since); end
        since = 0; n++;
      end
      if (tick5) begin
        checks++;
        if (since5 != ((n5 == 0) ? 4 : 5)) begin failures++; $display("FAIL tick5 after %0d", since5); end
        since5 = 0; n5++;
      end
    end
    checks++;
    if (n != 50) begin failures++; $display("FAIL %0d ticks", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
