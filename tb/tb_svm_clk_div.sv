// tb_svm_clk_div -- the sample strobe must be one clock wide and come every
// 250 clocks (200 kHz from 50 MHz); the first comes in the 250th clock after
// reset (249 edges after its release).
module tb_svm_clk_div;
  logic clk = 0, rst_n = 0, clkout;
  int checks = 0, failures = 0;

  svm_clk_div dut (.clk(clk), .rst_n(rst_n), .clkout(clkout));

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    int since, pulses;
    repeat (2) @(negedge clk);
    rst_n = 1;
    since = 0; pulses = 0;
    for (int i = 0; i < 250 * 40; i++) begin
      @(posedge clk);
      since++;
      #1;
      if (clkout) begin
        checks++;
        if (since != ((pulses == 0) ? 249 : 250)) begin
          failures++;
          $display("FAIL strobe after %0d clocks", since);
        end
        since = 0;
        pulses++;
      end
    end
    checks++;
    if (pulses != 40) begin failures++; $display("FAIL %0d strobes", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
