// tb_svm_switch_states -- checks the carrier and the comparators.
//
// With HALF_PERIOD = 20 the carrier must read 20, 19, ..., 1, 1, 2, ..., 20
// over a 40-clock period, starting at the peak.  For random levels
// c1 >= c2 >= c3 each s_k must be high for exactly 2*c_k clocks of a period,
// the period must open and close with 000, the pattern must be symmetric, and
// levels changed in the middle of a period must only take effect at the next
// period (load in the last clock of a period).
module tb_svm_switch_states;
  localparam int H = 20;
  localparam int W = $clog2(2 * H);

  logic clk = 0, rst_n = 0;
  logic [W-1:0] c1, c2, c3, tri_val;
  logic s1, s2, s3, load, start;
  int checks = 0, failures = 0;

  svm_switch_states #(.HALF_PERIOD(H)) dut (
    .clk(clk), .rst_n(rst_n), .c1(c1), .c2(c2), .c3(c3),
    .s1(s1), .s2(s2), .s3(s3), .tri_val(tri_val), .load(load), .start(start));

  always #5 clk = ~clk;

  task automatic fail(string m);
    failures++;
    $display("FAIL %s at %0t", m, $time);
  endtask

  initial begin
    int n1, n2, n3;
    logic [2:0] pat [2*H];
    int a, b, c;
    c1 = 0; c2 = 0; c3 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // align to a period start
    while (!start) @(negedge clk);
    // carrier shape
    for (int i = 0; i < 2 * H; i++) begin
      int exp;
      exp = (i < H) ? H - i : i - H + 1;
      checks++;
      if (int'(tri_val) != exp) fail($sformatf("carrier %0d exp %0d", tri_val, exp));
      checks++;
      if (load != (i == 2 * H - 1)) fail("load timing");
      @(negedge clk);
    end
    for (int r = 0; r < 60; r++) begin
      a = $urandom % (H + 1); b = $urandom % (a + 1); c = $urandom % (b + 1);
      if (r == 0) begin a = H; b = H; c = H; end
      if (r == 1) begin a = 0; b = 0; c = 0; end
      c1 = W'(a); c2 = W'(b); c3 = W'(c);
      // wait for the period that uses these levels
      @(negedge clk);
      while (!start) @(negedge clk);
      n1 = 0; n2 = 0; n3 = 0;
      for (int i = 0; i < 2 * H; i++) begin
        n1 += s1; n2 += s2; n3 += s3;
        pat[i] = {s1, s2, s3};
        if (i == H / 2) begin
          // disturb the levels mid-period: must not matter now
          c1 = W'($urandom % (H + 1)); c2 = 0; c3 = 0;
        end
        @(negedge clk);
      end
      c1 = W'(a); c2 = W'(b); c3 = W'(c);
      checks += 3;
      if (n1 != 2 * a) fail($sformatf("s1 on %0d exp %0d", n1, 2 * a));
      if (n2 != 2 * b) fail($sformatf("s2 on %0d exp %0d", n2, 2 * b));
      if (n3 != 2 * c) fail($sformatf("s3 on %0d exp %0d", n3, 2 * c));
      checks++;
      if (a < H && (pat[0] != 3'b000 || pat[2*H-1] != 3'b000)) fail("period must open and close with 000");
      for (int i = 0; i < H; i++) begin
        checks++;
        if (pat[i] != pat[2*H-1-i]) fail("pattern not symmetric");
      end
      // wait out the disturbed period with the real levels restored
      @(negedge clk);
      while (!start) @(negedge clk);
    end
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
