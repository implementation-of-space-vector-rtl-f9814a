// tb_svm_blanking -- dead-time generator with random switching states.
//
// Each phase's state is held for a random 1..400 clocks.  With a tick every
// 18 clocks and a threshold of 7 ticks a gate may turn on only after its
// state has been steady for 109 clock edges and must be on after 126; the
// opposite gate is off from the first edge that sees the new state.  So both
// gates of a leg are off for at least 108 clocks (2.16 us at 50 MHz, never
// below the 2 us aimed at), and never on together.  The testbench also counts
// the dead-time intervals it saw and their shortest length.
module tb_svm_blanking;
  logic clk = 0, rst_n = 0;
  logic [2:0] s = 3'b000;                // {c, b, a}
  logic saup, salow, sbup, sblow, scup, sclow;
  logic [2:0] up, low;
  int checks = 0, failures = 0;

  svm_blanking dut (.clk(clk), .rst_n(rst_n), .sa(s[0]), .sb(s[1]), .sc(s[2]),
    .saup(saup), .salow(salow), .sbup(sbup), .sblow(sblow), .scup(scup), .sclow(sclow));

  assign up  = {scup, sbup, saup};
  assign low = {sclow, sblow, salow};

  always #10 clk = ~clk;

  initial begin
    int run [3], hold [3], dead [3], min_dead, n_dead;
    logic prev [3];
    prev = '{1'b0, 1'b0, 1'b0};
    run = '{0, 0, 0}; hold = '{1, 1, 1}; dead = '{0, 0, 0};
    min_dead = 1 << 30; n_dead = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 60000; i++) begin
      for (int k = 0; k < 3; k++) begin
        hold[k]--;
        if (hold[k] == 0) begin
          s[k] = ~s[k];
          hold[k] = 1 + int'($urandom % 400);
        end
      end
      @(posedge clk);
      // run[k]: clock edges at which phase k's state has been steady
      for (int k = 0; k < 3; k++) begin
        run[k] = (s[k] == prev[k]) ? run[k] + 1 : 1;
        prev[k] = s[k];
      end
      #1;
      for (int k = 0; k < 3; k++) begin
        logic g_on, g_off;
        g_on  = s[k] ? up[k] : low[k];   // gate that the state asks for
        g_off = s[k] ? low[k] : up[k];   // the opposite gate
        checks += 3;
        if (up[k] && low[k]) begin failures++; $display("FAIL shoot-through phase %0d", k); end
        if (g_off) begin failures++; $display("FAIL phase %0d opposite gate still on", k); end
        if (run[k] < 109 && g_on) begin failures++; $display("FAIL phase %0d gate on after %0d clocks", k, run[k]); end
        if (run[k] >= 126 && !g_on) begin failures++; $display("FAIL phase %0d gate off after %0d clocks", k, run[k]); end
        if (!up[k] && !low[k]) dead[k]++;
        else if (dead[k] > 0) begin
          if (dead[k] < min_dead) min_dead = dead[k];
          n_dead++;
          dead[k] = 0;
        end
      end
      @(negedge clk);
    end
    $display("dead-time intervals seen: %0d, shortest %0d clocks", n_dead, min_dead);
    checks++;
    if (n_dead < 10 || min_dead < 108) begin failures++; $display("FAIL dead-time statistics"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
