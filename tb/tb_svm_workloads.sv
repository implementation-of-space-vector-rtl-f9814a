// tb_svm_workloads -- output-voltage sweep of the live modulator.
//
// Runs the modulator at the two carrier frequencies 1 kHz (HALF_PERIOD 25000)
// and 2.55 kHz (HALF_PERIOD 9804, 2549.98 Hz) of a 50 MHz clock with a 50 Hz
// reference of magnitude M*Vdc/sqrt(3), M = 0.2, 0.4, 0.6, 0.8, 1.0, and
// Vdc = 100 V.  For each case the 50 Hz component of the phase voltage
// v_an = Vdc/3 (2Sa - Sb - Sc) over one 20 ms cycle must equal M*Vdc/sqrt(3)
// (11.55, 23.09, 34.64, 46.19, 57.74 V) within 2 %.  The RMS value
// (amplitude/sqrt(2)) is printed alongside.
module tb_svm_workloads;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  localparam real VDC = 100.0;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] vd = 0, vq = 0;
  logic a1, b1, c1, a2, b2, c2, ps1, ps2, o1, o2;
  sector_t sec1, sec2;
  int checks = 0, failures = 0;

  svm_modulator #(.HALF_PERIOD(25000)) u_1k (
    .clk(clk), .rst_n(rst_n), .vd(vd), .vq(vq), .sa(a1), .sb(b1), .sc(c1),
    .sector(sec1), .period_start(ps1), .ovm(o1));
  svm_modulator #(.HALF_PERIOD(9804)) u_2k55 (
    .clk(clk), .rst_n(rst_n), .vd(vd), .vq(vq), .sa(a2), .sb(b2), .sc(c2),
    .sector(sec2), .period_start(ps2), .ovm(o2));

  always #10 clk = ~clk;

  initial begin
    real mag, th, v1, v2, re1, im1, re2, im2, amp1, amp2, expv, t;
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 1; m <= 5; m++) begin
      mag = 0.2 * m / $sqrt(3.0);
      re1 = 0; im1 = 0; re2 = 0; im2 = 0; n = 0;
      for (int i = 0; i < 1100000; i++) begin
        th = 2.0 * PI * 50.0 * (i * 20.0e-9);
        vd = 16'(int'(mag * $cos(th) * 32768.0));
        vq = 16'(int'(mag * $sin(th) * 32768.0));
        @(negedge clk);
        if (i >= 100000 && i % 50 == 0) begin
          t  = i * 20.0e-9;
          v1 = VDC / 3.0 * (2.0 * a1 - b1 - c1);
          v2 = VDC / 3.0 * (2.0 * a2 - b2 - c2);
          re1 += v1 * $cos(2.0 * PI * 50.0 * t); im1 += v1 * $sin(2.0 * PI * 50.0 * t);
          re2 += v2 * $cos(2.0 * PI * 50.0 * t); im2 += v2 * $sin(2.0 * PI * 50.0 * t);
          n++;
        end
      end
      amp1 = 2.0 / n * $sqrt(re1 * re1 + im1 * im1);
      amp2 = 2.0 / n * $sqrt(re2 * re2 + im2 * im2);
      expv = 0.2 * m * VDC / $sqrt(3.0);
      $display("M=%.1f  expected %.3f V | 1 kHz: %.3f V (rms %.3f) | 2.55 kHz: %.3f V (rms %.3f)",
               0.2 * m, expv, amp1, amp1 / $sqrt(2.0), amp2, amp2 / $sqrt(2.0));
      checks += 2;
      if (amp1 < 0.98 * expv || amp1 > 1.02 * expv) begin failures++; $display("FAIL 1 kHz M=%.1f", 0.2 * m); end
      if (amp2 < 0.98 * expv || amp2 > 1.02 * expv) begin failures++; $display("FAIL 2.55 kHz M=%.1f", 0.2 * m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
