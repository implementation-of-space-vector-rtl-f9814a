// tb_svm_on_time -- checks the on-time calculation against floating point.
//
// 1. The worked example v* = 45 V at -130 degrees with Vdc = 100 V (sector 4,
//    theta_sec = 10 degrees): ta = 597.07 us, tb = 135.346 us,
//    tz = 267.584 us of T = 1 ms.
// 2. 3000 random references inside the inscribed circle (|v| <= 1/sqrt(3)),
//    with the sector from svm_sector_id, compared with the angle-based model
//    (tolerance 3e-4 of T).
// 3. References outside the hexagon must raise ovm and give ta+tb = T, tz = 0.
module tb_svm_on_time;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  logic signed [15:0] vd, vq;
  sector_t sector;
  logic [15:0] ta, tb, tz;
  logic ovm;
  int checks = 0, failures = 0;

  svm_sector_id u_sec (.vd(vd), .vq(vq), .sector(sector));
  svm_on_time   dut (.vd(vd), .vq(vq), .sector(sector), .ta(ta), .tb(tb), .tz(tz), .ovm(ovm));

  function automatic real frac(logic [15:0] t);
    return real'(t) / 32768.0;
  endfunction

  task automatic expect_close(real got, real exp, real tol, string what);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s vd=%0d vq=%0d got=%f exp=%f", what, vd, vq, got, exp);
    end
  endtask

  initial begin
    real ang, mag, rta, rtb, rtz;
    // worked example, normalised to Vdc = 100 V
    ang = -130.0 * PI / 180.0;
    vd = 16'(int'($floor(0.45 * $cos(ang) * 32768.0 + 0.5)));
    vq = 16'(int'($floor(0.45 * $sin(ang) * 32768.0 + 0.5)));
    #1;
    checks++;
    if (sector != SEC4) begin failures++; $display("FAIL example sector %0d", sector); end
    expect_close(frac(ta), 597.07e-6 / 1e-3, 3e-4, "example ta");
    expect_close(frac(tb), 135.346e-6 / 1e-3, 3e-4, "example tb");
    expect_close(frac(tz), 267.584e-6 / 1e-3, 3e-4, "example tz");
    checks++;
    if (ovm) begin failures++; $display("FAIL example ovm"); end
    $display("example: sector %0d ta=%f tb=%f tz=%f (of T)", sector, frac(ta), frac(tb), frac(tz));

    for (int i = 0; i < 3000; i++) begin
      ang = ($urandom % 36000) * PI / 18000.0;
      mag = ($urandom % 10000) / 10000.0 * (0.999 / $sqrt(3.0));
      vd = 16'(int'(mag * $cos(ang) * 32768.0));
      vq = 16'(int'(mag * $sin(ang) * 32768.0));
      #1;
      if (boundary_dist(real'(vd), real'(vq)) < 0.01) continue;
      ref_on_time(real'(vd) / 32768.0, real'(vq) / 32768.0, rta, rtb, rtz);
      expect_close(frac(ta), rta, 3e-4, "random ta");
      expect_close(frac(tb), rtb, 3e-4, "random tb");
      expect_close(frac(tz), rtz, 3e-4, "random tz");
      checks++;
      if (32'(ta) + 32'(tb) + 32'(tz) != 32768) begin
        failures++; $display("FAIL sum %0d %0d %0d", ta, tb, tz);
      end
    end

    // over-modulation: magnitude 0.75 of Vdc is outside the hexagon everywhere
    for (int k = 0; k < 12; k++) begin
      ang = (15.0 + 30.0 * k) * PI / 180.0;
      vd = 16'(int'(0.75 * $cos(ang) * 32768.0));
      vq = 16'(int'(0.75 * $sin(ang) * 32768.0));
      #1;
      checks++;
      if (!ovm || tz != 0 || 32'(ta) + 32'(tb) != 32768) begin
        failures++;
        $display("FAIL overmodulation ang=%f ovm=%0d ta=%0d tb=%0d tz=%0d", ang, ovm, ta, tb, tz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
