// tb_svm_sector_id -- checks the sector classifier against atan2.
//
// Drives the six sector centres, the axis directions and 4000 random
// references of random magnitude, and compares the sector with the angle
// ranges [0,60), [60,120), ... computed in floating point.  References within
// 0.01 degree of a boundary are skipped (the hardware's sqrt(3) constant is
// rounded).  Exact boundaries at 0, +-60 and +-120 degrees are also checked.
module tb_svm_sector_id;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  logic signed [15:0] vd, vq;
  sector_t sector;
  int checks = 0, failures = 0;

  svm_sector_id dut (.vd(vd), .vq(vq), .sector(sector));

  task automatic check(int exp, string what);
    #1;
    checks++;
    if (int'(sector) != exp) begin
      failures++;
      $display("FAIL %s vd=%0d vq=%0d sector=%0d expected=%0d", what, vd, vq, sector, exp);
    end
  endtask

  initial begin
    real ang, mag, x, y;
    // sector centres and axes
    for (int k = 0; k < 6; k++) begin
      ang = (30.0 + 60.0 * k) * PI / 180.0;
      vd = 16'(int'(15000.0 * $cos(ang)));
      vq = 16'(int'(15000.0 * $sin(ang)));
      check(k + 1, "centre");
    end
    vd = 16'sd20000; vq = 0;      check(1, "0 deg");
    vd = 0;          vq = 16'sd20000; check(2, "90 deg");
    vd = -16'sd20000; vq = 0;     check(4, "180 deg");
    vd = 0;          vq = -16'sd20000; check(5, "-90 deg");
    vd = 0;          vq = 0;      check(1, "zero");
    // exact boundaries: 60 deg (vq = sqrt3 vd) with vd = 4096*k is not exact
    // in integers, so use tiny offsets either side
    vd = 16'sd10000; vq = 16'sd17319; check(1, "just below 60");
    vd = 16'sd10000; vq = 16'sd17322; check(2, "just above 60");
    vd = -16'sd10000; vq = 16'sd17322; check(2, "just below 120");
    vd = -16'sd10000; vq = 16'sd17319; check(3, "just above 120");
    vd = -16'sd10000; vq = -16'sd17319; check(4, "just below -120");
    vd = -16'sd10000; vq = -16'sd17322; check(5, "just above -120");
    vd = 16'sd10000; vq = -16'sd17322; check(5, "just below -60");
    vd = 16'sd10000; vq = -16'sd17319; check(6, "just above -60");
    vd = 16'sd20000; vq = -16'sd1;  check(6, "just below 0");
    // random references
    for (int i = 0; i < 4000; i++) begin
      ang = ($urandom % 36000) * PI / 18000.0;
      mag = 100.0 + ($urandom % 21000);
      x = mag * $cos(ang); y = mag * $sin(ang);
      vd = 16'(int'(x)); vq = 16'(int'(y));
      if (boundary_dist(real'(vd), real'(vq)) > 0.01)
        check(ref_sector(real'(vd), real'(vq)), "random");
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
