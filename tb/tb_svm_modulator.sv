// tb_svm_modulator -- end-to-end check of the live space vector modulator.
//
// Uses HALF_PERIOD = 500 (1000-clock carrier period) to keep runs short.
// 1. Worked example v* = 45 V at -130 degrees, Vdc = 100 V: sector 4 and,
//    per period, Sa on for tz/2 = 13.38 %, Sb for tb+tz/2 = 26.81 %, Sc for
//    ta+tb+tz/2 = 86.52 % of T (within 3 clocks).
// 2. 120 random references inside the inscribed circle: the average space
//    vector of one period, 2/3(Sa - Sb/2 - Sc/2) + j(Sb - Sc)/sqrt(3), must
//    equal the reference within 0.004 Vdc; each period starts with 000, every
//    state change switches exactly one leg (away from sector edges, where a
//    dwell may round to zero), and the sector matches atan2.
// 3. A reference outside the hexagon raises ovm.
module tb_svm_modulator;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  localparam int H = 500;
  localparam int T = 2 * H;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] vd = 0, vq = 0;
  logic sa, sb, sc, period_start, ovm;
  sector_t sector;
  int checks = 0, failures = 0;
  int sectors_seen [7];

  svm_modulator #(.HALF_PERIOD(H)) dut (
    .clk(clk), .rst_n(rst_n), .vd(vd), .vq(vq),
    .sa(sa), .sb(sb), .sc(sc), .sector(sector), .period_start(period_start), .ovm(ovm));

  always #5 clk = ~clk;

  task automatic fail(string m);
    failures++;
    $display("FAIL %s (vd=%0d vq=%0d) at %0t", m, vd, vq, $time);
  endtask

  // measure one full period after the new reference has been taken
  task automatic measure(output int na, output int nb, output int nc, output int bad_steps,
                         output logic [2:0] first);
    logic [2:0] prev;
    // first period boundary may still use the old reference: skip one
    @(negedge clk); while (!period_start) @(negedge clk);
    @(negedge clk); while (!period_start) @(negedge clk);
    na = 0; nb = 0; nc = 0; bad_steps = 0;
    first = {sa, sb, sc};
    prev = first;
    for (int i = 0; i < T; i++) begin
      na += sa; nb += sb; nc += sc;
      if ($countones({sa, sb, sc} ^ prev) > 1) bad_steps++;
      prev = {sa, sb, sc};
      @(negedge clk);
    end
  endtask

  initial begin
    int na, nb, nc, bad;
    logic [2:0] first;
    real ang, mag, ad, aq, x, y;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. worked example
    ang = -130.0 * PI / 180.0;
    vd = 16'(int'($floor(0.45 * $cos(ang) * 32768.0 + 0.5)));
    vq = 16'(int'($floor(0.45 * $sin(ang) * 32768.0 + 0.5)));
    measure(na, nb, nc, bad, first);
    $display("example: sector %0d, Sa %0d Sb %0d Sc %0d clocks of %0d", sector, na, nb, nc, T);
    checks++; if (sector != SEC4) fail("example sector");
    checks++; if (na < 131 || na > 137) fail($sformatf("example Sa %0d", na));
    checks++; if (nb < 265 || nb > 271) fail($sformatf("example Sb %0d", nb));
    checks++; if (nc < 862 || nc > 868) fail($sformatf("example Sc %0d", nc));

    // 2. random references
    for (int i = 0; i < 120; i++) begin
      ang = ($urandom % 36000) * PI / 18000.0;
      if (i < 12) ang = (5.0 + 30.0 * i) * PI / 180.0;
      mag = (0.05 + ($urandom % 1000) / 1000.0 * 0.5) / $sqrt(3.0) * 1.05;
      x = mag * $cos(ang); y = mag * $sin(ang);
      vd = 16'(int'(x * 32768.0)); vq = 16'(int'(y * 32768.0));
      measure(na, nb, nc, bad, first);
      avg_vector(real'(na) / T, real'(nb) / T, real'(nc) / T, ad, aq);
      checks += 2;
      if (ad - real'(vd) / 32768.0 > 0.004 || real'(vd) / 32768.0 - ad > 0.004) fail($sformatf("avg vd %f", ad));
      if (aq - real'(vq) / 32768.0 > 0.004 || real'(vq) / 32768.0 - aq > 0.004) fail($sformatf("avg vq %f", aq));
      // a dwell that rounds to zero clocks (reference on a sector edge)
      // legitimately joins two steps, so only away from the edges
      if (boundary_dist(real'(vd), real'(vq)) > 1.0) begin
        checks++; if (bad != 0) fail("more than one leg switched in one step");
      end
      checks++; if (first != 3'b000) fail("period does not start with V0");
      if (boundary_dist(real'(vd), real'(vq)) > 0.05) begin
        checks++;
        if (int'(sector) != ref_sector(real'(vd), real'(vq))) fail("sector");
      end
      sectors_seen[int'(sector)]++;
      checks++; if (ovm) fail("ovm inside the circle");
    end
    for (int k = 1; k <= 6; k++) begin
      checks++;
      if (sectors_seen[k] == 0) fail($sformatf("sector %0d never visited", k));
    end

    // 3. over-modulation
    vd = 16'sd24000; vq = 16'sd3000;
    measure(na, nb, nc, bad, first);
    checks++; if (!ovm) fail("ovm not raised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
