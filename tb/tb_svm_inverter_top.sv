// tb_svm_inverter_top -- end-to-end test of the modulator top at its default
// parameters (50 MHz clock, 1 kHz carrier, 200 kHz pattern playback, 12001
// pattern addresses, 2 us-class dead time).
//
// 1. Stored patterns.  The testbench computes a switching pattern the way a
//    continuous-time SVM model would: reference 0.8*Vdc/sqrt(3) at 50 Hz,
//    1 kHz triangle starting at its peak, levels d1 = 1-tz/2T, d2 = d1-ta/T,
//    d3 = d2-tb/T compared with the triangle and mapped through the sector's
//    adjacent vectors, sampled every 5 us for addresses 0..12001.  It loads
//    the pattern through the load port, releases reset and plays one full
//    pass plus the wrap to address 0.  Every state must equal the stored word
//    of the previous clock's address, and the fundamental of the phase
//    voltage v_an = Vdc/3 (2Sa - Sb - Sc) over 60 ms must be
//    0.8*100/sqrt(3) = 46.19 V within 2 %.
// 2. Live modulation.  vd, vq rotate at 50 Hz with magnitude 0.8/sqrt(3);
//    over one 20 ms cycle the fundamental of v_an must again be 46.19 V
//    within 2 %, and all six sectors must be visited.
// 3. Over-modulation: a reference of 0.72 Vdc must raise ovm.
// Throughout, the two gates of a leg are never on together and every change
// of a leg's state is followed by both gates off for at least 2 us.  The
// test counts each mechanism (pattern playback, address wrap, live sectors,
// over-modulation, dead-time intervals, source switch) and fails one that
// never happened.
module tb_svm_inverter_top;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  localparam real VDC   = 100.0;
  localparam real M_IDX = 0.8;
  localparam int  NADDR = 12002;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] vd = 0, vq = 0;
  logic use_live = 0, ld_en = 0;
  logic [13:0] ld_addr = 0;
  logic [2:0]  ld_data = 0;
  logic saup, salow, sbup, sblow, scup, sclow, period_start, ovm;
  sw_state_t sw_state;
  sector_t sector;
  logic [13:0] rom_addr;

  int checks = 0, failures = 0;
  int n_play = 0, n_wrap = 0, n_ovm = 0, n_dead = 0, n_switch = 0, min_dead = 1 << 30;
  int sec_seen [7];
  logic [2:0] table_mem [NADDR];

  svm_inverter_top dut (
    .clk(clk), .rst_n(rst_n), .vd(vd), .vq(vq), .use_live(use_live),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data),
    .saup(saup), .salow(salow), .sbup(sbup), .sblow(sblow), .scup(scup), .sclow(sclow),
    .sw_state(sw_state), .sector(sector), .period_start(period_start), .ovm(ovm),
    .rom_addr(rom_addr));

  always #10 clk = ~clk;   // 50 MHz

  task automatic fail(string m);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", m, $time);
  endtask

  // switching state of the continuous-time model at time t (seconds)
  function automatic logic [2:0] model_state(real t);
    real th, ta, tb, tz, d1, d2, d3, carrier, ph;
    int s;
    logic [2:0] lo, hi, va, vb;
    th = 2.0 * PI * 50.0 * t;
    ref_on_time(M_IDX / $sqrt(3.0) * $cos(th), M_IDX / $sqrt(3.0) * $sin(th), ta, tb, tz);
    s  = ref_sector(M_IDX / $sqrt(3.0) * $cos(th), M_IDX / $sqrt(3.0) * $sin(th));
    d1 = 1.0 - tz / 2.0;
    d2 = d1 - ta;
    d3 = d2 - tb;
    ph = t * 1000.0 - $floor(t * 1000.0);
    carrier = (ph < 0.5) ? 1.0 - 2.0 * ph : 2.0 * ph - 1.0;
    lo = vec(s);
    hi = vec(s == 6 ? 1 : s + 1);
    va = ($countones(lo) == 1) ? lo : hi;
    vb = ($countones(lo) == 1) ? hi : lo;
    case ({d1 >= carrier, d2 >= carrier, d3 >= carrier})
      3'b111:  return 3'b111;
      3'b110:  return vb;
      3'b100:  return va;
      default: return 3'b000;
    endcase
  endfunction

  // fundamental (50 Hz) amplitude accumulator for v_an
  real acc_re, acc_im;
  int  acc_n;
  task automatic acc_clear();
    acc_re = 0.0; acc_im = 0.0; acc_n = 0;
  endtask
  task automatic acc_add(real t);
    real v;
    v = VDC / 3.0 * (2.0 * sw_state.a - sw_state.b - sw_state.c);
    acc_re += v * $cos(2.0 * PI * 50.0 * t);
    acc_im += v * $sin(2.0 * PI * 50.0 * t);
    acc_n++;
  endtask
  function automatic real acc_amp();
    return 2.0 / acc_n * $sqrt(acc_re * acc_re + acc_im * acc_im);
  endfunction

  // dead-time and shoot-through monitor
  int dead [3];
  always @(negedge clk) if (rst_n) begin
    logic [2:0] up, low;
    up  = {scup, sbup, saup};
    low = {sclow, sblow, salow};
    for (int k = 0; k < 3; k++) begin
      if (up[k] && low[k]) fail($sformatf("shoot-through leg %0d", k));
      if (!up[k] && !low[k]) dead[k]++;
      else begin
        if (dead[k] > 0 && dead[k] < 100) begin
          // shorter than 2 us: allowed only right after reset
          if ($time > 2000000) fail($sformatf("dead time %0d clocks on leg %0d", dead[k], k));
        end
        if (dead[k] > 0) begin
          n_dead++;
          if (dead[k] < min_dead && $time > 2000000) min_dead = dead[k];
        end
        dead[k] = 0;
      end
    end
  end

  initial begin
    real amp, th, mag;
    logic [13:0] prev_addr;
    int last_sec;
    dead = '{0, 0, 0};

    // ---- 1. stored patterns ----
    for (int a = 0; a < NADDR; a++) table_mem[a] = model_state(a * 5.0e-6);
    for (int a = 0; a < NADDR; a++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = 14'(a); ld_data = table_mem[a];
    end
    @(negedge clk);
    ld_en = 0;
    rst_n = 1;
    prev_addr = rom_addr;
    acc_clear();
    for (int i = 0; i < NADDR * 250 + 500; i++) begin
      @(negedge clk);
      checks++;
      if (sw_state != table_mem[prev_addr]) fail($sformatf("playback addr %0d", prev_addr));
      else n_play++;
      if (prev_addr == 14'(NADDR - 1) && rom_addr == 0) n_wrap++;
      // one sample per pattern word, over the first 60 ms
      if (i < 12000 * 250 && i % 250 == 125) acc_add(real'(rom_addr - 1) * 5.0e-6);
      prev_addr = rom_addr;
    end
    amp = acc_amp();
    $display("stored pattern: fundamental %.3f V (expected %.3f V)", amp, M_IDX * VDC / $sqrt(3.0));
    checks++;
    if (amp < 0.98 * M_IDX * VDC / $sqrt(3.0) || amp > 1.02 * M_IDX * VDC / $sqrt(3.0))
      fail("stored-pattern fundamental");

    // ---- 2. live modulation ----
    use_live = 1; n_switch++;
    mag = M_IDX / $sqrt(3.0);
    acc_clear();
    last_sec = 0;
    for (int i = 0; i < 1000000 + 100000; i++) begin
      th = 2.0 * PI * 50.0 * (i * 20.0e-9);
      vd = 16'(int'(mag * $cos(th) * 32768.0));
      vq = 16'(int'(mag * $sin(th) * 32768.0));
      @(negedge clk);
      // skip the first 2 ms (pipeline and first period), then one 20 ms cycle
      // sampled every 50 clocks; outputs lag the reference by one period
      if (i >= 100000 && i % 50 == 0) acc_add((i - 50000) * 20.0e-9);
      if (int'(sector) != last_sec) begin sec_seen[int'(sector)]++; last_sec = int'(sector); end
      if (ovm) n_ovm++;
    end
    amp = acc_amp();
    $display("live modulator: fundamental %.3f V (expected %.3f V)", amp, M_IDX * VDC / $sqrt(3.0));
    checks++;
    if (amp < 0.98 * M_IDX * VDC / $sqrt(3.0) || amp > 1.02 * M_IDX * VDC / $sqrt(3.0))
      fail("live fundamental");
    checks++;
    if (n_ovm != 0) fail("ovm inside the hexagon");

    // ---- 3. over-modulation ----
    vd = 16'(int'(0.72 * 32768.0)); vq = 16'(int'(0.1 * 32768.0));
    repeat (150000) begin
      @(negedge clk);
      if (ovm) n_ovm++;
    end
    use_live = 0; n_switch++;
    repeat (1000) @(negedge clk);

    // ---- mechanisms ----
    $display("mechanisms: playback %0d, wraps %0d, ovm %0d, dead-time intervals %0d (shortest %0d clocks), source switches %0d",
             n_play, n_wrap, n_ovm, n_dead, min_dead, n_switch);
    for (int k = 1; k <= 6; k++) begin
      $display("  sector %0d entered %0d times", k, sec_seen[k]);
      checks++;
      if (sec_seen[k] == 0) fail($sformatf("sector %0d never used", k));
    end
    checks += 5;
    if (n_play == 0)   fail("no playback");
    if (n_wrap == 0)   fail("address never wrapped");
    if (n_ovm == 0)    fail("over-modulation never flagged");
    if (n_dead == 0)   fail("no dead time seen");
    if (n_switch < 2)  fail("source never switched");
    checks++;
    if (min_dead < 100) fail("dead time below 2 us");
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
