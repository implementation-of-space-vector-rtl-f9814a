// svm_duty_ratio -- comparison levels for the three switching signals.
//
// From the on-times ta, tb and tz (fractions of the carrier period T) the
// three levels against which the triangular carrier is compared are
//     d1 = 1 - tz/(2T)
//     d2 = 1 - tz/(2T) - ta/T
//     d3 = 1 - tz/(2T) - ta/T - tb/T   (= tz/(2T) when ta+tb+tz = T)
// as in the duty-ratio subsystem of the modulator.  The levels are produced
// directly in carrier counts, scaled by HALF_PERIOD (the carrier's peak), so
// that the comparator needs no multiplier.  Each level is rounded once to a
// whole count; a level that would go below 0 is limited to 0.  Purely combinational.
//
// Interface: ta, tb, tz unsigned Q1.15 (32768 = T); c1 >= c2 >= c3 in
// 0..HALF_PERIOD.
module svm_duty_ratio
  import svm_pkg::*;
#(
  parameter int unsigned HALF_PERIOD = 25000,   // 50 MHz / (2 * 1 kHz)
  parameter int unsigned CNTW        = $clog2(2 * HALF_PERIOD)
) (
  input  logic [TW-1:0]   ta,
  input  logic [TW-1:0]   tb,
  input  logic [TW-1:0]   tz,
  output logic [CNTW-1:0] c1,
  output logic [CNTW-1:0] c2,
  output logic [CNTW-1:0] c3
);

  localparam int unsigned PW = TW + CNTW + 4;

  // each level is H - H*(sum of times)/T, rounded once
  logic signed [PW-1:0] sz, sza, szab;   // tz, tz+2ta, tz+2ta+2tb (Q1.15)
  logic signed [PW-1:0] l1, l2, l3;

  always_comb begin
    sz   = PW'(tz);
    sza  = sz + (PW'(ta) <<< 1);
    szab = sza + (PW'(tb) <<< 1);
    l1 = PW'(HALF_PERIOD) - ((sz   * PW'(HALF_PERIOD) + (PW'(1) <<< FRAC)) >>> (FRAC + 1));
    l2 = PW'(HALF_PERIOD) - ((sza  * PW'(HALF_PERIOD) + (PW'(1) <<< FRAC)) >>> (FRAC + 1));
    l3 = PW'(HALF_PERIOD) - ((szab * PW'(HALF_PERIOD) + (PW'(1) <<< FRAC)) >>> (FRAC + 1));
    c1 = (l1 < 0) ? '0 : CNTW'(l1);
    c2 = (l2 < 0) ? '0 : CNTW'(l2);
    c3 = (l3 < 0) ? '0 : CNTW'(l3);
  end

endmodule
