// svm_blanking -- blanking-time (dead-time) generator for the three legs.
//
// Takes the switching states sa, sb, sc (1 = upper IGBT of the leg on) and
// produces six gate signals.  A mod-BLANK_DIV divider gives a tick every
// BLANK_DIV clocks; per leg an upper counter counts ticks while the state is
// 1 and a lower counter while it is 0, each cleared by the opposite state; a
// comparator turns a gate on once its counter reaches BLANK_TICKS.  A gate
// turns off at the first clock edge that sees its state drop, and the other
// gate of the leg turns on (BLANK_TICKS-1)*BLANK_DIV+1 .. BLANK_TICKS*BLANK_DIV
// edges after the change, so both are off for 108..125 clocks (2.16-2.5 us at
// 50 MHz with the defaults), which protects the leg from shoot-through.  The structure (divider,
// upper counter, lower counter, comparator) follows the board design; the
// threshold and counter polarity are this design's choice.
module svm_blanking #(
  parameter int unsigned BLANK_DIV   = 18,
  parameter int unsigned BLANK_TICKS = 7,
  parameter int unsigned CW          = 13
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sa,
  input  logic sb,
  input  logic sc,
  output logic saup,
  output logic salow,
  output logic sbup,
  output logic sblow,
  output logic scup,
  output logic sclow
);

  logic            tick;
  logic [3*CW-1:0] uc, lc;
  logic [2:0]      up, low;

  svm_blanking_div #(.DIV(BLANK_DIV)) u_div (
    .clk(clk), .rst_n(rst_n), .tick(tick)
  );

  svm_upper_counter #(.CW(CW)) u_upper (
    .clk(clk), .rst_n(rst_n), .tick(tick), .clear({sc, sb, sa}), .uc(uc)
  );

  svm_lower_counter #(.CW(CW)) u_lower (
    .clk(clk), .rst_n(rst_n), .tick(tick), .clear({sc, sb, sa}), .lc(lc)
  );

  svm_blank_comparator #(.CW(CW), .BLANK_TICKS(BLANK_TICKS)) u_cmp (
    .uc(uc), .lc(lc), .up(up), .low(low)
  );

  assign {scup, sbup, saup}    = up;
  assign {sclow, sblow, salow} = low;

  // the two switches of a leg are never on together
  a_leg_a: assert property (@(posedge clk) disable iff (!rst_n) !(saup && salow))
    else $error("phase a shoot-through");
  a_leg_b: assert property (@(posedge clk) disable iff (!rst_n) !(sbup && sblow))
    else $error("phase b shoot-through");
  a_leg_c: assert property (@(posedge clk) disable iff (!rst_n) !(scup && sclow))
    else $error("phase c shoot-through");

endmodule
