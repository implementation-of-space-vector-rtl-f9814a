// svm_blank_comparator -- gate decisions of the blanking-time generator.
//
// Each of the six IGBTs is switched on once its on-delay counter has reached
// BLANK_TICKS.  Because a counter is held at 0 while the opposite switch of
// its leg is requested, the two switches of a leg are never on together and
// a gate turns on only BLANK_TICKS ticks after its partner turned off.
// Purely combinational.  uc, lc and the outputs pack the phases as {c, b, a}.
module svm_blank_comparator #(
  parameter int unsigned CW          = 13,
  parameter int unsigned BLANK_TICKS = 7
) (
  input  logic [3*CW-1:0] uc,
  input  logic [3*CW-1:0] lc,
  output logic [2:0]      up,
  output logic [2:0]      low
);

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      up[k]  = (uc[k*CW +: CW] >= CW'(BLANK_TICKS));
      low[k] = (lc[k*CW +: CW] >= CW'(BLANK_TICKS));
    end
  end

endmodule
