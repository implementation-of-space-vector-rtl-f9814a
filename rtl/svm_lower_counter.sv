// svm_lower_counter -- on-delay counters for the three lower IGBTs.
//
// One CW-bit counter per phase.  While the phase's switching state
// (clear[k]) is 1 the counter is held at 0; while it is 0 the counter
// advances on every tick and stops at its maximum.  The count therefore says
// how long the lower switch has been requested, in ticks.  lc packs the
// phases as {c, b, a}.  Reset is asynchronous, active low.
module svm_lower_counter #(
  parameter int unsigned CW = 13
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  input  logic [2:0]      clear,
  output logic [3*CW-1:0] lc
);

  for (genvar k = 0; k < 3; k++) begin : g_phase
    logic [CW-1:0] cnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                     cnt <= '0;
      else if (clear[k])              cnt <= '0;
      else if (tick && cnt != '1)     cnt <= cnt + 1'b1;
    end
    assign lc[k*CW +: CW] = cnt;
  end

endmodule
