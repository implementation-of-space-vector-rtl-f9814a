// svm_upper_counter -- on-delay counters for the three upper IGBTs.
//
// One CW-bit counter per phase.  While the phase's switching state
// (clear[k]) is 0 the counter is held at 0; while it is 1 the counter
// advances on every tick and stops at its maximum.  The count therefore says
// how long the upper switch has been requested, in ticks.  uc packs the
// phases as {c, b, a}.  Reset is asynchronous, active low.
module svm_upper_counter #(
  parameter int unsigned CW = 13
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  input  logic [2:0]      clear,
  output logic [3*CW-1:0] uc
);

  for (genvar k = 0; k < 3; k++) begin : g_phase
    logic [CW-1:0] cnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                     cnt <= '0;
      else if (!clear[k])             cnt <= '0;
      else if (tick && cnt != '1)     cnt <= cnt + 1'b1;
    end
    assign uc[k*CW +: CW] = cnt;
  end

endmodule
