// svm_blanking_div -- time base of the blanking-time generator.
//
// A modulo-DIV counter; tick is a one-cycle pulse every DIV clocks (every
// 360 ns for DIV = 18 at 50 MHz).  The blanking counters advance on this
// tick, which is used as a clock enable.  Reset is asynchronous, active low.
module svm_blanking_div #(
  parameter int unsigned DIV = 18
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt <= '0;
    else if (cnt == W'(DIV - 1)) cnt <= '0;
    else                         cnt <= cnt + 1'b1;
  end

  assign tick = (cnt == W'(DIV - 1));

endmodule
