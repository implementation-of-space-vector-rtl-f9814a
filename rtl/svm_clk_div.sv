// svm_clk_div -- sample-strobe generator.
//
// A counter runs from 0 to CNT_MAX-1 and clkout is 1 while it holds CNT_MAX-1,
// so clkout is a one-cycle pulse every CNT_MAX clocks.  With the 50 MHz board
// clock and CNT_MAX = 250 that is a 200 kHz (5 us) strobe, the sampling step
// at which the stored switching patterns were recorded.  The strobe is used
// as a clock enable, not as a clock.  Reset is asynchronous, active low.
module svm_clk_div #(
  parameter int unsigned CNT_MAX = 250
) (
  input  logic clk,
  input  logic rst_n,
  output logic clkout
);

  localparam int unsigned W = (CNT_MAX > 1) ? $clog2(CNT_MAX) : 1;

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       cnt <= '0;
    else if (cnt == W'(CNT_MAX - 1))  cnt <= '0;
    else                              cnt <= cnt + 1'b1;
  end

  assign clkout = (cnt == W'(CNT_MAX - 1));

endmodule
