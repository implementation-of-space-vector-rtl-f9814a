// svm_switch_states -- triangular carrier and the three comparators.
//
// A phase counter runs over 2*HALF_PERIOD clocks per carrier period.  The
// carrier starts at its peak: it counts down HALF_PERIOD, ..., 1 and then up
// 1, ..., HALF_PERIOD, so every value appears once on each slope.  Each
// switching signal is s_k = (c_k >= carrier), so a level c_k keeps s_k high
// for exactly 2*c_k clocks, centred on the middle of the period.  With
// c1 >= c2 >= c3 the period runs 000, 100, 110, 111, 110, 100, 000 in
// {s1,s2,s3}.
//
// The levels are latched in the last cycle of each period (load = 1), so one
// period never mixes two references.  start is 1 in the first cycle of a
// period.  s1..s3 are combinational from registers and change the cycle after
// the carrier register.  The latch and the carrier phase convention are this
// design's choices; the comparison itself follows the modulator's switching
// subsystem.
module svm_switch_states #(
  parameter int unsigned HALF_PERIOD = 25000,
  parameter int unsigned CNTW        = $clog2(2 * HALF_PERIOD)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [CNTW-1:0] c1,
  input  logic [CNTW-1:0] c2,
  input  logic [CNTW-1:0] c3,
  output logic            s1,
  output logic            s2,
  output logic            s3,
  output logic [CNTW-1:0] tri_val,
  output logic            load,
  output logic            start
);

  localparam logic [CNTW-1:0] H    = CNTW'(HALF_PERIOD);
  localparam logic [CNTW-1:0] LAST = CNTW'(2 * HALF_PERIOD - 1);

  logic [CNTW-1:0] phase;
  logic [CNTW-1:0] l1, l2, l3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      l1    <= '0;
      l2    <= '0;
      l3    <= '0;
    end else begin
      if (phase == LAST) begin
        phase <= '0;
        l1    <= c1;
        l2    <= c2;
        l3    <= c3;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

  always_comb begin
    tri_val = (phase < H) ? (H - phase) : (phase - H + 1'b1);
    load    = (phase == LAST);
    start   = (phase == '0);
    s1      = (l1 >= tri_val);
    s2      = (l2 >= tri_val);
    s3      = (l3 >= tri_val);
  end

endmodule
