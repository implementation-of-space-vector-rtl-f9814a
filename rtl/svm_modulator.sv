// svm_modulator -- live space vector modulator for a two-level inverter.
//
// Turns a d/q-axis voltage reference into the switching states Sa, Sb, Sc of
// the three inverter legs.  The chain is the classic one:
//   input register -> sector identification -> register -> on-time
//   calculation -> register -> duty-ratio levels -> per-period latch in the
//   carrier comparator -> vector mapping -> output register.
// Each carrier period is one switching period T = 2*HALF_PERIOD clocks.  The
// levels (and the sector that goes with them) are taken in the last cycle of a
// period from whatever reference sat in the input register three clocks
// earlier, so within a period the pattern is V0, v_a, v_b, V7, v_b, v_a, V0
// with dwell times tz/4, ta/2, tb/2, tz/2, tb/2, ta/2, tz/4.
//
// Interface: vd, vq signed Q1.15 normalised to the DC-link voltage (a
// reference of magnitude 1/sqrt(3) = 18919 is the largest circle inside the
// hexagon).  sa/sb/sc, sector, ovm and period_start are registered;
// period_start marks the first clock of a period on the outputs.
module svm_modulator
  import svm_pkg::*;
#(
  parameter int unsigned HALF_PERIOD = 25000,   // 50 MHz / (2 * 1 kHz)
  parameter int unsigned VW          = svm_pkg::REF_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [VW-1:0] vd,
  input  logic signed [VW-1:0] vq,
  output logic                 sa,
  output logic                 sb,
  output logic                 sc,
  output sector_t              sector,
  output logic                 period_start,
  output logic                 ovm
);

  localparam int unsigned CNTW = $clog2(2 * HALF_PERIOD);

  // stage 0: input register
  logic signed [VW-1:0] vd0, vq0;
  // stage 1: sector
  logic signed [VW-1:0] vd1, vq1;
  sector_t              sec_c, sec1;
  // stage 2: on-times
  logic [TW-1:0]        ta_c, tb_c, tz_c, ta2, tb2, tz2;
  logic                 ovm_c, ovm2;
  sector_t              sec2;
  // levels and per-period state
  logic [CNTW-1:0]      c1, c2, c3;
  logic                 s1, s2, s3, load, start;
  logic [CNTW-1:0]      tri_val;   // carrier, observed by assertions only
  sector_t              sec_act;
  logic                 ovm_act;
  sw_state_t            sw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vd0  <= '0;  vq0 <= '0;
      vd1  <= '0;  vq1 <= '0;  sec1 <= SEC1;
      ta2  <= '0;  tb2 <= '0;  tz2  <= ONE;  ovm2 <= 1'b0;  sec2 <= SEC1;
    end else begin
      vd0  <= vd;   vq0 <= vq;
      vd1  <= vd0;  vq1 <= vq0;  sec1 <= sec_c;
      ta2  <= ta_c; tb2 <= tb_c; tz2  <= tz_c; ovm2 <= ovm_c; sec2 <= sec1;
    end
  end

  svm_sector_id #(.VW(VW)) u_sector (
    .vd(vd0), .vq(vq0), .sector(sec_c)
  );

  svm_on_time #(.VW(VW)) u_on_time (
    .vd(vd1), .vq(vq1), .sector(sec1),
    .ta(ta_c), .tb(tb_c), .tz(tz_c), .ovm(ovm_c)
  );

  svm_duty_ratio #(.HALF_PERIOD(HALF_PERIOD), .CNTW(CNTW)) u_duty (
    .ta(ta2), .tb(tb2), .tz(tz2), .c1(c1), .c2(c2), .c3(c3)
  );

  svm_switch_states #(.HALF_PERIOD(HALF_PERIOD), .CNTW(CNTW)) u_switch (
    .clk(clk), .rst_n(rst_n), .c1(c1), .c2(c2), .c3(c3),
    .s1(s1), .s2(s2), .s3(s3), .tri_val(tri_val), .load(load), .start(start)
  );

  // the sector travels with the levels it belongs to
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sec_act <= SEC1;
      ovm_act <= 1'b0;
    end else if (load) begin
      sec_act <= sec2;
      ovm_act <= ovm2;
    end
  end

  // the carrier stays within 1..HALF_PERIOD
  a_carrier: assert property (@(posedge clk) disable iff (!rst_n)
    tri_val >= 1 && tri_val <= CNTW'(HALF_PERIOD));

  svm_vector_map u_map (
    .sector(sec_act), .s1(s1), .s2(s2), .s3(s3), .sw(sw)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {sa, sb, sc}  <= 3'b000;
      sector        <= SEC1;
      period_start  <= 1'b0;
      ovm           <= 1'b0;
    end else begin
      {sa, sb, sc}  <= {sw.a, sw.b, sw.c};
      sector        <= sec_act;
      period_start  <= start;
      ovm           <= ovm_act;
    end
  end

endmodule
