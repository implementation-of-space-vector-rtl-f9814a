// svm_on_time -- on-duration calculation of the space vector modulator.
//
// The reference is first rotated into the frame of its sector: v_alpha lies
// along v_a, the adjacent active vector with a single switch high (v1, v3 or
// v5), and theta_sec is measured from v_a towards v_b, the adjacent vector
// with two switches high.  In sectors 1, 3 and 5 that is counter-clockwise, in
// sectors 2, 4 and 6 clockwise.  Rotations by 0, 120 and 240 degrees need only
// the constants 1/2 and sqrt(3)/2.  Then, with all voltages normalised to Vdc,
//     tb/T = sqrt(3) * v_beta
//     ta/T = 3/2 * v_alpha - sqrt(3)/2 * v_beta
//     tz/T = 1 - ta/T - tb/T
// (the standard dwell-time equations for a two-level inverter).  A reference
// outside the hexagon (ta+tb > T) is clamped: ta is limited to T, tb to T-ta,
// tz becomes 0 and ovm is raised.  Small negative results from rounding are
// set to 0.  Purely combinational.
//
// Interface: vd, vq signed Q1.15 / Vdc; sector from svm_sector_id; ta, tb, tz
// unsigned Q1.15 fractions of the carrier period (32768 = T).
module svm_on_time
  import svm_pkg::*;
#(
  parameter int unsigned VW = svm_pkg::REF_W
) (
  input  logic signed [VW-1:0] vd,
  input  logic signed [VW-1:0] vq,
  input  sector_t              sector,
  output logic [TW-1:0]        ta,
  output logic [TW-1:0]        tb,
  output logic [TW-1:0]        tz,
  output logic                 ovm
);

  localparam int unsigned PW = VW + 22;

  logic signed [PW-1:0] x16, y16;      // vd, vq scaled by 2^16
  logic signed [PW-1:0] hx16, hy16;    // vd/2, vq/2 scaled by 2^16
  logic signed [PW-1:0] kx16, ky16;    // sqrt(3)/2 * vd, vq scaled by 2^16
  logic signed [PW-1:0] ua16, ub16;    // v_alpha, v_beta scaled by 2^16
  logic signed [PW-1:0] ua, ub;        // v_alpha, v_beta in Q1.15
  logic signed [PW-1:0] ta_s, tb_s;    // signed on-times in Q1.15
  logic signed [PW-1:0] ta_c, tb_c;    // clamped

  always_comb begin
    x16  = PW'(vd) <<< 16;
    y16  = PW'(vq) <<< 16;
    hx16 = PW'(vd) <<< 15;
    hy16 = PW'(vq) <<< 15;
    kx16 = PW'(vd) * PW'(SQRT3_2_Q16);
    ky16 = PW'(vq) * PW'(SQRT3_2_Q16);

    unique case (sector)
      SEC1:    begin ua16 =  x16;         ub16 =  y16;         end
      SEC2:    begin ua16 = -hx16 + ky16; ub16 =  kx16 + hy16; end
      SEC3:    begin ua16 = -hx16 + ky16; ub16 = -kx16 - hy16; end
      SEC4:    begin ua16 = -hx16 - ky16; ub16 = -kx16 + hy16; end
      SEC5:    begin ua16 = -hx16 - ky16; ub16 =  kx16 - hy16; end
      SEC6:    begin ua16 =  x16;         ub16 = -y16;         end
      default: begin ua16 =  x16;         ub16 =  y16;         end
    endcase

    // back to Q1.15, rounded
    ua = (ua16 + PW'(32768)) >>> 16;
    ub = (ub16 + PW'(32768)) >>> 16;

    tb_s = (ub * PW'(SQRT3_Q16) + PW'(32768)) >>> 16;
    ta_s = ((ua * 3) >>> 1) - ((ub * PW'(SQRT3_2_Q16) + PW'(32768)) >>> 16);

    ta_c = (ta_s < 0) ? '0 : ta_s;
    tb_c = (tb_s < 0) ? '0 : tb_s;
    ovm  = 1'b0;
    if (ta_c + tb_c > PW'(ONE)) begin
      ovm = 1'b1;
      if (ta_c > PW'(ONE)) begin
        ta_c = PW'(ONE);
        tb_c = '0;
      end else begin
        tb_c = PW'(ONE) - ta_c;
      end
    end

    ta = TW'(ta_c);
    tb = TW'(tb_c);
    tz = ONE - TW'(ta_c) - TW'(tb_c);
  end

endmodule
