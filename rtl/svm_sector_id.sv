// svm_sector_id -- finds the 60-degree sector that holds the reference vector.
//
// The reference (vd, vq) is classified into sectors 1..6 with the angle
// ranges [0,60), [60,120), [120,180), [-180,-120), [-120,-60) and [-60,0)
// degrees.  Instead of computing atan2 the sector boundaries at +-60 and
// +-120 degrees are tested directly by comparing vq with +-sqrt(3)*vd, which
// needs one constant multiplication.  The zero vector gives sector 1 and an
// angle of exactly 180 degrees gives sector 4 (the range tests leave it
// between sectors 3 and 4).  Purely combinational.
//
// Interface: vd, vq signed Q1.15 normalised to Vdc; sector is a sector_t.
module svm_sector_id
  import svm_pkg::*;
#(
  parameter int unsigned VW = svm_pkg::REF_W
) (
  input  logic signed [VW-1:0] vd,
  input  logic signed [VW-1:0] vq,
  output sector_t              sector
);

  localparam int unsigned PW = VW + 20;

  logic signed [PW-1:0] y;   // vq * 2^16
  logic signed [PW-1:0] r;   // sqrt(3) * vd * 2^16

  always_comb begin
    y = PW'(vq) <<< 16;
    r = PW'(vd) * PW'(SQRT3_Q16);
    if (vq == '0 && vd == '0) begin
      sector = SEC1;
    end else if (vq >= 0) begin
      if (vq == '0 && vd < 0) sector = SEC4;      // exactly 180 degrees
      else if (y < r)         sector = SEC1;      // below +60 degrees
      else if (y > -r)        sector = SEC2;      // below +120 degrees
      else                    sector = SEC3;
    end else begin
      if (y >= -r)            sector = SEC6;      // at or above -60 degrees
      else if (y <= r)        sector = SEC5;      // at or above -120 degrees
      else                    sector = SEC4;
    end
  end

endmodule
