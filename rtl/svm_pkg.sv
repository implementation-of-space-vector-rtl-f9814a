// svm_pkg -- types and constants shared by the space vector modulator.
//
// Reference voltages are signed Q1.15 numbers normalised to the DC-link
// voltage Vdc (so 0.5 means Vdc/2).  On-times are unsigned Q1.15 fractions of
// the carrier period T, with ONE (32768) standing for the whole period.  The
// square-root constants are scaled by 2^16.  The sector numbering (1..6,
// sector 1 from 0 to 60 degrees, counter-clockwise) and the switching-vector
// table V0..V7 follow the usual two-level inverter convention; the fixed-point
// formats are this design's own choice.
package svm_pkg;

  localparam int unsigned REF_W = 16;         // reference width (Q1.15)
  localparam int unsigned FRAC = 15;          // fractional bits of all Q1.15 values
  localparam int unsigned TW   = 16;          // on-time width (unsigned Q1.15)
  localparam logic [TW-1:0] ONE = 16'd32768;  // 1.0 in Q1.15

  localparam int signed SQRT3_Q16   = 113512; // sqrt(3)   * 2^16
  localparam int signed SQRT3_2_Q16 = 56756;  // sqrt(3)/2 * 2^16

  // Sector of the reference vector, 60 degrees each.
  typedef enum logic [2:0] {
    SEC1 = 3'd1, SEC2 = 3'd2, SEC3 = 3'd3,
    SEC4 = 3'd4, SEC5 = 3'd5, SEC6 = 3'd6
  } sector_t;

  // Inverter switching state: 1 = upper IGBT of the leg on.
  typedef struct packed {
    logic a;
    logic b;
    logic c;
  } sw_state_t;

  // Voltage vectors of the two-level inverter, as {a,b,c}.
  localparam sw_state_t V0 = '{1'b0, 1'b0, 1'b0};
  localparam sw_state_t V1 = '{1'b1, 1'b0, 1'b0};
  localparam sw_state_t V2 = '{1'b1, 1'b1, 1'b0};
  localparam sw_state_t V3 = '{1'b0, 1'b1, 1'b0};
  localparam sw_state_t V4 = '{1'b0, 1'b1, 1'b1};
  localparam sw_state_t V5 = '{1'b0, 1'b0, 1'b1};
  localparam sw_state_t V6 = '{1'b1, 1'b0, 1'b1};
  localparam sw_state_t V7 = '{1'b1, 1'b1, 1'b1};

endpackage
