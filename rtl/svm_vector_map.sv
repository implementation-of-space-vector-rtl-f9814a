// svm_vector_map -- maps the comparator outputs to inverter switching states.
//
// The comparators give one of four patterns {s1,s2,s3}: 000, 100, 110, 111.
// 000 and 111 are the zero vectors V0 and V7 and pass through.  100 is the
// dwell of v_a, the adjacent active vector with one switch high, and 110 the
// dwell of v_b, the adjacent vector with two switches high:
//     sector   1    2    3    4    5    6
//     100 ->   V1   V3   V3   V5   V5   V1
//     110 ->   V2   V2   V4   V4   V6   V6
// Going V0 -> v_a -> v_b -> V7 and back changes one leg per step, which keeps
// the number of commutations at its minimum.  Any other pattern gives V0.
// Purely combinational.
module svm_vector_map
  import svm_pkg::*;
(
  input  sector_t   sector,
  input  logic      s1,
  input  logic      s2,
  input  logic      s3,
  output sw_state_t sw
);

  sw_state_t va, vb;

  always_comb begin
    unique case (sector)
      SEC1:    begin va = V1; vb = V2; end
      SEC2:    begin va = V3; vb = V2; end
      SEC3:    begin va = V3; vb = V4; end
      SEC4:    begin va = V5; vb = V4; end
      SEC5:    begin va = V5; vb = V6; end
      SEC6:    begin va = V1; vb = V6; end
      default: begin va = V0; vb = V0; end
    endcase

    unique case ({s1, s2, s3})
      3'b111:  sw = V7;
      3'b110:  sw = vb;
      3'b100:  sw = va;
      default: sw = V0;
    endcase
  end

endmodule
