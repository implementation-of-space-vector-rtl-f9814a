// tb_svm_vector_map -- exhaustive check of the vector mapping.
//
// For each sector the two adjacent active vectors are found from geometry:
// V_i points at (i-1)*60 degrees, so sector k lies between V_k and V_(k+1).
// Of the two, the vector with one switch on must answer 100 and the one with
// two switches on 110; 000 and 111 give V0 and V7 and any other input V0.
module tb_svm_vector_map;
  import svm_pkg::*;
  import svm_ref_pkg::*;

  sector_t   sector;
  logic      s1, s2, s3;
  sw_state_t sw;
  int checks = 0, failures = 0;

  svm_vector_map dut (.sector(sector), .s1(s1), .s2(s2), .s3(s3), .sw(sw));

  initial begin
    for (int k = 1; k <= 6; k++) begin
      logic [2:0] va, vb, lo, hi, exp;
      lo = vec(k);
      hi = vec(k == 6 ? 1 : k + 1);
      va = ($countones(lo) == 1) ? lo : hi;
      vb = ($countones(lo) == 1) ? hi : lo;
      for (int p = 0; p < 8; p++) begin
        sector = sector_t'(k);
        {s1, s2, s3} = 3'(p);
        #1;
        case (p)
          7: exp = 3'b111;
          6: exp = vb;
          4: exp = va;
          default: exp = 3'b000;
        endcase
        checks++;
        if (sw != exp) begin
          failures++;
          $display("FAIL sector %0d s=%b sw=%b exp=%b", k, p[2:0], sw, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
