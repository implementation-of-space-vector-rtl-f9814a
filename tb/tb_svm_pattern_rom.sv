// tb_svm_pattern_rom -- fills the 16384 x 1 memory with a pseudo-random
// pattern through the load port, then reads it back in order and in random
// order, checking the one-clock read latency.
module tb_svm_pattern_rom;
  logic clk = 0;
  logic [13:0] address = 0, ld_addr = 0;
  logic ld_en = 0, ld_data = 0, q;
  logic model [16384];
  int checks = 0, failures = 0;

  svm_pattern_rom dut (.clk(clk), .address(address), .q(q),
                       .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data));

  always #10 clk = ~clk;

  initial begin
    for (int i = 0; i < 16384; i++) begin
      model[i] = 1'($urandom);
      @(negedge clk);
      ld_en = 1; ld_addr = 14'(i); ld_data = model[i];
    end
    @(negedge clk);
    ld_en = 0;
    for (int i = 0; i < 16384 + 4000; i++) begin
      int a;
      a = (i < 16384) ? i : int'($urandom % 16384);
      address = 14'(a);
      @(negedge clk);
      checks++;
      if (q != model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d q=%b exp=%b", a, q, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
