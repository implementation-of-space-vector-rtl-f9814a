// tb_svm_addr_counter -- with the default NUM_DATA = 12001 the address must
// step 0, 1, ..., 12001, 0, ... on enabled clocks only, so one pass takes
// 12002 enables; a disabled clock must hold the address.
module tb_svm_addr_counter;
  logic clk = 0, rst_n = 0, en = 0;
  logic [13:0] address;
  int checks = 0, failures = 0;

  svm_addr_counter dut (.clk(clk), .rst_n(rst_n), .en(en), .address(address));

  always #10 clk = ~clk;

  initial begin
    int exp, wraps;
    repeat (2) @(negedge clk);
    checks++;
    if (address != 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    exp = 0; wraps = 0;
    for (int i = 0; i < 2 * 12002 + 100; i++) begin
      en = ($urandom % 4) != 0;
      @(negedge clk);
      if (en) begin
        exp = (exp < 12001) ? exp + 1 : 0;
        if (exp == 0) wraps++;
      end
      checks++;
      if (int'(address) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL address %0d exp %0d", address, exp);
      end
    end
    checks++;
    if (wraps < 1) begin failures++; $display("FAIL never wrapped"); end
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
