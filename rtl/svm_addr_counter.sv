// svm_addr_counter -- address generator for the stored switching patterns.
//
// On every clock with en = 1 the address advances by one while it is below
// NUM_DATA and returns to 0 otherwise, so one pass visits addresses
// 0..NUM_DATA (NUM_DATA+1 steps).  With NUM_DATA = 12001 and a 5 us enable a
// pass lasts 60.01 ms, three cycles of a 50 Hz output.  Reset (asynchronous,
// active low) clears the address.
module svm_addr_counter #(
  parameter int unsigned NUM_DATA = 12001,
  parameter int unsigned AW       = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [AW-1:0] address
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          address <= '0;
    else if (en) begin
      if (address < AW'(NUM_DATA))       address <= address + 1'b1;
      else                               address <= '0;
    end
  end

endmodule
