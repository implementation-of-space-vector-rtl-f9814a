// svm_pattern_rom -- one-bit switching-pattern memory for one inverter phase.
//
// DEPTH words of one bit hold a phase's switching state sampled every 5 us.
// Reading is synchronous: q shows the word at the address presented on the
// previous clock edge (one clock of latency), like a single-port FPGA block
// ROM.  On the FPGA the contents come from an initialisation file at
// configuration time; here a write port (ld_en, ld_addr, ld_data) fills the
// memory instead, so any pattern can be loaded after reset.  The array is not
// reset.
module svm_pattern_rom #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned AW    = 14
) (
  input  logic          clk,
  input  logic [AW-1:0] address,
  output logic          q,
  input  logic          ld_en,
  input  logic [AW-1:0] ld_addr,
  input  logic          ld_data
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ld_en) mem[ld_addr] <= ld_data;
    q <= mem[address];
  end

endmodule
