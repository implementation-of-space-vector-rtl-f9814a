// svm_inverter_top -- FPGA space vector modulator for a two-level
// three-phase voltage source inverter.
//
// Two sources of switching states feed one dead-time stage:
//  * stored patterns: a 200 kHz strobe (svm_clk_div, 250 clocks at 50 MHz)
//    steps an address counter through 0..NUM_DATA; three one-bit pattern
//    memories of ROM_DEPTH words give Sa, Sb and Sc.  This replays a
//    precomputed SVM waveform sampled every 5 us.  The memories are filled
//    through the ld_* port (ld_data = {Sa, Sb, Sc}).
//  * live modulation: svm_modulator computes Sa, Sb, Sc each carrier period
//    (2*HALF_PERIOD clocks) from the d/q reference vd, vq (signed Q1.15
//    normalised to the DC-link voltage).
// use_live selects the source (1 = live).  The selected state, visible on
// sw_state = {Sa, Sb, Sc}, goes to svm_blanking, which drives the six IGBT
// gates with about 2 us of dead time between the switches of a leg.
// The stored-pattern path and the dead-time generator follow the board
// design; the live modulator is the SVM algorithm in hardware; the select and
// the load port are this design's own additions.  rst_n is asynchronous,
// active low.  Pattern memory read latency is one clock.  sector,
// period_start and ovm (reference clamped to the hexagon) report the live
// modulator's state.
module svm_inverter_top
  import svm_pkg::*;
#(
  parameter int unsigned HALF_PERIOD = 25000,   // 1 kHz carrier at 50 MHz
  parameter int unsigned CLK_DIV     = 250,     // 50 MHz -> 200 kHz strobe
  parameter int unsigned NUM_DATA    = 12001,   // last pattern address
  parameter int unsigned ROM_DEPTH   = 16384,
  parameter int unsigned AW          = 14,
  parameter int unsigned BLANK_DIV   = 18,
  parameter int unsigned BLANK_TICKS = 7,
  parameter int unsigned CW          = 13,
  parameter int unsigned VW          = svm_pkg::REF_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [VW-1:0] vd,
  input  logic signed [VW-1:0] vq,
  input  logic                 use_live,
  input  logic                 ld_en,
  input  logic [AW-1:0]        ld_addr,
  input  logic [2:0]           ld_data,
  output logic                 saup,
  output logic                 salow,
  output logic                 sbup,
  output logic                 sblow,
  output logic                 scup,
  output logic                 sclow,
  output sw_state_t            sw_state,
  output sector_t              sector,
  output logic                 period_start,
  output logic                 ovm,
  output logic [AW-1:0]        rom_addr
);

  logic      clk_200k;
  sw_state_t rom_sw, live_sw;

  // ---- stored-pattern path ----
  svm_clk_div #(.CNT_MAX(CLK_DIV)) u_clk_div (
    .clk(clk), .rst_n(rst_n), .clkout(clk_200k)
  );

  svm_addr_counter #(.NUM_DATA(NUM_DATA), .AW(AW)) u_addr (
    .clk(clk), .rst_n(rst_n), .en(clk_200k), .address(rom_addr)
  );

  svm_pattern_rom #(.DEPTH(ROM_DEPTH), .AW(AW)) u_lut_sa (
    .clk(clk), .address(rom_addr), .q(rom_sw.a),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data[2])
  );
  svm_pattern_rom #(.DEPTH(ROM_DEPTH), .AW(AW)) u_lut_sb (
    .clk(clk), .address(rom_addr), .q(rom_sw.b),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data[1])
  );
  svm_pattern_rom #(.DEPTH(ROM_DEPTH), .AW(AW)) u_lut_sc (
    .clk(clk), .address(rom_addr), .q(rom_sw.c),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data[0])
  );

  // ---- live modulator ----
  svm_modulator #(.HALF_PERIOD(HALF_PERIOD), .VW(VW)) u_mod (
    .clk(clk), .rst_n(rst_n), .vd(vd), .vq(vq),
    .sa(live_sw.a), .sb(live_sw.b), .sc(live_sw.c),
    .sector(sector), .period_start(period_start), .ovm(ovm)
  );

  assign sw_state = use_live ? live_sw : rom_sw;

  // ---- dead time ----
  svm_blanking #(.BLANK_DIV(BLANK_DIV), .BLANK_TICKS(BLANK_TICKS), .CW(CW)) u_blank (
    .clk(clk), .rst_n(rst_n),
    .sa(sw_state.a), .sb(sw_state.b), .sc(sw_state.c),
    .saup(saup), .salow(salow), .sbup(sbup), .sblow(sblow),
    .scup(scup), .sclow(sclow)
  );

endmodule
