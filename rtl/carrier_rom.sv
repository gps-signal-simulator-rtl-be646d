// carrier_rom -- 256-entry carrier lookup table of one channel.
//
// One carrier cycle is stored over DEPTH = 256 entries of 8-bit two's
// complement samples spanning -64 .. +64 (a 7-bit magnitude range per
// channel). The entry values are those of the documented simulation: a
// triangle, +64 at entry 0, -64 at entry 128, e.g. entry 114 = -50,
// entry 229 = +37 (value = |i - 128| - 64). The table is built at
// elaboration by gps_pkg::carrier_value.
//
// Timing: registered read like a synchronous ROM; `q` is valid one clock
// after `addr`. No reset.
module carrier_rom #(
  parameter int DEPTH = 1 << gps_pkg::CAR_IDX_W
) (
  input  logic                               clk,
  input  logic [$clog2(DEPTH)-1:0]           addr,
  output logic signed [gps_pkg::CAR_W-1:0]   q
);
  import gps_pkg::*;

  typedef logic signed [CAR_W-1:0] rom_t [DEPTH];

  function automatic rom_t build();
    rom_t r;
    for (int i = 0; i < DEPTH; i++) r[i] = carrier_value(i * 256 / DEPTH);
    return r;
  endfunction

  localparam rom_t ROM = build();

  always_ff @(posedge clk) q <= ROM[addr];

endmodule
