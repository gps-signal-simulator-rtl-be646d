// amp_interp -- linear interpolation of a channel's signal amplitude.
//
// Like the code phase, the 7-bit amplitude arrives at 2 kHz and is ramped
// linearly between updates:
//     amp(n) = prev + ((cur - prev) * n) >> SHIFT
// The difference is taken as a signed 8-bit value (zero-extended inputs),
// multiplied by the 12-bit time step and divided by 4096 with an arithmetic
// right shift of 12; the low 8 bits of the quotient are added to prev. This
// subtract / multiply / shift-by-12 / add structure follows the description.
// Because the shift divides by 4096 while an interval has 4092 samples, the
// ramp stops just short of cur (at most one step) before the next interval
// starts from cur.
//
// Timing: one register stage, like code_interp. Synchronous, active-high
// reset clears the output.
module amp_interp #(
  parameter int CNT_W = gps_pkg::CNT_W,
  parameter int SHIFT = 12
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [gps_pkg::AMP_W-1:0]  prev_amp,
  input  logic [gps_pkg::AMP_W-1:0]  cur_amp,
  input  logic [CNT_W-1:0]           cnt,
  output logic [gps_pkg::AMP_W-1:0]  amp
);
  import gps_pkg::*;

  localparam int DW = AMP_W + 1;
  localparam int PW = DW + CNT_W + 1;

  logic signed [DW-1:0] diff;
  logic signed [PW-1:0] prod;
  logic signed [DW-1:0] res;

  always_comb begin
    diff = DW'(cur_amp) - DW'(prev_amp);
    prod = PW'(diff) * PW'(signed'({1'b0, cnt}));
    res  = DW'(prod >>> SHIFT);
  end

  always_ff @(posedge clk) begin
    if (rst) amp <= '0;
    else     amp <= AMP_W'(DW'(prev_amp) + res);
  end

endmodule
