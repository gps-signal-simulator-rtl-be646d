// signal_combiner -- sums the satellite channels into one D/A sample.
//
// Each channel's signal is its carrier sample, scaled by its amplitude and
// binary-phase modulated by its C/A chip (chip 0 keeps the sign, chip 1
// inverts it). The NUM_CH products are summed and the sum is shifted right by
// SHIFT to fit the DAC_W-bit two's complement D/A word. With the default
// widths a channel contributes at most 64 * 127 / 64 = 127 steps, so four
// channels stay within +-508 of the 10-bit range. That the FPGA feeds one
// 10-bit sample per 8.184 MHz clock to the D/A converter follows the
// description; the modulation sign convention, the product form and the
// scaling are this implementation's choices.
//
// Timing: one register stage. Synchronous, active-high reset.
module signal_combiner #(
  parameter int NUM_CH = gps_pkg::NUM_CH,
  parameter int SHIFT  = 6
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              chip    [NUM_CH],
  input  logic signed [gps_pkg::CAR_W-1:0]  carrier [NUM_CH],
  input  logic [gps_pkg::AMP_W-1:0]         amp     [NUM_CH],
  output logic signed [gps_pkg::DAC_W-1:0]  dac
);
  import gps_pkg::*;

  localparam int PW = CAR_W + AMP_W + 1;
  localparam int SW = PW + $clog2(NUM_CH + 1);

  logic signed [PW-1:0] prod [NUM_CH];
  logic signed [SW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int c = 0; c < NUM_CH; c++) begin
      prod[c] = PW'(carrier[c]) * PW'(signed'({1'b0, amp[c]}));
      if (chip[c]) prod[c] = -prod[c];
      sum += SW'(prod[c]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) dac <= '0;
    else     dac <= DAC_W'(sum >>> SHIFT);
  end

endmodule
