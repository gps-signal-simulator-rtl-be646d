// phase_to_index -- total code phase of a channel and its two table indices.
//
// The interpolated line-of-sight phase and the common phase due to time are
// added and folded back into one code period (both inputs are below 1023
// chips, so one conditional subtraction suffices). The integer part of the
// sum is the chip number that indexes the channel's C/A code table. The
// fraction gives the carrier table index: the carrier runs at 2.046 MHz and
// the code at 1.023 MHz, two carrier cycles per chip, so the carrier phase is
// twice the fraction, modulo one cycle, times the 256 table entries, i.e.
// fraction bits [14:7]. The use of the integer part for the code and of the
// doubled fraction for the carrier follows the description; the index is
// taken by bit selection (times 256).
//
// Timing: one register stage. Synchronous, active-high reset.
module phase_to_index (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [gps_pkg::IP_W-1:0]      los_phase,   // interpolated, 10.16
  input  logic [gps_pkg::IP_W-1:0]      time_phase,  // phase due to time, 10.16
  output logic [gps_pkg::PH_INT_W-1:0]  code_idx,    // 0 .. 1022
  output logic [gps_pkg::CAR_IDX_W-1:0] car_idx,     // 0 .. 255
  output logic                          wrapped
);
  import gps_pkg::*;

  localparam logic [IP_W:0] CODE_LEN_X = (IP_W+1)'(CA_LEN << IP_FRAC_W);

  logic [IP_W:0]   sum;
  logic [IP_W-1:0] total;
  logic            over;

  always_comb begin
    sum   = (IP_W+1)'(los_phase) + (IP_W+1)'(time_phase);
    over  = (sum >= CODE_LEN_X);
    total = over ? IP_W'(sum - CODE_LEN_X) : IP_W'(sum);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      code_idx <= '0;
      car_idx  <= '0;
      wrapped  <= 1'b0;
    end else begin
      code_idx <= total[IP_W-1 -: PH_INT_W];
      car_idx  <= total[IP_FRAC_W-2 -: CAR_IDX_W];
      wrapped  <= over;
    end
  end

endmodule
