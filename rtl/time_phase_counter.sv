// time_phase_counter -- code phase due to the passage of time.
//
// All satellites transmit their C/A code in step with GPS time, so the code
// phase seen by a receiver advances by one chip every 1/1.023 MHz besides the
// change caused by the line-of-sight distance. At 8.184 MHz this is
// SAMPLES_PER_CHIP = 8 samples per chip, and one code period of 1023 chips is
// CODE_SAMPLES = 8184 samples. The counter runs 0 .. CODE_SAMPLES-1; its upper
// bits are the chip number and its lower bits the position inside the chip,
// so `phase` (10 integer, 16 fractional chip bits) is the count shifted into
// place. With two carrier cycles per chip, the two lowest count bits walk
// the carrier through its four quarter cycles.
//
// The count of 8184 and the use of its low bits for the carrier and high bits
// for the code follow the description; the 10.16 output format matches the
// interpolator here. Because time moves the phase in whole eighths of a
// chip, the 13 lowest bits of `phase` are always zero; they are kept so the
// output adds directly to the interpolated phase. `epoch` marks the first
// sample of each code period.
// Synchronous, active-high reset to phase 0.
module time_phase_counter #(
  parameter int CODE_SAMPLES     = gps_pkg::CA_LEN * gps_pkg::SAMPLES_PER_CHIP,
  parameter int SAMPLES_PER_CHIP = gps_pkg::SAMPLES_PER_CHIP
) (
  input  logic                    clk,
  input  logic                    rst,
  output logic [gps_pkg::IP_W-1:0] phase,   // time phase, 10.16 chips
  output logic                    epoch     // phase is 0 this sample
);
  import gps_pkg::*;

  localparam int SUB_W = $clog2(SAMPLES_PER_CHIP);
  localparam int TC_W  = $clog2(CODE_SAMPLES);

  logic [TC_W-1:0] tcnt;

  always_ff @(posedge clk) begin
    if (rst || tcnt == TC_W'(CODE_SAMPLES - 1)) tcnt <= '0;
    else                                         tcnt <= tcnt + 1'b1;
  end

  // chip = tcnt / SAMPLES_PER_CHIP, fraction = (tcnt % SAMPLES_PER_CHIP) / SAMPLES_PER_CHIP
  assign phase = IP_W'({tcnt, {(IP_FRAC_W - SUB_W){1'b0}}});
  assign epoch = (tcnt == '0);

endmodule
