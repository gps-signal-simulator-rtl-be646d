// update_counter -- sample counter of the 2 kHz host update interval.
//
// The datapath is clocked at the sample rate (8.184 MHz); every clock is one
// output sample. This counter runs 0 .. PERIOD-1 and gives the interpolators
// their time step within the current update interval. On the last sample of
// an interval (count = PERIOD-1) it raises `update` for one clock; at that edge
// the channel registers shift current into previous and load the newest host
// data, so that the next interval starts at count 0 with fresh values.
//
// PERIOD = 4092 samples follows from the described 8.184 MHz sample rate and
// 2 kHz update rate. (The original counter decoded 4092 as its terminal
// count, giving a 4093-sample interval; here the interval is exactly
// 8.184 MHz / 2 kHz.) Synchronous, active-high reset to count 0.
module update_counter #(
  parameter int PERIOD = gps_pkg::UPDATE_PERIOD,
  parameter int CNT_W  = gps_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst,
  output logic [CNT_W-1:0] cnt,     // time step within the interval
  output logic             update   // last sample of the interval
);

  assign update = (cnt == CNT_W'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (rst || update) cnt <= '0;
    else               cnt <= cnt + 1'b1;
  end

endmodule
