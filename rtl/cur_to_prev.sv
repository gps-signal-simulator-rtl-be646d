// cur_to_prev -- current/previous value registers of one interpolated channel
// quantity.
//
// The interpolators need the value received at the start of the present
// update interval (prev) and the value it moves towards (cur). When `load` is
// high (the last sample of an interval) the register shifts cur into prev and
// takes the newest host value into cur, so each host value is first the
// target and one interval later the starting point. Used once for the code
// phase with its wrap flags and once for the amplitude. The two-register
// scheme and its update at the interval boundary follow the description;
// the flags travel with the value they were sent with. Synchronous,
// active-high reset clears both registers.
module cur_to_prev #(
  parameter int W = gps_pkg::PH_W + 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] new_val,
  output logic [W-1:0] cur,
  output logic [W-1:0] prev
);

  always_ff @(posedge clk) begin
    if (rst) begin
      cur  <= '0;
      prev <= '0;
    end else if (load) begin
      prev <= cur;
      cur  <= new_val;
    end
  end

endmodule
