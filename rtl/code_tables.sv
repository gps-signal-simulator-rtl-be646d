// code_tables -- C/A code lookup for every channel.
//
// One read-only table of 1023 chips per satellite (NUM_SV = 32 tables). Each
// channel selects a table with its satellite number and reads the chip at
// its code index; the output is registered, as in a clocked ROM. Tables are
// filled at elaboration from the standard two-register Gold code generator
// (gps_pkg::ca_code), chip 0 being the first chip of the code period.
// The structure (32 tables, a selector and a 10-bit index per channel,
// eight channel ports on the original table block) follows the description;
// computing the contents from the generator polynomials and numbering
// satellites 0..31 for SV 1..32 are this implementation's choices.
//
// Timing: `chip` is valid one clock after `sel` / `idx`. An index of 1023 or
// more reads 0. No reset.
module code_tables #(
  parameter int NUM_CH = 8,
  parameter int NUM_SV = gps_pkg::NUM_SV
) (
  input  logic                         clk,
  input  logic [gps_pkg::SV_W-1:0]     sel [NUM_CH],
  input  logic [gps_pkg::PH_INT_W-1:0] idx [NUM_CH],
  output logic                         chip [NUM_CH]
);
  import gps_pkg::*;

  logic [(1 << PH_INT_W)-1:0] table_sv [NUM_SV];

  for (genvar s = 0; s < NUM_SV; s++) begin : g_sv
    localparam logic [CA_LEN-1:0] CODE = ca_code(s + 1);
    assign table_sv[s] = {1'b0, CODE};
  end

  always_ff @(posedge clk) begin
    for (int c = 0; c < NUM_CH; c++)
      chip[c] <= (int'(sel[c]) < NUM_SV) ? table_sv[sel[c]][idx[c]] : 1'b0;
  end

endmodule
