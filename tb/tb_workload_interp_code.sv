// tb_workload_interp_code -- the two reference simulations of the original
// design, run on one channel and the code tables at full size:
//   * interpolation of the code phase from chip 100 to chip 1022 over one
//     4092-sample update interval, with the carrier generated from the
//     interpolated fraction;
//   * C/A code of SV 1 on channel 1 along that phase.
// As in those simulations, no phase due to time is added (time_phase = 0).
// Every sample of the interval is checked: code index = 100 + 922*n/4092,
// carrier = table value at twice the fraction, chip = SV 1 code at the
// index. The first samples are printed for comparison.
module tb_workload_interp_code;
  import gps_pkg::*;
  import gps_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0;
  chan_word_t new_word;
  logic [11:0] cnt = '0;
  logic [25:0] interp_phase;
  logic [9:0] code_idx;
  logic [4:0] sv_sel;
  logic signed [7:0] carrier;
  logic [6:0] amp;
  logic interp_wrap, phase_wrap;
  logic [4:0] sel [1];
  logic [9:0] idx [1];
  logic       chip [1];
  int checks = 0, failures = 0;
  int e_idx [8], e_car [8];

  gps_channel u_ch (.clk, .rst, .load, .new_word, .cnt, .time_phase(26'd0), .interp_phase,
                    .code_idx, .sv_sel, .carrier, .amp, .interp_wrap, .phase_wrap);
  code_tables #(.NUM_CH(1)) u_codes (.clk, .sel, .idx, .chip);

  assign sel[0] = sv_sel;
  assign idx[0] = code_idx;

  always #61 clk = ~clk;

  initial begin
    #(3 * 4092 * 122 + 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint lp;
    new_word = '{sv: 5'd0, amp: 7'd64, ovf: 1'b0, unf: 1'b0, phase: 18'(100 * 256)};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // two loads: prev = 100, cur = 1022
    load = 1'b1; @(negedge clk);
    new_word.phase = 18'(1022 * 256);
    @(negedge clk); load = 1'b0;
    for (int n = 0; n < 4092 + 3; n++) begin
      cnt = 12'(n < 4092 ? n : 4091);
      lp = interp_ref(100 * 256, 1022 * 256, 0, 0, n < 4092 ? n : 4091, 4092);
      e_idx[n % 8] = int'(lp / 65536);
      e_car[n % 8] = int'(((lp % 65536) * 512 / 65536) % 256);
      if (n >= 3) begin
        checks++;
        if (int'(code_idx) != e_idx[(n - 2) % 8] || int'(carrier) != carrier_ref(e_car[(n - 3) % 8]) ||
            chip[0] != ca_ref(1, e_idx[(n - 3) % 8])) begin
          failures++;
          if (failures < 10) $display("n=%0d idx %0d/%0d car %0d chip %b", n, code_idx,
                                      e_idx[(n - 2) % 8], carrier, chip[0]);
        end
        if (n < 23)
          $display("sample %2d: code index %4d  carrier index %3d  carrier %4d  SV1 chip %b",
                   n - 3, e_idx[(n - 3) % 8], e_car[(n - 3) % 8], carrier, chip[0]);
      end
      @(negedge clk);
    end
    // the last sample of the interval is within one step of chip 1022
    checks++;
    if (e_idx[(4091) % 8] != 1021 && e_idx[4091 % 8] != 1022) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
