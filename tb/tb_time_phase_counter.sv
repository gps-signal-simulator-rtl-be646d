// tb_time_phase_counter -- checks the phase due to time: one chip every
// 8 samples, wrapping after 1023 chips (8184 samples, 1 ms), with `epoch` on
// the first sample of each code period.
module tb_time_phase_counter;
  logic clk = 1'b0, rst = 1'b1;
  logic [25:0] phase;
  logic epoch;
  int checks = 0, failures = 0;
  int n_epoch = 0;

  time_phase_counter dut (.clk, .rst, .phase, .epoch);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 2 * 8184 + 20; k++) begin
      // chip = s / 8, fraction = (s % 8) / 8 of a chip
      expv = longint'((k % 8184) / 8) * 65536 + longint'(k % 8) * 8192;
      checks++;
      if (longint'(phase) != expv || epoch != (k % 8184 == 0)) begin
        failures++;
        if (failures < 10) $display("k=%0d phase=%h exp=%h epoch=%b", k, phase, expv, epoch);
      end
      if (epoch) n_epoch++;
      @(negedge clk);
    end
    checks++;
    if (n_epoch != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
