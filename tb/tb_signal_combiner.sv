// tb_signal_combiner -- D/A word = (sum of +-carrier*amp over channels) >>> 6,
// chip 1 inverting; random and full-scale inputs, one clock latency.
module tb_signal_combiner;
  logic clk = 1'b0, rst = 1'b1;
  logic chip [4];
  logic signed [7:0] carrier [4];
  logic [6:0] amp [4];
  logic signed [9:0] dac;
  int checks = 0, failures = 0;

  signal_combiner dut (.clk, .rst, .chip, .carrier, .amp, .dac);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int s;
    s = 0;
    for (int c = 0; c < 4; c++) s += (chip[c] ? -1 : 1) * int'(carrier[c]) * int'(amp[c]);
    @(negedge clk);
    checks++;
    if (int'(dac) != (s >>> 6)) begin
      failures++;
      if (failures < 10) $display("dac=%0d exp=%0d", dac, s >>> 6);
    end
  endtask

  initial begin
    for (int c = 0; c < 4; c++) begin chip[c] = 0; carrier[c] = '0; amp[c] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 4; c++) begin chip[c] = 0; carrier[c] = 8'sd64; amp[c] = 7'd127; end
    check_now();
    checks++;
    if (dac != 10'sd508) failures++;
    for (int c = 0; c < 4; c++) chip[c] = 1;
    check_now();
    checks++;
    if (dac != -10'sd508) failures++;
    for (int k = 0; k < 3000; k++) begin
      for (int c = 0; c < 4; c++) begin
        chip[c] = 1'($urandom);
        carrier[c] = 8'($urandom_range(0, 128) - 64);
        amp[c] = 7'($urandom);
      end
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
