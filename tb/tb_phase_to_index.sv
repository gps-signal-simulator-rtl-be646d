// tb_phase_to_index -- sum of interpolated and time phase folded into one
// code period; code index = integer chip, carrier index = twice the
// fraction in 1/256 cycles. One clock of latency.
module tb_phase_to_index;
  logic clk = 1'b0, rst = 1'b1;
  logic [25:0] los_phase, time_phase;
  logic [9:0] code_idx;
  logic [7:0] car_idx;
  logic wrapped;
  int checks = 0, failures = 0, n_wrap = 0;

  phase_to_index dut (.clk, .rst, .los_phase, .time_phase, .code_idx, .car_idx, .wrapped);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_one(longint a, longint b);
    longint t, ec, ek;
    los_phase = 26'(a); time_phase = 26'(b);
    @(negedge clk);
    t  = (a + b) % (1023 * 65536);
    ec = t / 65536;
    ek = ((t % 65536) * 2 * 256 / 65536) % 256;
    checks++;
    if (longint'(code_idx) != ec || longint'(car_idx) != ek || wrapped != (a + b >= 1023 * 65536)) begin
      failures++;
      if (failures < 10) $display("a=%0d b=%0d got %0d/%0d exp %0d/%0d", a, b, code_idx, car_idx, ec, ek);
    end
    if (wrapped) n_wrap++;
  endtask

  initial begin
    los_phase = '0; time_phase = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    try_one(1022 * 65536 + 65535, 1);
    try_one(0, 0);
    try_one(100 * 65536 + 32768, 0);     // half chip -> carrier index 0 (one full cycle)
    try_one(100 * 65536 + 16384, 0);     // quarter chip -> carrier index 128
    for (int k = 0; k < 5000; k++)
      try_one(longint'($urandom_range(0, 1023 * 65536 - 1)), longint'($urandom_range(0, 1023 * 65536 - 1)));
    checks++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
