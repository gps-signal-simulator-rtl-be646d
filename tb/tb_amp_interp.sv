// tb_amp_interp -- amplitude ramp against prev + floor((cur-prev)*n/4096),
// rising and falling, with one clock of latency.
module tb_amp_interp;
  import gps_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [6:0] prev_amp, cur_amp, amp;
  logic [11:0] cnt;
  int checks = 0, failures = 0;

  amp_interp dut (.clk, .rst, .prev_amp, .cur_amp, .cnt, .amp);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_one(int p, int c, int n);
    int e;
    prev_amp = 7'(p); cur_amp = 7'(c); cnt = 12'(n);
    @(negedge clk);
    e = amp_ref(p, c, n);
    checks++;
    if (int'(amp) != e) begin
      failures++;
      if (failures < 10) $display("prev=%0d cur=%0d n=%0d got=%0d exp=%0d", p, c, n, amp, e);
    end
  endtask

  initial begin
    prev_amp = '0; cur_amp = '0; cnt = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 4092; n += 3) try_one(10, 127, n);
    for (int n = 0; n < 4092; n += 3) try_one(120, 0, n);
    // end of interval lands within one step of the target
    try_one(0, 127, 4091);
    checks++;
    if (amp < 7'd126) failures++;
    for (int k = 0; k < 3000; k++)
      try_one($urandom_range(0, 127), $urandom_range(0, 127), $urandom_range(0, 4091));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
