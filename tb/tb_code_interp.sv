// tb_code_interp -- code phase interpolation against the reference equation.
// Covers plain intervals in both directions, the documented 100 -> 1022 chip
// case, and intervals flagged as overflow (phase runs 1022 -> 0) and
// underflow (0 -> 1022), checking the fold-back into one code period and
// the one-clock latency.
module tb_code_interp;
  import gps_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [17:0] prev_phase, cur_phase;
  logic ovf, unf;
  logic [11:0] cnt;
  logic [25:0] phase;
  logic wrapped;
  int checks = 0, failures = 0, n_wrap = 0, n_ovf = 0, n_unf = 0;

  code_interp dut (.clk, .rst, .prev_phase, .cur_phase, .ovf, .unf, .cnt, .phase, .wrapped);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_one(int p, int c, bit o, bit u, int n);
    longint e;
    prev_phase = 18'(p); cur_phase = 18'(c); ovf = o; unf = u; cnt = 12'(n);
    @(negedge clk);
    e = interp_ref(p, c, o, u, n, 4092);
    checks++;
    if (longint'(phase) != e) begin
      failures++;
      if (failures < 10)
        $display("prev=%0d cur=%0d o=%b u=%b n=%0d got=%h exp=%h", p, c, o, u, n, phase, e);
    end
    if (wrapped) n_wrap++;
  endtask

  initial begin
    int p, c;
    prev_phase = '0; cur_phase = '0; ovf = 0; unf = 0; cnt = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // the documented example: 100 -> 1022 chips, no flag
    for (int n = 0; n < 4092; n += 7) try_one(100 * 256, 1022 * 256, 0, 0, n);
    // endpoints: n = 0 gives prev exactly
    try_one(500 * 256 + 17, 3 * 256, 0, 0, 0);
    checks++;
    if (phase != 26'((500 * 256 + 17) * 256)) failures++;
    // overflow: 1020 -> 2 chips, must rise through 1022 -> 0
    for (int n = 0; n < 4092; n += 31) begin
      try_one(1020 * 256, 2 * 256, 1, 0, n);
      n_ovf++;
    end
    // underflow: 3 -> 1019 chips, must fall through 0 -> 1022
    for (int n = 0; n < 4092; n += 31) begin
      try_one(3 * 256, 1019 * 256 + 128, 0, 1, n);
      n_unf++;
    end
    // random intervals
    for (int k = 0; k < 4000; k++) begin
      p = $urandom_range(0, 1023 * 256 - 1);
      case ($urandom_range(0, 2))
        0: try_one(p, $urandom_range(0, 1023 * 256 - 1), 0, 0, $urandom_range(0, 4091));
        1: try_one(p, $urandom_range(0, 1023 * 256 - 1), 1, 0, $urandom_range(0, 4091));
        default: try_one(p, $urandom_range(0, 1023 * 256 - 1), 0, 1, $urandom_range(0, 4091));
      endcase
    end
    checks++;
    if (n_wrap == 0) begin
      failures++;
      $display("fold-back never happened");
    end
    $display("wrapped samples: %0d", n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
