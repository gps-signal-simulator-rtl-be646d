// tb_update_counter -- checks that the update counter runs 0..4091, pulses
// `update` on the last sample of each interval and so repeats every 4092
// clocks (8.184 MHz / 2 kHz).
module tb_update_counter;
  logic clk = 1'b0, rst = 1'b1;
  logic [11:0] cnt;
  logic update;
  int checks = 0, failures = 0;
  int exp_cnt, last_upd, n_upd;

  update_counter dut (.clk, .rst, .cnt, .update);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    exp_cnt = 0; last_upd = -1; n_upd = 0;
    for (int k = 0; k < 3 * 4092 + 10; k++) begin
      checks++;
      if (cnt != 12'(exp_cnt) || update != (exp_cnt == 4091)) begin
        failures++;
        if (failures < 10) $display("k=%0d cnt=%0d exp=%0d update=%b", k, cnt, exp_cnt, update);
      end
      if (update) begin
        if (last_upd >= 0) begin
          checks++;
          if (k - last_upd != 4092) begin
            failures++;
            $display("update period %0d", k - last_upd);
          end
        end
        last_upd = k;
        n_upd++;
      end
      exp_cnt = (exp_cnt == 4091) ? 0 : exp_cnt + 1;
      @(negedge clk);
    end
    checks++;
    if (n_upd != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
