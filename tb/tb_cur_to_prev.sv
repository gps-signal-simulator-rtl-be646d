// tb_cur_to_prev -- random loads into the current/previous register pair,
// compared with a two-entry history model.
module tb_cur_to_prev;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0;
  logic [19:0] new_val, cur, prev;
  logic [19:0] m_cur, m_prev;
  int checks = 0, failures = 0, n_load = 0;

  cur_to_prev dut (.clk, .rst, .load, .new_val, .cur, .prev);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    new_val = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    m_cur = '0; m_prev = '0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      checks++;
      if (cur != m_cur || prev != m_prev) begin
        failures++;
        if (failures < 10) $display("k=%0d cur=%h/%h prev=%h/%h", k, cur, m_cur, prev, m_prev);
      end
      load    = ($urandom_range(0, 3) == 0);
      new_val = 20'($urandom);
      if (load) begin
        m_prev = m_cur;
        m_cur  = new_val;
        n_load++;
      end
    end
    checks++;
    if (n_load < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
