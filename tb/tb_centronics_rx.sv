// tb_centronics_rx -- a host model sends bytes with the strobe / busy
// handshake; each byte must be delivered exactly once, unchanged, with a
// 41-clock acknowledge pulse and busy high from the strobe to the end of
// the acknowledge. A long strobe must not deliver a byte twice.
module tb_centronics_rx;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] pp_data = '0;
  logic pp_nstrobe = 1'b1;
  logic pp_nack, pp_busy, byte_valid;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;
  byte unsigned sent [$];
  int n_got = 0, ack_len = 0, n_ack = 0;

  centronics_rx dut (.clk, .rst, .pp_data, .pp_nstrobe, .pp_nack, .pp_busy, .byte_valid, .byte_data);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver side monitor
  always @(posedge clk) if (!rst) begin
    if (byte_valid) begin
      checks++;
      if (sent.size() == 0 || byte_data != sent[0]) begin
        failures++;
        $display("unexpected byte %h", byte_data);
      end else void'(sent.pop_front());
      n_got++;
    end
    if (!pp_nack) begin
      ack_len++;
      checks++;
      if (!pp_busy) begin
        failures++;
        $display("ack while not busy");
      end
    end else if (ack_len != 0) begin
      checks++;
      if (ack_len != 41) begin
        failures++;
        $display("ack length %0d", ack_len);
      end
      ack_len = 0;
      n_ack++;
    end
  end

  task automatic send_byte(byte unsigned b, int strobe_len);
    while (pp_busy) @(negedge clk);
    pp_data = b;
    sent.push_back(b);
    repeat (2) @(negedge clk);
    pp_nstrobe = 1'b0;
    repeat (strobe_len) @(negedge clk);
    pp_nstrobe = 1'b1;
    repeat (2) @(negedge clk);
    pp_data = 8'($urandom);     // data changes after the strobe
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    checks++;
    if (pp_busy || !pp_nack) failures++;
    for (int k = 0; k < 40; k++) send_byte(8'($urandom), (k == 5) ? 100 : $urandom_range(4, 8));
    while (pp_busy) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (n_got != 40 || n_ack != 40 || sent.size() != 0) begin
      failures++;
      $display("got %0d bytes, %0d acks", n_got, n_ack);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
