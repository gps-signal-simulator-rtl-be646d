// tb_frame_assembler -- bytes in stream order become one 32-bit word per
// channel (most significant byte first); frame_done after the fourth
// channel; resync returns to channel 0 byte 0 after a partial frame.
module tb_frame_assembler;
  import gps_pkg::*;
  logic clk = 1'b0, rst = 1'b1, resync = 1'b0, byte_valid = 1'b0;
  logic [7:0] byte_data = '0;
  chan_word_t words [4];
  logic frame_done;
  int checks = 0, failures = 0, n_done = 0;
  logic [31:0] w [4];

  frame_assembler dut (.clk, .rst, .resync, .byte_valid, .byte_data, .words, .frame_done);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (frame_done) n_done++;

  task automatic put(logic [7:0] b);
    byte_data = b; byte_valid = 1'b1;
    @(negedge clk);
    byte_valid = 1'b0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  task automatic send_frame();
    for (int c = 0; c < 4; c++) begin
      w[c] = $urandom;
      for (int b = 3; b >= 0; b--) put(w[c][8*b +: 8]);
    end
    @(negedge clk);
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (32'(words[c]) != w[c]) begin
        failures++;
        $display("ch%0d word %h exp %h", c, words[c], w[c]);
      end
    end
  endtask

  initial begin
    chan_word_t cw;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int f = 0; f < 20; f++) send_frame();
    // field layout: sv, amp, ovf, unf, phase
    cw = words[3];
    checks++;
    if (cw.sv != w[3][31:27] || cw.amp != w[3][26:20] || cw.ovf != w[3][19] ||
        cw.unf != w[3][18] || cw.phase != w[3][17:0]) failures++;
    // partial frame, then resync
    put(8'hAA); put(8'h55); put(8'h11); put(8'h22); put(8'h33);
    resync = 1'b1; @(negedge clk); resync = 1'b0;
    send_frame();
    checks++;
    if (n_done != 21) begin
      failures++;
      $display("frames done %0d", n_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
