// tb_code_tables -- C/A code tables of all 32 satellites against the
// delayed-G2 form of the code and the published first ten chips (octal) of
// each PRN; eight channels read at once with one clock of latency.
module tb_code_tables;
  import gps_ref_pkg::*;
  logic clk = 1'b0;
  logic [4:0] sel [8];
  logic [9:0] idx [8];
  logic       chip [8];
  int checks = 0, failures = 0;
  // first 10 chips of PRN 1..32, octal
  int first10 [32] = '{'o1440, 'o1620, 'o1710, 'o1744, 'o1133, 'o1455, 'o1131, 'o1454,
                       'o1626, 'o1504, 'o1642, 'o1750, 'o1764, 'o1772, 'o1775, 'o1776,
                       'o1156, 'o1467, 'o1633, 'o1715, 'o1746, 'o1763, 'o1063, 'o1706,
                       'o1743, 'o1761, 'o1770, 'o1774, 'o1127, 'o1453, 'o1625, 'o1712};

  code_tables dut (.clk, .sel, .idx, .chip);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s [8];
    int ix [8];
    int v;
    for (int c = 0; c < 8; c++) begin sel[c] = '0; idx[c] = '0; end
    // first ten chips: channel c reads chip k of PRN p
    for (int p = 1; p <= 32; p++) begin
      v = 0;
      for (int k = 0; k < 10; k++) begin
        sel[0] = 5'(p - 1); idx[0] = 10'(k);
        @(negedge clk);
        v = (v << 1) | int'(chip[0]);
      end
      checks++;
      if (v != first10[p - 1]) begin
        failures++;
        $display("PRN %0d first chips %o exp %o", p, v, first10[p - 1]);
      end
    end
    // random reads on all channels against the delayed-G2 model
    for (int k = 0; k < 3000; k++) begin
      for (int c = 0; c < 8; c++) begin
        s[c]  = $urandom_range(1, 32);
        ix[c] = $urandom_range(0, 1022);
        sel[c] = 5'(s[c] - 1);
        idx[c] = 10'(ix[c]);
      end
      @(negedge clk);
      for (int c = 0; c < 8; c++) begin
        checks++;
        if (chip[c] != ca_ref(s[c], ix[c])) begin
          failures++;
          if (failures < 10) $display("ch%0d PRN %0d chip %0d got %b", c, s[c], ix[c], chip[c]);
        end
      end
    end
    // index 1023 is outside the code
    idx[0] = 10'd1023;
    @(negedge clk);
    checks++;
    if (chip[0] !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
