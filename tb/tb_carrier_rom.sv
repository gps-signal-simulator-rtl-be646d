// tb_carrier_rom -- carrier table contents: the index/value pairs of the
// documented simulation, then all 256 entries against the triangle rule,
// each one clock after its address.
module tb_carrier_rom;
  import gps_ref_pkg::*;
  logic clk = 1'b0;
  logic [7:0] addr;
  logic signed [7:0] q;
  int checks = 0, failures = 0;
  int doc_idx [18] = '{0, 114, 229, 89, 204, 63, 178, 38, 153, 13, 127, 242, 102, 217, 77, 191, 51, 166};
  int doc_val [18] = '{64, -50, 37, -25, 12, 1, -14, 26, -39, 51, -63, 50, -38, 25, -13, -1, 13, -26};

  carrier_rom dut (.clk, .addr, .q);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0;
    @(negedge clk);
    for (int k = 0; k < 18; k++) begin
      addr = 8'(doc_idx[k]);
      @(negedge clk);
      checks++;
      if (int'(q) != doc_val[k]) begin
        failures++;
        $display("index %0d value %0d expected %0d", doc_idx[k], q, doc_val[k]);
      end
    end
    for (int k = 0; k < 256; k++) begin
      addr = 8'(k);
      @(negedge clk);
      checks++;
      if (int'(q) != carrier_ref(k)) begin
        failures++;
        if (failures < 10) $display("index %0d value %0d", k, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
