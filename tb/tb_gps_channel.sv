// tb_gps_channel -- one channel driven directly with a sample counter, the
// time phase and a new host word every 4092 samples. Code index and
// satellite number (2 clocks after the sample), carrier and amplitude
// (3 clocks after) are compared with the reference equations. Intervals
// include overflow and underflow crossings of the code end.
module tb_gps_channel;
  import gps_pkg::*;
  import gps_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0;
  chan_word_t new_word;
  logic [11:0] cnt;
  logic [25:0] time_phase;
  logic [25:0] interp_phase;
  logic [9:0] code_idx;
  logic [4:0] sv_sel;
  logic signed [7:0] carrier;
  logic [6:0] amp;
  logic interp_wrap, phase_wrap;
  int checks = 0, failures = 0;
  int e_idx [8], e_car [8], e_amp [8], e_sv [8];
  int n_iwrap = 0, n_pwrap = 0;

  gps_channel dut (.clk, .rst, .load, .new_word, .cnt, .time_phase, .interp_phase,
                   .code_idx, .sv_sel, .carrier, .amp, .interp_wrap, .phase_wrap);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chan_word_t m_cur, m_prev;
    longint lp, tp, tot;
    int n, tc, ph, k;
    new_word = '0; cnt = '0; time_phase = '0;
    m_cur = '0; m_prev = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    n = 0; tc = 0; ph = 1015 * 256;
    for (int t = 0; t < 6 * 4092; t++) begin
      // inputs of sample t
      cnt  = 12'(n);
      load = (n == 4091);
      time_phase = 26'((tc / 8) * 65536 + (tc % 8) * 8192);
      if (n == 0) begin
        k = t / 4092;
        new_word.sv  = 5'(k * 7 + 3);
        new_word.amp = 7'($urandom);
        new_word.ovf = 1'b0; new_word.unf = 1'b0;
        // interval 1, 2: rising through the code end; 3, 4: falling
        if (k < 3) begin
          if (ph + 5 * 256 >= 1023 * 256) new_word.ovf = 1'b1;
          ph = (ph + 5 * 256) % (1023 * 256);
        end else begin
          if (ph - 9 * 256 < 0) new_word.unf = 1'b1;
          ph = (ph - 9 * 256 + 1023 * 256) % (1023 * 256);
        end
        new_word.phase = 18'(ph);
      end
      // reference for sample t
      lp  = interp_ref(longint'(m_prev.phase), longint'(m_cur.phase), m_cur.ovf, m_cur.unf, n, 4092);
      tp  = longint'(time_phase);
      tot = (lp + tp) % (1023 * 65536);
      e_idx[t % 8] = int'(tot / 65536);
      e_car[t % 8] = int'(((tot % 65536) * 512 / 65536) % 256);
      e_amp[t % 8] = amp_ref(int'(m_prev.amp), int'(m_cur.amp), n);
      e_sv[t % 8]  = int'(m_cur.sv);
      // outputs of earlier samples
      if (t >= 3) begin
        checks++;
        if (int'(code_idx) != e_idx[(t - 2) % 8] || int'(sv_sel) != e_sv[(t - 2) % 8] ||
            int'(carrier) != carrier_ref(e_car[(t - 3) % 8]) || int'(amp) != e_amp[(t - 3) % 8]) begin
          failures++;
          if (failures < 10)
            $display("t=%0d idx %0d/%0d sv %0d/%0d car %0d/%0d amp %0d/%0d", t, code_idx, e_idx[(t-2)%8],
                     sv_sel, e_sv[(t-2)%8], carrier, carrier_ref(e_car[(t-3)%8]), amp, e_amp[(t-3)%8]);
        end
      end
      if (interp_wrap) n_iwrap++;
      if (phase_wrap) n_pwrap++;
      @(negedge clk);
      if (load) begin
        m_prev = m_cur;
        m_cur  = new_word;
      end
      n  = (n == 4091) ? 0 : n + 1;
      tc = (tc == 8183) ? 0 : tc + 1;
    end
    checks++;
    if (n_iwrap == 0 || n_pwrap == 0) begin
      failures++;
      $display("wraps: interp %0d, phase %0d", n_iwrap, n_pwrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
