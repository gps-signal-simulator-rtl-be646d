// tb_gps_sim_top -- end-to-end test of the FPGA signal generator at its
// default size (4 channels, 4092-sample update interval, 8.184 MHz clock).
//
// A host model sends one frame of four channel words per update interval
// over the parallel port with the strobe / busy handshake. A reference model
// follows the same frames, update boundaries and time phase and predicts,
// for every sample, each channel's code index, C/A chip, carrier sample and
// amplitude and the summed D/A word; all are compared at their pipeline
// latency (2, 3, 3, 3 and 4 clocks). The run covers: code phase crossing the
// end of the code upward (overflow flag) and downward (underflow flag), the
// documented 100 -> 1022 chip interval, an interval with no new frame
// (stale update), a resynchronisation of the byte stream after a partial
// frame, code period epochs and the fold-back of the total phase. Each of
// these is counted and must happen at least once.
module tb_gps_sim_top;
  import gps_pkg::*;
  import gps_ref_pkg::*;

  localparam int NI = 8;   // update intervals simulated

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] pp_data = '0;
  logic pp_nstrobe = 1'b1, pp_ninit = 1'b1;
  logic pp_nack, pp_busy;
  logic signed [9:0] dac_data;
  logic update, code_epoch, frame_done;
  logic ch_code [4];
  logic signed [7:0] ch_carrier [4];
  logic [6:0] ch_amp [4];
  logic [9:0] ch_code_idx [4];
  logic [3:0] ch_interp_wrap, ch_phase_wrap;

  int checks = 0, failures = 0;

  gps_sim_top dut (.clk, .rst, .pp_data, .pp_nstrobe, .pp_ninit, .pp_nack, .pp_busy,
                   .dac_data, .update, .code_epoch, .frame_done, .ch_code, .ch_carrier,
                   .ch_amp, .ch_code_idx, .ch_interp_wrap, .ch_phase_wrap);

  always #61 clk = ~clk;    // about 8.2 MHz

  initial begin
    #(NI * 4092 * 122 + 2000000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- C/A reference tables ----------------
  bit ca_tab [32][1023];
  initial begin
    bit g1 [1023];
    bit g2 [1023];
    bit [9:0] r1, r2;
    r1 = '1; r2 = '1;
    for (int t = 0; t < 1023; t++) begin
      g1[t] = r1[9]; g2[t] = r2[9];
      r1 = {r1[8:0], r1[2] ^ r1[9]};
      r2 = {r2[8:0], r2[1] ^ r2[2] ^ r2[5] ^ r2[7] ^ r2[8] ^ r2[9]};
    end
    for (int p = 1; p <= 32; p++)
      for (int i = 0; i < 1023; i++)
        ca_tab[p - 1][i] = g1[i] ^ g2[(i - g2_delay(p) + 1023) % 1023];
  end

  // ---------------- host model ----------------
  chan_word_t sent [4];       // frame most recently delivered
  int n_bytes = 0, n_frames_sent = 0, n_resync = 0, n_stale = 0;

  task automatic send_byte(logic [7:0] b);
    while (pp_busy) @(negedge clk);
    pp_data = b;
    repeat (2) @(negedge clk);
    pp_nstrobe = 1'b0;
    repeat (5) @(negedge clk);
    pp_nstrobe = 1'b1;
    while (!pp_busy) @(negedge clk);
    n_bytes++;
  endtask

  task automatic send_frame(chan_word_t w [4]);
    for (int c = 0; c < 4; c++)
      for (int b = 3; b >= 0; b--) send_byte(w[c][8*b +: 8]);
    while (pp_busy) @(negedge clk);
    n_frames_sent++;
  endtask

  // channel trajectories, chips * 256
  int ph [4];
  chan_word_t next [4];

  function automatic void make_frame(int k);
    int np;
    // ch0: SV 1, rising 300 chips per interval (crosses the code end upward)
    np = ph[0] + 300 * 256;
    next[0] = '{sv: 5'd0, amp: 7'(40 + 10 * k), ovf: (np >= 1023 * 256), unf: 1'b0,
                phase: 18'(np % (1023 * 256))};
    ph[0] = np % (1023 * 256);
    // ch1: SV 7, falling 250.5 chips per interval (crosses zero downward)
    np = ph[1] - 250 * 256 - 128;
    next[1] = '{sv: 5'd6, amp: 7'(127 - 9 * k), ovf: 1'b0, unf: (np < 0),
                phase: 18'((np + 1023 * 256) % (1023 * 256))};
    ph[1] = (np + 1023 * 256) % (1023 * 256);
    // ch2: SV 19, alternating between chip 100 and chip 1022
    ph[2] = (k % 2 == 0) ? 100 * 256 : 1022 * 256;
    next[2] = '{sv: 5'd18, amp: 7'd100, ovf: 1'b0, unf: 1'b0, phase: 18'(ph[2])};
    // ch3: SV 32, random small steps, random amplitude
    np = ph[3] + $urandom_range(0, 40 * 256);
    next[3] = '{sv: 5'd31, amp: 7'($urandom), ovf: (np >= 1023 * 256), unf: 1'b0,
                phase: 18'(np % (1023 * 256))};
    ph[3] = np % (1023 * 256);
  endfunction

  initial begin
    ph[0] = 400 * 256; ph[1] = 400 * 256; ph[2] = 0; ph[3] = 17 * 256 + 33;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < NI - 1; k++) begin
      make_frame(k);
      if (k == 3) begin
        // no frame this interval: the next update is stale
        n_stale++;
      end else begin
        if (k == 5) begin
          // a partial frame, then the initialise line restarts the stream
          send_byte(8'hA5); send_byte(8'h5A); send_byte(8'h3C);
          pp_ninit = 1'b0;
          repeat (4) @(negedge clk);
          pp_ninit = 1'b1;
          repeat (4) @(negedge clk);
          n_resync++;
        end
        sent = next;
        send_frame(next);
      end
      // wait for the next update boundary
      @(posedge update);
      @(negedge clk);
    end
  end

  // ---------------- reference model and checks ----------------
  chan_word_t m_words [4], m_cur [4], m_prev [4];
  bit         m_fresh;
  int         n_m, tc_m, t_m;
  int         e_idx [4][8], e_chip [4][8], e_car [4][8], e_amp [4][8], e_dac [8];
  int         n_update = 0, n_fd = 0, n_epoch = 0, n_iwrap = 0, n_pwrap = 0;
  int         n_ovf_int = 0, n_unf_int = 0, n_stale_upd = 0, n_doc_int = 0;
  bit         started = 0;

  always @(posedge clk) begin
    longint lp, tp, tot;
    int s;
    if (rst) begin
      for (int c = 0; c < 4; c++) begin m_words[c] = '0; m_cur[c] = '0; m_prev[c] = '0; end
      m_fresh = 0; n_m = 0; tc_m = 0; t_m = 0; started = 1;
    end else if (started) begin
      // ---- reference for sample t_m (values before this edge)
      checks++;
      if (update != (n_m == 4091) || code_epoch != (tc_m == 0)) begin
        failures++;
        if (failures < 10) $display("t=%0d timing: update %b epoch %b", t_m, update, code_epoch);
      end
      tp = longint'(tc_m / 8) * 65536 + longint'(tc_m % 8) * 8192;
      s = 0;
      for (int c = 0; c < 4; c++) begin
        lp  = interp_ref(longint'(m_prev[c].phase), longint'(m_cur[c].phase),
                         m_cur[c].ovf, m_cur[c].unf, n_m, 4092);
        tot = (lp + tp) % (1023 * 65536);
        e_idx[c][t_m % 8]  = int'(tot / 65536);
        e_car[c][t_m % 8]  = int'(((tot % 65536) * 512 / 65536) % 256);
        e_chip[c][t_m % 8] = int'(ca_tab[m_cur[c].sv][e_idx[c][t_m % 8]]);
        e_amp[c][t_m % 8]  = amp_ref(int'(m_prev[c].amp), int'(m_cur[c].amp), n_m);
      end
      // ---- outputs of earlier samples
      if (t_m >= 4) begin
        s = 0;
        for (int c = 0; c < 4; c++) begin
          int t2, t3;
          t2 = (t_m - 2) % 8; t3 = (t_m - 3) % 8;
          checks++;
          if (int'(ch_code_idx[c]) != e_idx[c][t2] || int'(ch_code[c]) != e_chip[c][t3] ||
              int'(ch_carrier[c]) != carrier_ref(e_car[c][t3]) || int'(ch_amp[c]) != e_amp[c][t3]) begin
            failures++;
            if (failures < 10)
              $display("t=%0d ch%0d idx %0d/%0d chip %0d/%0d car %0d/%0d amp %0d/%0d", t_m, c,
                       ch_code_idx[c], e_idx[c][t2], ch_code[c], e_chip[c][t3],
                       ch_carrier[c], carrier_ref(e_car[c][t3]), ch_amp[c], e_amp[c][t3]);
          end
          s += (e_chip[c][t3] != 0 ? -1 : 1) * carrier_ref(e_car[c][t3]) * e_amp[c][t3];
        end
        e_dac[(t_m - 3) % 8] = s >>> 6;
        if (t_m >= 5) begin
          checks++;
          if (int'(dac_data) != e_dac[(t_m - 4) % 8]) begin
            failures++;
            if (failures < 10) $display("t=%0d dac %0d exp %0d", t_m, dac_data, e_dac[(t_m - 4) % 8]);
          end
        end
      end
      // ---- mechanism counters
      if (code_epoch) n_epoch++;
      if (|ch_interp_wrap) n_iwrap++;
      if (|ch_phase_wrap) n_pwrap++;
      // ---- state changes at this edge
      if (frame_done) begin
        m_words = sent;
        m_fresh = 1;
        n_fd++;
      end
      if (update) begin
        for (int c = 0; c < 4; c++) begin
          m_prev[c] = m_cur[c];
          m_cur[c]  = m_words[c];
          if (!m_fresh) begin m_cur[c].ovf = 1'b0; m_cur[c].unf = 1'b0; end
          if (m_cur[c].ovf) n_ovf_int++;
          if (m_cur[c].unf) n_unf_int++;
        end
        if (!m_fresh && t_m > 4092) n_stale_upd++;
        if (m_prev[2].phase == 18'(100 * 256) && m_cur[2].phase == 18'(1022 * 256)) n_doc_int++;
        m_fresh = 0;
        n_update++;
      end
      n_m  = (n_m == 4091) ? 0 : n_m + 1;
      tc_m = (tc_m == 8183) ? 0 : tc_m + 1;
      t_m++;
      if (t_m == NI * 4092) begin
        $display("updates %0d frames %0d bytes %0d stale %0d resync %0d ovf %0d unf %0d",
                 n_update, n_fd, n_bytes, n_stale_upd, n_resync, n_ovf_int, n_unf_int);
        $display("epochs %0d interp folds %0d phase folds %0d doc interval %0d",
                 n_epoch, n_iwrap, n_pwrap, n_doc_int);
        checks++;
        if (n_update != NI || n_fd != NI - 2 || n_fd != n_frames_sent) begin
          failures++; $display("update / frame count wrong");
        end
        checks += 10;   // one per mechanism below
        if (n_bytes == 0)     begin failures++; $display("no handshake"); end
        if (n_stale_upd == 0) begin failures++; $display("no stale update"); end
        if (n_resync == 0)    begin failures++; $display("no resync"); end
        if (n_ovf_int == 0)   begin failures++; $display("no overflow interval"); end
        if (n_unf_int == 0)   begin failures++; $display("no underflow interval"); end
        if (n_epoch == 0)     begin failures++; $display("no code epoch"); end
        if (n_iwrap == 0)     begin failures++; $display("no interpolator fold"); end
        if (n_pwrap == 0)     begin failures++; $display("no phase fold"); end
        if (n_doc_int == 0)   begin failures++; $display("no 100->1022 interval"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
