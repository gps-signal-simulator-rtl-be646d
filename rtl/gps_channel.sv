// gps_channel -- one satellite channel of the signal generator.
//
// A channel holds the last two host updates of its code phase (with the
// wrap flags) and of its amplitude, interpolates both at every sample,
// adds the common phase due to time, and turns the total phase into a C/A
// code index and a carrier table index; the carrier table is read here,
// the code tables are shared and read outside (see code_tables). The
// description builds one such channel and copies it per satellite.
//
// Pipeline (clock edges after the sample whose time step is `cnt`):
//   1  interpolated phase and amplitude (code_interp, amp_interp)
//   2  code_idx, carrier index, sv_sel (phase_to_index); to the code tables
//   3  carrier sample and amplitude; the code chip from the tables is here too
// `load` (last sample of an update interval) shifts the host word `new_word`
// into the cur/prev registers. Synchronous, active-high reset.
module gps_channel #(
  parameter int PERIOD = gps_pkg::UPDATE_PERIOD,
  parameter int CNT_W  = gps_pkg::CNT_W
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          load,
  input  gps_pkg::chan_word_t           new_word,
  input  logic [CNT_W-1:0]              cnt,
  input  logic [gps_pkg::IP_W-1:0]      time_phase,
  output logic [gps_pkg::IP_W-1:0]      interp_phase,  // stage 1
  output logic [gps_pkg::PH_INT_W-1:0]  code_idx,      // stage 2
  output logic [gps_pkg::SV_W-1:0]      sv_sel,        // stage 2
  output logic signed [gps_pkg::CAR_W-1:0] carrier,    // stage 3
  output logic [gps_pkg::AMP_W-1:0]     amp,           // stage 3
  output logic                          interp_wrap,   // stage 1
  output logic                          phase_wrap     // stage 2
);
  import gps_pkg::*;

  phase_rec_t              ph_new, ph_cur, ph_prev;
  logic [AMP_W-1:0]        amp_cur, amp_prev, amp_s1, amp_s2;
  logic [SV_W-1:0]         sv_cur, sv_s1;
  logic [IP_W-1:0]         tp_s1;
  logic [CAR_IDX_W-1:0]    car_idx;

  assign ph_new = '{ovf: new_word.ovf, unf: new_word.unf, phase: new_word.phase};

  cur_to_prev #(.W($bits(phase_rec_t))) u_phase_regs (
    .clk, .rst, .load, .new_val(ph_new), .cur(ph_cur), .prev(ph_prev)
  );

  cur_to_prev #(.W(AMP_W)) u_amp_regs (
    .clk, .rst, .load, .new_val(new_word.amp), .cur(amp_cur), .prev(amp_prev)
  );

  always_ff @(posedge clk) begin
    if (rst)       sv_cur <= '0;
    else if (load) sv_cur <= new_word.sv;
  end

  code_interp #(.PERIOD(PERIOD), .CNT_W(CNT_W)) u_code_interp (
    .clk, .rst,
    .prev_phase(ph_prev.phase), .cur_phase(ph_cur.phase),
    .ovf(ph_cur.ovf), .unf(ph_cur.unf),
    .cnt, .phase(interp_phase), .wrapped(interp_wrap)
  );

  amp_interp #(.CNT_W(CNT_W)) u_amp_interp (
    .clk, .rst, .prev_amp(amp_prev), .cur_amp(amp_cur), .cnt, .amp(amp_s1)
  );

  // align satellite number, time phase and amplitude with the phase pipeline
  always_ff @(posedge clk) begin
    if (rst) begin
      sv_s1  <= '0;
      sv_sel <= '0;
      tp_s1  <= '0;
      amp_s2 <= '0;
      amp    <= '0;
    end else begin
      sv_s1  <= sv_cur;
      sv_sel <= sv_s1;
      tp_s1  <= time_phase;
      amp_s2 <= amp_s1;
      amp    <= amp_s2;
    end
  end

  phase_to_index u_index (
    .clk, .rst, .los_phase(interp_phase), .time_phase(tp_s1),
    .code_idx, .car_idx, .wrapped(phase_wrap)
  );

  carrier_rom u_carrier (.clk, .addr(car_idx), .q(carrier));

endmodule
