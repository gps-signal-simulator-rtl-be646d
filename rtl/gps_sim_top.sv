// gps_sim_top -- FPGA part of a low-cost GPS signal simulator.
//
// A PC computes, for each of NUM_CH = 4 satellites in view, the code phase
// seen at the receiver's position, the satellite number and the signal
// amplitude, and sends them at 2 kHz over a Centronics parallel port. This
// block turns that slow stream into a 2.046 MHz IF sample stream at
// 8.184 MHz for a 10-bit D/A converter, which is then mixed up to L1.
//
//   centronics_rx -> frame_assembler : bytes -> one word register per channel
//   update_counter                   : 4092-sample update interval, time step
//   time_phase_counter               : code phase due to time (1 ms period)
//   gps_channel x NUM_CH             : interpolation, phase to table indices,
//                                      carrier table
//   code_tables                      : C/A code of the selected satellites
//   signal_combiner                  : modulate, scale, sum -> D/A word
//
// Clock `clk` is the 8.184 MHz sample clock; one D/A word per clock. The
// word on `dac_data` belongs to the sample four clocks earlier than the time
// step seen by the channels: interpolation, index, table and combiner
// stages. At each update boundary the words last received from the host
// become the channels' targets. If no complete frame arrived during the
// interval, the old words are reloaded with their wrap flags cleared, so
// every channel holds its phase constant over the next interval. The per-channel code bit,
// carrier, amplitude and code index are also brought out for observation,
// as the original design brought them to pins. Synchronous, active-high
// reset; `pp_ninit` low resynchronises the byte stream.
module gps_sim_top #(
  parameter int NUM_CH = gps_pkg::NUM_CH,
  parameter int PERIOD = gps_pkg::UPDATE_PERIOD
) (
  input  logic                                clk,
  input  logic                                rst,
  // host parallel port
  input  logic [7:0]                          pp_data,
  input  logic                                pp_nstrobe,
  input  logic                                pp_ninit,
  output logic                                pp_nack,
  output logic                                pp_busy,
  // D/A converter
  output logic signed [gps_pkg::DAC_W-1:0]    dac_data,
  // observation
  output logic                                update,
  output logic                                code_epoch,
  output logic                                frame_done,
  output logic                                ch_code    [NUM_CH],
  output logic signed [gps_pkg::CAR_W-1:0]    ch_carrier [NUM_CH],
  output logic [gps_pkg::AMP_W-1:0]           ch_amp     [NUM_CH],
  output logic [gps_pkg::PH_INT_W-1:0]        ch_code_idx[NUM_CH],
  output logic [NUM_CH-1:0]                   ch_interp_wrap,
  output logic [NUM_CH-1:0]                   ch_phase_wrap
);
  import gps_pkg::*;

  logic                byte_valid;
  logic [7:0]          byte_data;
  logic [1:0]          ninit_sync;
  chan_word_t          words [NUM_CH];
  logic [CNT_W-1:0]    cnt;
  logic [IP_W-1:0]     time_phase;
  logic [SV_W-1:0]     sv_sel [NUM_CH];
  chan_word_t          load_word [NUM_CH];
  logic                fresh;

  always_ff @(posedge clk) begin
    if (rst) ninit_sync <= 2'b11;
    else     ninit_sync <= {ninit_sync[0], pp_ninit};
  end

  centronics_rx u_port (
    .clk, .rst, .pp_data, .pp_nstrobe, .pp_nack, .pp_busy, .byte_valid, .byte_data
  );

  frame_assembler #(.NUM_CH(NUM_CH)) u_frame (
    .clk, .rst, .resync(!ninit_sync[1]), .byte_valid, .byte_data, .words, .frame_done
  );

  update_counter #(.PERIOD(PERIOD)) u_update (.clk, .rst, .cnt, .update);

  time_phase_counter u_time (.clk, .rst, .phase(time_phase), .epoch(code_epoch));

  // A frame completed since the last update is fresh. A channel reloaded
  // without one keeps its phase: its wrap flags are dropped so that the
  // repeated value is not unwrapped a second time.
  always_ff @(posedge clk) begin
    if (rst || update) fresh <= 1'b0;
    else if (frame_done) fresh <= 1'b1;
  end

  always_comb begin
    for (int c = 0; c < NUM_CH; c++) begin
      load_word[c] = words[c];
      if (!(fresh || frame_done)) begin
        load_word[c].ovf = 1'b0;
        load_word[c].unf = 1'b0;
      end
    end
  end

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    gps_channel #(.PERIOD(PERIOD)) u_ch (
      .clk, .rst, .load(update), .new_word(load_word[c]), .cnt, .time_phase,
      .interp_phase(), .code_idx(ch_code_idx[c]), .sv_sel(sv_sel[c]),
      .carrier(ch_carrier[c]), .amp(ch_amp[c]),
      .interp_wrap(ch_interp_wrap[c]), .phase_wrap(ch_phase_wrap[c])
    );
  end

  code_tables #(.NUM_CH(NUM_CH)) u_codes (
    .clk, .sel(sv_sel), .idx(ch_code_idx), .chip(ch_code)
  );

  signal_combiner #(.NUM_CH(NUM_CH)) u_comb (
    .clk, .rst, .chip(ch_code), .carrier(ch_carrier), .amp(ch_amp), .dac(dac_data)
  );

endmodule
