// gps_pkg -- constants, types and table functions shared by the GPS signal
// simulator FPGA datapath.
//
// Number formats used throughout:
//   * Received code phase (from the host): 18 bits unsigned, 10 integer bits
//     (chip 0..1022 of the C/A code) and 8 fractional bits.
//   * Interpolated code phase: 26 bits unsigned, 10 integer and 16 fractional
//     bits, always kept inside [0, 1023) chips.
//   * Amplitude: 7 bits unsigned.
//   * Carrier sample: 8 bits two's complement, -64..+64.
// The field widths, the 2 kHz update rate, the 8.184 MHz sample rate and the
// 1023-chip code length follow the design description; the packing order of a
// channel word and the C/A code numbering are this implementation's choices.
package gps_pkg;

  localparam int NUM_CH        = 4;     // satellites generated at once
  localparam int NUM_SV        = 32;    // satellites with a code table
  localparam int SV_W          = 5;
  localparam int AMP_W         = 7;
  localparam int PH_INT_W      = 10;
  localparam int PH_FRAC_W     = 8;
  localparam int PH_W          = PH_INT_W + PH_FRAC_W;   // 18
  localparam int IP_FRAC_W     = 16;                     // interpolated fraction
  localparam int IP_W          = PH_INT_W + IP_FRAC_W;   // 26
  localparam int CA_LEN        = 1023;  // chips per C/A code period
  localparam int UPDATE_PERIOD = 4092;  // samples per 2 kHz update at 8.184 MHz
  localparam int CNT_W         = 12;
  localparam int SAMPLES_PER_CHIP = 8;  // 8.184 MHz / 1.023 MHz
  localparam int CAR_IDX_W     = 8;     // 256-entry carrier table
  localparam int CAR_W         = 8;     // carrier sample width
  localparam int DAC_W         = 10;

  // One channel's update as sent by the host: 4 bytes, most significant
  // byte first.
  typedef struct packed {
    logic [SV_W-1:0]  sv;     // satellite number minus one (0 = SV 1)
    logic [AMP_W-1:0] amp;    // signal amplitude
    logic             ovf;    // phase crossed 1022 -> 0 since the last update
    logic             unf;    // phase crossed 0 -> 1022 since the last update
    logic [PH_W-1:0]  phase;  // line-of-sight code phase, 10.8 chips
  } chan_word_t;

  // Code phase, amplitude and flags as held by the cur/prev registers.
  typedef struct packed {
    logic             ovf;
    logic             unf;
    logic [PH_W-1:0]  phase;
  } phase_rec_t;

  // G2 phase-selector taps {t1, t2} of the C/A code generator, PRN 1..32.
  function automatic logic [7:0] g2_taps(input int prn);
    case (prn)
      1:  return {4'd2, 4'd6};   2:  return {4'd3, 4'd7};
      3:  return {4'd4, 4'd8};   4:  return {4'd5, 4'd9};
      5:  return {4'd1, 4'd9};   6:  return {4'd2, 4'd10};
      7:  return {4'd1, 4'd8};   8:  return {4'd2, 4'd9};
      9:  return {4'd3, 4'd10};  10: return {4'd2, 4'd3};
      11: return {4'd3, 4'd4};   12: return {4'd5, 4'd6};
      13: return {4'd6, 4'd7};   14: return {4'd7, 4'd8};
      15: return {4'd8, 4'd9};   16: return {4'd9, 4'd10};
      17: return {4'd1, 4'd4};   18: return {4'd2, 4'd5};
      19: return {4'd3, 4'd6};   20: return {4'd4, 4'd7};
      21: return {4'd5, 4'd8};   22: return {4'd6, 4'd9};
      23: return {4'd1, 4'd3};   24: return {4'd4, 4'd6};
      25: return {4'd5, 4'd7};   26: return {4'd6, 4'd8};
      27: return {4'd7, 4'd9};   28: return {4'd8, 4'd10};
      29: return {4'd1, 4'd6};   30: return {4'd2, 4'd7};
      31: return {4'd3, 4'd8};   default: return {4'd4, 4'd9};
    endcase
  endfunction

  // The 1023 chips of the C/A code of one PRN, chip i in bit i. Two 10-stage
  // shift registers start at all ones: G1 = 1 + x^3 + x^10,
  // G2 = 1 + x^2 + x^3 + x^6 + x^8 + x^9 + x^10; chip = G1[10] ^ G2[t1] ^ G2[t2].
  function automatic logic [CA_LEN-1:0] ca_code(input int prn);
    logic [10:1] g1, g2;
    logic        f1, f2;
    logic [7:0]  taps;
    int          t1, t2;
    logic [CA_LEN-1:0] c;
    taps = g2_taps(prn);
    t1 = int'(taps[7:4]);
    t2 = int'(taps[3:0]);
    g1 = '1;
    g2 = '1;
    c  = '0;
    for (int i = 0; i < CA_LEN; i++) begin
      c[i] = g1[10] ^ g2[t1] ^ g2[t2];
      f1 = g1[3] ^ g1[10];
      f2 = g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10];
      g1 = {g1[9:1], f1};
      g2 = {g2[9:1], f2};
    end
    return c;
  endfunction

  // Carrier table entry: one carrier cycle over 256 entries, a triangle that
  // starts at +64, reaches -64 at entry 128 and returns towards +64.
  function automatic logic signed [CAR_W-1:0] carrier_value(input int idx);
    int d;
    d = (idx >= 128) ? idx - 128 : 128 - idx;
    return CAR_W'(d - 64);
  endfunction

endpackage
