// code_interp -- linear interpolation of a channel's code phase between two
// host updates, with wrap-around protection.
//
// The host sends the line-of-sight code phase only at 2 kHz; every sample in
// between gets
//     phase(n) = prev + (cur - prev) * n / PERIOD,   n = 0 .. PERIOD-1
// The phase is sent modulo one code period (0 .. 1023 chips), so when the
// true phase runs across the end of the code between two updates, cur - prev
// would point the wrong way and sweep almost the whole code. The host flags
// such intervals: `ovf` when the phase increased through 1022 -> 0, `unf` when
// it decreased through 0 -> 1022. The flagged target is unwrapped (cur + 1023
// or cur - 1023 chips) before the slope is formed, and the interpolated value
// is folded back into [0, 1023): the +1023 and -1023 alternatives are both
// computed and the sign and carry of the raw value pick one.
//
// Arithmetic: the 18-bit (10.8) inputs give a signed difference; its magnitude
// times n, with 8 more fractional bits, is divided by PERIOD with an exact
// reciprocal multiply (quotient truncated toward zero) and added to prev. The
// output has 16 fractional bits. The equation, the 10.8 input format, the
// division by 4092 by multiplication with a reciprocal constant, the 16
// fractional output bits and the flag-driven correction follow the
// description. The underflow path, which the original left unverified, is
// built here as the mirror image of the overflow path.
//
// Timing: one register stage; `phase` belongs to the `cnt` of the previous
// clock. `wrapped` flags that the sample was folded back.
module code_interp #(
  parameter int PERIOD = gps_pkg::UPDATE_PERIOD,
  parameter int CNT_W  = gps_pkg::CNT_W
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [gps_pkg::PH_W-1:0]  prev_phase,
  input  logic [gps_pkg::PH_W-1:0]  cur_phase,
  input  logic                      ovf,
  input  logic                      unf,
  input  logic [CNT_W-1:0]          cnt,
  output logic [gps_pkg::IP_W-1:0]  phase,     // 10.16 chips, in [0, 1023)
  output logic                      wrapped
);
  import gps_pkg::*;

  localparam int EXT    = IP_FRAC_W - PH_FRAC_W;             // 8 extra fraction bits
  localparam int DW     = PH_W + 3;                          // signed difference width
  localparam int NUM_W  = (PH_W + 1) + CNT_W + EXT;          // |diff| * n * 2^EXT
  localparam int L      = $clog2(PERIOD);
  localparam int SH     = NUM_W + L;
  localparam int RW     = NUM_W + L + 2;                     // reciprocal width
  // ceil(2^SH / PERIOD): exact floor(N / PERIOD) for every N < 2^NUM_W
  localparam logic [RW-1:0] RECIP = RW'((( 128'd1 << SH) + 128'(PERIOD) - 128'd1) / 128'(PERIOD));
  localparam logic signed [DW-1:0] CODE_LEN = DW'(CA_LEN << PH_FRAC_W);
  localparam int RAW_W  = IP_W + 3;
  localparam logic signed [RAW_W-1:0] CODE_LEN_X = RAW_W'(CA_LEN << IP_FRAC_W);

  logic signed [DW-1:0]    prev_s, cur_s, cur_e, diff;
  logic [DW-1:0]           mag;
  logic [NUM_W-1:0]        num;
  logic [NUM_W+RW-1:0]     prod;
  logic [NUM_W-1:0]        quo;
  logic signed [RAW_W-1:0] delta, raw, raw_up, raw_dn;
  logic                    below, above;

  always_comb begin
    prev_s = DW'(prev_phase);
    cur_s  = DW'(cur_phase);
    // unwrap the target as the host's flags say
    if (ovf)      cur_e = cur_s + CODE_LEN;
    else if (unf) cur_e = cur_s - CODE_LEN;
    else          cur_e = cur_s;
    diff  = cur_e - prev_s;
    mag   = diff[DW-1] ? -diff : diff;
    num   = NUM_W'({mag[PH_W:0], {EXT{1'b0}}}) * NUM_W'(cnt);
    prod  = (NUM_W+RW)'(num) * (NUM_W+RW)'(RECIP);
    quo   = NUM_W'(prod >> SH);
    delta = diff[DW-1] ? -RAW_W'(quo) : RAW_W'(quo);
    raw   = RAW_W'({prev_phase, {EXT{1'b0}}}) + delta;
    // both corrections always computed; sign / compare select
    raw_up = raw + CODE_LEN_X;
    raw_dn = raw - CODE_LEN_X;
    below  = raw[RAW_W-1];
    above  = !below && (raw >= CODE_LEN_X);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= '0;
      wrapped <= 1'b0;
    end else begin
      if (below)      phase <= IP_W'(raw_up);
      else if (above) phase <= IP_W'(raw_dn);
      else            phase <= IP_W'(raw);
      wrapped <= below || above;
    end
  end

endmodule
