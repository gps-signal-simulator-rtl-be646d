// gps_ref_pkg -- reference arithmetic for the GPS signal simulator
// testbenches, written from the number formats and equations alone and
// independent of the RTL structure. All phases are in 1/65536 chip unless
// noted; host phases are in 1/256 chip.
package gps_ref_pkg;

  localparam longint CODE_X = 1023 * 65536;

  // Interpolated code phase: prev + (cur' - prev) * n / period, truncated
  // toward zero, folded into [0, 1023) chips. cur' is cur unwrapped by the
  // overflow / underflow flag.
  function automatic longint interp_ref(longint prev, longint cur, bit ovf, bit unf,
                                        longint n, longint period);
    longint ce, d, v;
    ce = ovf ? cur + 1023 * 256 : (unf ? cur - 1023 * 256 : cur);
    d  = ce - prev;
    v  = prev * 256 + (d * 256 * n) / period;
    if (v < 0) v += CODE_X;
    else if (v >= CODE_X) v -= CODE_X;
    return v;
  endfunction

  // Amplitude ramp: prev + floor((cur - prev) * n / 4096).
  function automatic int amp_ref(int prev, int cur, int n);
    longint p;
    p = longint'(cur - prev) * n;
    return prev + int'(p >>> 12);
  endfunction

  // Carrier table value for a 0..255 index: triangle through (0, 64),
  // (128, -64).
  function automatic int carrier_ref(int idx);
    return (idx < 128) ? 64 - idx : idx - 192;
  endfunction

  // C/A code chip by the delayed-G2 form: G2i(t) = G2(t - delay_i).
  function automatic int g2_delay(int prn);
    int d [32] = '{5, 6, 7, 8, 17, 18, 139, 140, 141, 251, 252, 254, 255, 256,
                   257, 258, 469, 470, 471, 472, 473, 474, 509, 512, 513, 514,
                   515, 516, 859, 860, 861, 862};
    return d[prn - 1];
  endfunction

  function automatic bit ca_ref(int prn, int idx);
    bit g1 [1023];
    bit g2 [1023];
    bit [9:0] r1, r2;      // r[9] is stage 10
    int k;
    r1 = '1;
    r2 = '1;
    for (int t = 0; t < 1023; t++) begin
      g1[t] = r1[9];
      g2[t] = r2[9];
      r1 = {r1[8:0], r1[2] ^ r1[9]};
      r2 = {r2[8:0], r2[1] ^ r2[2] ^ r2[5] ^ r2[7] ^ r2[8] ^ r2[9]};
    end
    k = (idx - g2_delay(prn) + 1023) % 1023;
    return g1[idx] ^ g2[k];
  endfunction

endpackage
