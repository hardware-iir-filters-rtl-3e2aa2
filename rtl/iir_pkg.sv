// iir_pkg: constants and elaboration-time helpers shared by the last-bit
// accurate IIR filter and its sum-of-products unit.
//
// The filter is specified by real coefficients and fixed-point formats.  A
// format (m, l) is a signed two's complement number whose MSB has weight 2^m
// (negative) and whose LSB has weight 2^l, so it is m - l + 1 bits wide.
//
// Contents:
//  * ALPHA, the look-up-table input size (6 for current FPGAs);
//  * helpers that compute, at elaboration time, the rounded table entries of a
//    constant multiplier and the error bound that such a multiplier entails,
//    expressed in half units of the last place (half-ulps) of the internal
//    sum-of-products format;
//  * the five reference filters: 5th-order Butterworth low-pass filters for
//    12-bit signals with normalised cut-off frequencies 0.6, 0.7, 0.8, 0.9 and
//    0.95 (fraction of the Nyquist frequency).  Their coefficients are the
//    standard bilinear-transform Butterworth design, b and a of
//    H(z) = sum b_i z^-i / (1 + sum a_i z^-i), rounded to IEEE doubles.  For
//    each filter M_OUT and L_EXT follow from its worst-case peak gains:
//      M_OUT = ceil(log2(WCPG(H) + 2^(L_OUT-1)))
//      L_EXT = L_OUT - 1 - ceil(log2(WCPG(1/A)))
//    where WCPG is the sum of the absolute values of the impulse response.
//    The WCPG values (listed next to each row) were obtained by summing the
//    impulse response until it vanished in double precision.
package iir_pkg;

  // Look-up table input size (address bits of one FPGA LUT).
  localparam int ALPHA = 6;

  // Capacity of the parameter arrays: a sum of products has at most MAX_IN
  // inputs, a filter at most MAX_ORDER poles and zeros.  Arrays passed as
  // parameters always have this fixed size; only the first N (or NB+1, NA)
  // entries are used.
  localparam int MAX_IN    = 32;
  localparam int MAX_ORDER = 15;

  // Input and output LSB of the reference filters: 12-bit input in (0, -11),
  // output rounded to the same LSB.
  localparam int REF_L_IN  = -11;
  localparam int REF_L_OUT = -11;
  localparam int N_REF     = 5;

  localparam real REF_FC [N_REF] = '{0.6, 0.7, 0.8, 0.9, 0.95};

  // Numerators b0..b5.
  localparam real REF_B [N_REF][6] = '{
    '{0.10837370258747996, 0.5418685129373998, 1.0837370258747996,
      1.0837370258747996, 0.5418685129373998, 0.10837370258747996},
    '{0.20188501386988636, 1.0094250693494318, 2.0188501386988635,
      2.0188501386988635, 1.0094250693494318, 0.20188501386988636},
    '{0.3541641810934298, 1.7708209054671489, 3.5416418109342978,
      3.5416418109342978, 1.7708209054671489, 0.3541641810934298},
    '{0.5999402042196299, 2.9997010210981494, 5.999402042196299,
      5.999402042196299, 2.9997010210981494, 0.5999402042196299},
    '{0.7753165952469472, 3.8765829762347357, 7.753165952469471,
      7.753165952469471, 3.8765829762347357, 0.7753165952469472}};

  // Denominators a1..a5 (a0 = 1).
  localparam real REF_A [N_REF][5] = '{
    '{0.9853252392792378, 0.9738493318367639, 0.3863565586484487,
      0.11116384057834201, 0.011263512456565873},
    '{1.975901616441466, 2.0134730260003075, 1.1026179777777694,
      0.3276183340001566, 0.04070948961666519},
    '{2.9754221097456828, 3.80601811932041, 2.5452528683304654,
      0.8811300754378361, 0.12543062215535555},
    '{3.984543119612336, 6.434867090275867, 5.253615170352266,
      2.165132909724132, 0.359928245063556},
    '{4.491830965077046, 8.094055417826645, 7.31208128015038,
      3.3110475619883974, 0.6011158228598382}};

  // WCPG(H): 1.8174, 2.1312, 2.2686, 2.7497, 3.0776
  localparam real REF_WCPG_H [N_REF] = '{1.8174, 2.1312, 2.2686, 2.7497, 3.0776};
  localparam int  REF_M_OUT  [N_REF] = '{1, 2, 2, 2, 2};
  // WCPG(1/A): 3.67, 8.56, 38.22, 747.94, 18711.01
  localparam int  REF_L_EXT  [N_REF] = '{-14, -16, -18, -22, -27};

  // Round to nearest, ties upwards: floor(v + 1/2).
  function automatic longint round_nearest(real v);
    return longint'($floor(v + 0.5));
  endfunction

  // Smallest two's complement width that holds v.
  function automatic int signed_bits(longint v);
    return (v >= 0) ? $clog2(v + 1) + 1 : $clog2(-v) + 1;
  endfunction

  // Smallest and largest value of a w_d-bit digit.
  function automatic real digit_min(int w_d, bit signed_d);
    return signed_d ? -(2.0 ** (w_d - 1)) : 0.0;
  endfunction
  function automatic real digit_max(int w_d, bit signed_d);
    return signed_d ? (2.0 ** (w_d - 1)) - 1.0 : (2.0 ** w_d) - 1.0;
  endfunction

  // A table of round(c * d * 2^shift) is neglected (not built) when every
  // product is below half a unit, i.e. its MSB lies below the rounding point.
  function automatic bit table_neglected(real c, int w_d, bit signed_d, int shift);
    real a;
    a = (c < 0.0) ? -c : c;
    return a * ((-digit_min(w_d, signed_d) > digit_max(w_d, signed_d)) ?
                -digit_min(w_d, signed_d) : digit_max(w_d, signed_d)) * (2.0 ** shift) < 0.5;
  endfunction

  // Two's complement width of the entries of that table.  Rounding is
  // monotonic in d, so the extreme entries are those of the extreme digits.
  function automatic int table_width(real c, int w_d, bit signed_d, int shift);
    int wlo, whi;
    wlo = signed_bits(round_nearest(c * digit_min(w_d, signed_d) * (2.0 ** shift)));
    whi = signed_bits(round_nearest(c * digit_max(w_d, signed_d) * (2.0 ** shift)));
    return (wlo > whi) ? wlo : whi;
  endfunction

  // Number of ALPHA-bit digits of a w-bit input.
  function automatic int num_chunks(int w);
    return (w + ALPHA - 1) / ALPHA;
  endfunction

  // Returns k if |c| = 2^k (searched over a range far wider than any format
  // used here), or the sentinel 999 otherwise.
  function automatic int pow2_exponent(real c);
    real a;
    a = (c < 0.0) ? -c : c;
    for (int k = -64; k <= 64; k++)
      if (a == 2.0 ** k) return k;
    return 999;
  endfunction

  // Error bound of one constant multiplier, in half-ulps of the internal
  // format, for an input of w bits with LSB l_x feeding a sum of LSB l_r:
  //   c = 0              -> 0
  //   |c| = 2^k          -> 0 if k + l_x >= l_r, else 2 (right shift truncates)
  //   any other constant -> number of tables, each rounded to half an ulp.
  function automatic int mult_err_halfulps(real c, int w, int l_x, int l_r);
    int k;
    if (c == 0.0) return 0;
    k = pow2_exponent(c);
    if (k != 999) return (k + l_x >= l_r) ? 0 : 2;
    return num_chunks(w);
  endfunction

  // Sign-extension offset of a constant multiplier.  A table whose entries
  // need w < w_p bits delivers them with the sign bit inverted (entry plus
  // 2^(w-1), an unsigned w-bit number), so that its upper bits are constant
  // zeros.  The multiplier's terms then sum to c*x plus this offset, the sum of
  // 2^(w-1) over such tables; the consumer subtracts it once, as a constant.
  // Table 0 is left in plain form when plain0 is set (it carries a constant).
  function automatic longint kcm_offset(real c, int w_x, int l_x, int l_p, int w_p, bit plain0);
    longint off = 0;
    if (c == 0.0 || pow2_exponent(c) != 999) return 0;
    for (int j = 0; j < num_chunks(w_x); j++) begin
      int  wd, sh, w;
      bit  sg;
      wd = (w_x - j * ALPHA < ALPHA) ? (w_x - j * ALPHA) : ALPHA;
      sg = (j == num_chunks(w_x) - 1);
      sh = l_x + j * ALPHA - l_p;
      if (j == 0 && plain0) continue;
      if (table_neglected(c, wd, sg, sh)) continue;
      w = table_width(c, wd, sg, sh);
      if (w < w_p) off += longint'(1) << (w - 1);
    end
    return off;
  endfunction

endpackage
