// fix_sopc: last-bit accurate sum of products by real constants,
//   r = sum_{i<N} C[i] * x[i],
// returned in the signed format (M_R, L_R) with an error below 2^L_R
// (faithful rounding).
//
// Each input i has its own format: W_X[i] bits with LSB weight 2^L_X[i]; it is
// carried in the low W_X[i] bits of x[i] (upper bits ignored).  The arrays C,
// W_X and L_X have the fixed size iir_pkg::MAX_IN, of which the first N
// entries are used (a fixed size keeps them portable across simulators).  The output
// range M_R is a parameter because the caller (the IIR filter) knows a much
// tighter range than could be derived from the constants.
//
// How the accuracy is reached:
//  * each product is computed by a fix_real_kcm at an internal LSB of
//    L_R - G, i.e. G guard bits below the output LSB;
//  * G is derived at elaboration from the error bound of every multiplier
//    (0 for c = 0, one unit for a truncating shift, half a unit per table
//    otherwise): with E the total in half-units, G is the smallest value with
//    E < 2^G, so that the accumulated product error stays below 2^(L_R-1);
//  * all tables of all multipliers are summed by one bitheap_sum; the
//    addition itself is exact;
//  * each table is only as wide as its entries and delivers them with the
//    sign bit inverted, so its upper bits are constant zeros; this adds
//    2^(w-1) per table of width w, and the sum of these offsets is subtracted
//    once, as a constant (the two's complement sign-extension trick);
//  * the result is rounded to L_R by adding 2^(L_R-1) and truncating the G
//    guard bits; this rounding constant and the sign-extension constant cost
//    nothing because both are merged into the first table of the first
//    multiplier, which is kept in plain form for that purpose.
// The total error is then below 2^(L_R-1) + 2^(L_R-1) = 2^L_R.
// Arithmetic is modulo 2^(M_R+1): overflows in intermediate sums do not
// affect a result that fits in (M_R, L_R).
//
// Interface: x[0..N-1] in (WXMAX bits each), r out (M_R-L_R+1 bits).
// Timing: combinational, tables then one adder tree.
// Everything above follows the method except the adder tree standing in for
// the bit-heap compressor (terms are zero-extended to the full width, and
// synthesis trims the constant zero bits).
module fix_sopc #(
  parameter int  N                    = 4,
  parameter real C   [iir_pkg::MAX_IN] = '{0: 0.3, 1: 0.6, 2: -1.2, 3: 0.4, default: 0.0},
  parameter int  W_X [iir_pkg::MAX_IN] = '{0: 12, 1: 12, 2: 16, 3: 16, default: 1},
  parameter int  L_X [iir_pkg::MAX_IN] = '{0: -11, 1: -11, 2: -14, 3: -14, default: 0},
  parameter int  WXMAX      = 16,
  parameter int  M_R        = 1,
  parameter int  L_R        = -14
) (
  input  logic [WXMAX-1:0]   x [N],
  output logic [M_R-L_R:0]   r
);
  import iir_pkg::*;

  // Total error bound of the multipliers, in half-ulps of the internal LSB.
  function automatic int total_err_halfulps();
    int s = 0;
    for (int i = 0; i < N; i++) s += mult_err_halfulps(C[i], W_X[i], L_X[i], L_R);
    return s;
  endfunction

  // Position of the first table of multiplier i in the list of all terms.
  function automatic int first_term(int i);
    int s = 0;
    for (int j = 0; j < i; j++) s += num_chunks(W_X[j]);
    return s;
  endfunction

  localparam int ERR_HALFULPS = total_err_halfulps();
  localparam int G_RAW        = $clog2(ERR_HALFULPS + 1);
  localparam int G            = (G_RAW < 1) ? 1 : G_RAW;   // guard bits
  localparam int L_P          = L_R - G;                    // internal LSB
  localparam int W_P          = M_R - L_P + 1;              // internal width
  localparam int N_TERMS      = first_term(N);

  // Sum of the sign-extension offsets of all offset-form tables.
  function automatic longint total_offset();
    longint s = 0;
    for (int i = 0; i < N; i++) s += kcm_offset(C[i], W_X[i], L_X[i], L_P, W_P, i == 0);
    return s;
  endfunction

  // Constant merged into the first table: rounding bit minus the offsets.
  localparam longint CONST_TERM = (longint'(1) << (G - 1)) - total_offset();

  if (N > MAX_IN) begin : g_bad_n
    $error("fix_sopc: N = %0d exceeds MAX_IN = %0d", N, MAX_IN);
  end

  logic [W_P-1:0] terms [N_TERMS];
  logic [W_P-1:0] sum;

  for (genvar i = 0; i < N; i++) begin : g_mult
    localparam int D = num_chunks(W_X[i]);
    localparam int F = first_term(i);
    logic [W_P-1:0] t [D];

    if (W_X[i] > WXMAX) begin : g_bad_width
      $error("fix_sopc: W_X[%0d] = %0d exceeds WXMAX = %0d", i, W_X[i], WXMAX);
    end

    fix_real_kcm #(
      .C    (C[i]),
      .W_X  (W_X[i]),
      .L_X  (L_X[i]),
      .L_P  (L_P),
      .W_P  (W_P),
      // Rounding bit 2^(L_R-1) = 2^(G-1) internal units and the negated
      // sign-extension offsets, in table 0 of multiplier 0.
      .BIAS   (i == 0 ? CONST_TERM : 0),
      .PLAIN0 (i == 0)
    ) u_kcm (
      .x (x[i][W_X[i]-1:0]),
      .t (t)
    );

    for (genvar j = 0; j < D; j++) begin : g_term
      assign terms[F + j] = t[j];
    end
  end

  bitheap_sum #(
    .N_TERMS (N_TERMS),
    .W       (W_P)
  ) u_bitheap (
    .terms (terms),
    .sum   (sum)
  );

  // Rounding by truncation (the half-ulp is already in the sum).
  assign r = sum[W_P-1:G];

endmodule
