// fix_real_kcm: multiplier of a signed fixed-point input by a real constant,
// built from look-up tables (the KCM method extended to real constants).
//
// The W_X-bit input x (LSB weight 2^L_X) is cut into D = ceil(W_X/ALPHA)
// digits of ALPHA bits, counted here from the least significant one.  Digit j
// has weight 2^(L_X + j*ALPHA); the most significant digit is signed, the
// others unsigned, so that x = sum_j 2^(j*ALPHA) * d_j * 2^L_X exactly.  Each
// digit addresses a kcm_table holding c*d_j rounded to the output LSB 2^L_P,
// so the product c*x is the sum of the D table outputs, with an error of at
// most D/2 units of 2^L_P.  The table outputs are not added here: they are
// delivered on t so that the enclosing sum of products can add all tables of
// all multipliers in one bit heap.
//
// Two constants are handled without tables:
//   c = 0        t is all zero (plus BIAS);
//   |c| = 2^k    t[0] is x shifted (truncating when it shifts right) and
//                negated if c < 0; the other terms are zero.
// BIAS, an integer in units of 2^L_P, is added to t[0]; the sum of products
// uses it to inject constants (its final rounding bit and the sign-extension
// constant) for free.  Table 0 is in plain two's complement form when PLAIN0
// is set; every other table is in offset form (see kcm_table): as narrow as
// its entries and with its sign bit inverted, so the terms sum to c*x plus
// the constant iir_pkg::kcm_offset(C, W_X, L_X, L_P, W_P, PLAIN0), which the
// consumer subtracts.  With PLAIN0 clear BIAS must be 0.
//
// Interface: x in; t[0..D-1] out, each W_P bits, LSB 2^L_P, wrapping modulo
// 2^W_P (the sum is only meaningful modulo that range).  Combinational.
// The digit decomposition, the table rounding, the special cases, the
// per-table widths with inverted sign bits and the injection of constants
// into a table follow the method; indexing the digits from the LSB, zero-
// extending every term to W_P and keeping shift terms in plain form are this
// design's choices.
module fix_real_kcm #(
  parameter real    C     = 0.7071,
  parameter int     W_X   = 18,
  parameter int     L_X   = -17,
  parameter int     L_P   = -20,
  parameter int     W_P   = 22,
  parameter longint BIAS  = 0,
  parameter bit     PLAIN0 = 1'b1,
  localparam int    D     = iir_pkg::num_chunks(W_X)
) (
  input  logic [W_X-1:0] x,
  output logic [W_P-1:0] t [D]
);
  import iir_pkg::*;

  localparam int POW2 = pow2_exponent(C);

  if (C == 0.0) begin : g_zero
    always_comb begin
      foreach (t[j]) t[j] = '0;
      t[0] = W_P'(BIAS);
    end
  end else if (POW2 != 999) begin : g_shift
    // Shift amount from the input LSB to the output LSB.
    localparam int S = POW2 + L_X - L_P;
    logic signed [W_P-1:0] mag;
    // Right shifts must see the full input before truncation, so widen first.
    localparam int W_WIDE = (W_X > W_P ? W_X : W_P) + 1;
    logic signed [W_WIDE-1:0] xw;
    assign xw = W_WIDE'($signed(x));
    if (S >= 0) begin : g_left
      logic signed [W_P-1:0] xs;
      assign xs  = W_P'(xw);
      assign mag = xs <<< S;
    end else begin : g_right
      logic signed [W_WIDE-1:0] sh;
      assign sh  = xw >>> (-S);
      assign mag = W_P'(sh);
    end
    always_comb begin
      foreach (t[j]) t[j] = '0;
      t[0] = ((C < 0.0) ? -mag : mag) + W_P'(BIAS);
    end
  end else begin : g_tables
    for (genvar j = 0; j < D; j++) begin : g_digit
      localparam int LO = j * ALPHA;
      localparam int WD = (W_X - LO < ALPHA) ? (W_X - LO) : ALPHA;
      kcm_table #(
        .W_D      (WD),
        .SIGNED_D (j == D - 1),
        .C        (C),
        .SHIFT    (L_X + LO - L_P),
        .W_T      (W_P),
        .BIAS     (j == 0 ? BIAS : 0),
        .OFFSET_FORM (!(j == 0 && PLAIN0))
      ) u_table (
        .d (x[LO +: WD]),
        .t (t[j])
      );
    end
  end

endmodule
