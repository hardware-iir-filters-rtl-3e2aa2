// kcm_table: one look-up table of a constant multiplier by a real number.
//
// For every value of the W_D-bit digit d it holds the product c * d * 2^SHIFT
// rounded to the nearest integer (ties upwards), e.  The result is an integer
// in units of the last place of the sum of products that consumes it; SHIFT
// places the digit's weight relative to that unit.  The digit is unsigned, or
// signed (two's complement) when SIGNED_D is set, which is the case for the
// most significant digit of a signed input.
//
// Two output forms:
//  * plain (OFFSET_FORM = 0): t = e + BIAS as a W_T-bit two's complement
//    number.  BIAS lets the sum of products inject constants for free.
//  * offset (OFFSET_FORM = 1): the table is only as wide as its entries need,
//    W_N = table_width(...) bits, and stores e with its sign bit inverted,
//    i.e. e + 2^(W_N-1) as an unsigned number; t is that value zero-extended.
//    The bits above W_N are constant zeros instead of copies of the sign, and
//    the consumer subtracts 2^(W_N-1) once, inside a single constant for the
//    whole sum (see iir_pkg::kcm_offset).  BIAS must then be 0.  If the
//    entries need the full W_T bits the table falls back to the plain form.
//
// The contents are computed at elaboration time in double precision.  Each
// entry is perfectly rounded, so each table contributes an error of at most
// half a unit.  If every product is below half a unit the table is not built
// and t is the constant BIAS (the "neglected table" rule; the error bound of
// half a unit still holds).
//
// Interface: d in, t out (W_T bits, wrapping modulo 2^W_T).
// Timing: purely combinational, a single table read.
// The rounding, the per-table width, the sign-bit inversion and the neglect
// rule follow the method; computing the contents in double rather than
// multiple precision is this design's choice.
module kcm_table #(
  parameter int     W_D         = 6,
  parameter bit     SIGNED_D    = 1'b0,
  parameter real    C           = 0.7071,
  parameter int     SHIFT       = 0,
  parameter int     W_T         = 16,
  parameter longint BIAS        = 0,
  parameter bit     OFFSET_FORM = 1'b0
) (
  input  logic [W_D-1:0] d,
  output logic [W_T-1:0] t
);
  import iir_pkg::*;

  localparam int N_ENTRIES = 1 << W_D;
  localparam bit NEGLECTED = table_neglected(C, W_D, SIGNED_D, SHIFT);
  localparam int W_NEED    = table_width(C, W_D, SIGNED_D, SHIFT);
  localparam bit NARROW    = OFFSET_FORM && (W_NEED < W_T);
  localparam int W_N       = NARROW ? W_NEED : W_T;   // stored width

  if (OFFSET_FORM && BIAS != 0) begin : g_bad_bias
    $error("kcm_table: BIAS must be 0 in offset form");
  end

  // Value stored for entry e.
  function automatic logic [W_N-1:0] entry(int e);
    real    dv;
    longint v;
    dv = (SIGNED_D && e >= N_ENTRIES / 2) ? real'(e - N_ENTRIES) : real'(e);
    v  = round_nearest(C * dv * (2.0 ** SHIFT));
    return NARROW ? W_N'(v + (longint'(1) << (W_N - 1))) : W_N'(v + BIAS);
  endfunction

  if (NEGLECTED) begin : g_neglected
    assign t = W_T'(BIAS);
  end else begin : g_table
    logic [W_N-1:0] rom [N_ENTRIES];
    for (genvar e = 0; e < N_ENTRIES; e++) begin : g_entry
      assign rom[e] = entry(e);
    end
    assign t = W_T'(rom[d]);   // zero-extends in offset form
  end

endmodule
