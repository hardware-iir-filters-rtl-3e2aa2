// fix_iir: last-bit accurate fixed-point IIR filter in direct form I.
//
// It implements y(k) = sum_{i=0}^{NB} B[i] u(k-i) - sum_{i=1}^{NA} A[i-1] y(k-i)
// for real coefficients, and returns y_out(k) with an error below one output
// LSB 2^L_OUT with respect to the infinitely accurate filter.
//
// Structure (direct form I):
//   u_in --> input delay line u(k-1..k-NB) --+
//                                            +--> one fix_sopc --> y~(k) --> final_round --> y_out
//   y~   <-- feedback delay line y~(k-1..k-NA) <-------------------+
// The single sum of products multiplies u(k..k-NB) by B and y~(k-1..k-NA) by
// -A, and returns y~(k) in the extended format (M_OUT, L_EXT).  The feedback
// carries y~ in that extended format, not the rounded output, so the final
// rounding error is not recirculated.  The extended LSB is chosen so that the
// sum-of-products error, amplified by the feedback loop by at most the
// worst-case peak gain of 1/A(z), stays below half an output LSB:
//   L_EXT = L_OUT - 1 - ceil(log2 WCPG(1/A)),
// and the output MSB covers the worst-case peak gain of the filter:
//   M_OUT = ceil(log2(WCPG(H) + 2^(L_OUT-1))).
// Both are parameters; iir_pkg lists them for the reference filters.  B holds
// b0..bNB and A holds a1..aNA in their first entries; both arrays have the
// fixed capacity of iir_pkg (MAX_ORDER), unused entries are ignored.  The
// defaults are the 5th-order Butterworth low-pass filter with cut-off 0.6 for
// 12-bit signals.  Internally everything wraps modulo 2^(M_OUT+1), which is
// harmless because the true result always fits.
//
// Interface and timing:
//   u_in      input sample, signed format (0, L_IN), i.e. in [-1, 1)
//   in_valid  u_in is a new sample; one sample per clock at most
//   y_out     output sample, signed format (M_OUT, L_OUT)
//   out_valid y_out holds the output for the sample accepted one cycle ago
// The sum of products lies inside the feedback loop and is combinational, so
// a new sample can be accepted every cycle and the latency is one cycle.
// With in_valid low the filter state is held.  rst_n (asynchronous, active
// low) clears the delay lines and the output.
// The structure, the formats and the single final rounding follow the method;
// the sample handshake, the reset and the output register are this design's
// choices.
module fix_iir #(
  parameter int  NB    = 5,
  parameter int  NA    = 5,
  parameter real B [iir_pkg::MAX_ORDER+1] = '{0: 0.10837370258747996, 1: 0.5418685129373998,
                                             2: 1.0837370258747996,  3: 1.0837370258747996,
                                             4: 0.5418685129373998,  5: 0.10837370258747996,
                                             default: 0.0},
  parameter real A [iir_pkg::MAX_ORDER]   = '{0: 0.9853252392792378,  1: 0.9738493318367639,
                                             2: 0.3863565586484487,  3: 0.11116384057834201,
                                             4: 0.011263512456565873, default: 0.0},
  parameter int  L_IN  = -11,
  parameter int  L_OUT = -11,
  parameter int  M_OUT = 1,
  parameter int  L_EXT = -14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [-L_IN:0]       u_in,
  output logic                 out_valid,
  output logic [M_OUT-L_OUT:0] y_out
);
  import iir_pkg::*;

  localparam int W_U   = 1 - L_IN;           // input width
  localparam int W_Y   = M_OUT - L_EXT + 1;  // extended (feedback) width
  localparam int W_OUT = M_OUT - L_OUT + 1;  // output width
  localparam int N     = NB + 1 + NA;        // products in the sum
  localparam int WXMAX = (W_U > W_Y) ? W_U : W_Y;

  typedef real coef_t [MAX_IN];
  typedef int  fmt_t  [MAX_IN];

  if (NB < 1 || NA < 1 || NB > MAX_ORDER || NA > MAX_ORDER) begin : g_bad_order
    $error("fix_iir: NB and NA must be between 1 and MAX_ORDER");
  end

  // Constants of the sum of products: b0..bNB, then -a1..-aNA.
  function automatic coef_t sopc_coefs();
    coef_t c = '{default: 0.0};
    for (int i = 0; i <= NB; i++) c[i] = B[i];
    for (int i = 0; i < NA; i++)  c[NB + 1 + i] = -A[i];
    return c;
  endfunction

  function automatic fmt_t sopc_widths();
    fmt_t w = '{default: 1};
    for (int i = 0; i < N; i++) w[i] = (i <= NB) ? W_U : W_Y;
    return w;
  endfunction

  function automatic fmt_t sopc_lsbs();
    fmt_t l = '{default: 0};
    for (int i = 0; i < N; i++) l[i] = (i <= NB) ? L_IN : L_EXT;
    return l;
  endfunction

  localparam coef_t C_S = sopc_coefs();
  localparam fmt_t  W_S = sopc_widths();
  localparam fmt_t  L_S = sopc_lsbs();

  logic [W_U-1:0]   u_taps [NB];
  logic [W_Y-1:0]   y_taps [NA];
  logic [WXMAX-1:0] x      [N];
  logic [W_Y-1:0]   y_ext;
  logic [W_OUT-1:0] y_rnd;

  delay_line #(.W(W_U), .DEPTH(NB)) u_input_line (
    .clk, .rst_n, .en(in_valid), .din(u_in), .taps(u_taps)
  );

  delay_line #(.W(W_Y), .DEPTH(NA)) u_feedback_line (
    .clk, .rst_n, .en(in_valid), .din(y_ext), .taps(y_taps)
  );

  // Sum-of-products inputs, each sign-extended to the common width.
  always_comb begin
    x[0] = WXMAX'($signed(u_in));
    for (int i = 1; i <= NB; i++) x[i] = WXMAX'($signed(u_taps[i-1]));
    for (int i = 0; i < NA; i++)  x[NB + 1 + i] = WXMAX'($signed(y_taps[i]));
  end

  fix_sopc #(
    .N     (N),
    .C     (C_S),
    .W_X   (W_S),
    .L_X   (L_S),
    .WXMAX (WXMAX),
    .M_R   (M_OUT),
    .L_R   (L_EXT)
  ) u_sopc (
    .x (x),
    .r (y_ext)
  );

  final_round #(.W_IN(W_Y), .SHIFT(L_OUT - L_EXT)) u_final_round (
    .din (y_ext), .dout (y_rnd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y_out <= y_rnd;
    end
  end

endmodule
