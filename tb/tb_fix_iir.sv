// tb_fix_iir: end-to-end test of the IIR filter at its default parameters
// (5th-order Butterworth low-pass, cut-off 0.6, 12-bit input).
//
// A double-precision direct-form model of the same real coefficients runs
// beside the filter; it stands in for the infinitely accurate filter (its own
// rounding is some 40 bits below the output LSB).  Every output must be within
// one output LSB of the model (last-bit accuracy), and must appear exactly one
// cycle after its input was accepted.
//
// Stimulus phases: random samples with random gaps in in_valid, an impulse,
// a full-scale step, a full-scale square wave, and twice the worst-case input
// for the filter's peak gain (u(k-l) = +/-full scale with the sign of the
// impulse response h(l)), which drives the output close to its maximum range.
//
// Mechanisms counted, each of which must occur at least once:
//   stall       cycles with in_valid low while the filter holds its state
//   round_up    final rounding increasing the extended value
//   round_down  final rounding decreasing it
//   wrap        an intermediate running sum of the sum-of-products terms
//               leaving the internal range (modular overflow that cancels)
//   peak        |output| beyond 1, i.e. beyond the input range, which needs
//               the extra output MSB derived from the worst-case peak gain
module tb_fix_iir;
  import iir_pkg::*;

  localparam int  NB = 5, NA = 5;
  localparam int  L_IN = REF_L_IN, L_OUT = REF_L_OUT;
  localparam int  M_OUT = REF_M_OUT[0];
  localparam int  L_EXT = REF_L_EXT[0];
  localparam int  W_U = 1 - L_IN, W_OUT = M_OUT - L_OUT + 1;
  localparam int  SHIFT = L_OUT - L_EXT;
  localparam int  N_HIST = 64;      // length of the worst-case input pattern

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_round_up = 0, n_round_down = 0, n_wrap = 0, n_peak = 0;
  int n_not_nearest = 0, n_out = 0;
  real max_err = 0.0;

  logic             rst_n, in_valid;
  logic [W_U-1:0]   u_in;
  logic             out_valid;
  logic [W_OUT-1:0] y_out;

  fix_iir dut (.clk, .rst_n, .in_valid, .u_in, .out_valid, .y_out);

  // Reference model state: past inputs and past exact outputs.
  real uh [NB+1];
  real yh [NA+1];
  real y_expected;
  bit  pending = 1'b0;
  bit  prev_in_valid = 1'b0;

  // Count overflows of the running sum of the sum-of-products terms.
  // Term count and internal width of the sum of products, recomputed here
  // from the formats: NB+1 inputs of W_U bits and NA of W_Y bits, each split
  // into ALPHA-bit digits; half an internal unit of error per table gives the
  // guard bits.
  localparam int W_Y = M_OUT - L_EXT + 1;
  localparam int N_T = (NB + 1) * num_chunks(W_U) + NA * num_chunks(W_Y);
  localparam int G   = $clog2(N_T + 1);
  localparam int W_P = W_Y + G;
  function automatic int count_wraps();
    longint s, lim;
    int w = 0;
    lim = longint'(1) << (W_P - 1);
    s = 0;
    for (int i = 0; i < N_T; i++) begin
      logic [W_P-1:0] t;
      t = dut.u_sopc.terms[i];
      s += longint'($signed(t));
      if (s >= lim)  begin s -= 2 * lim; w++; end
      if (s < -lim)  begin s += 2 * lim; w++; end
    end
    return w;
  endfunction

  always @(posedge clk) if (rst_n) begin
    // Outputs of the previous accepted sample.
    checks++;
    if (out_valid !== prev_in_valid) begin
      failures++;
      $display("FAIL out_valid=%0b one cycle after in_valid=%0b", out_valid, prev_in_valid);
    end
    if (out_valid && pending) begin
      real y, err;
      y   = real'($signed(y_out)) * (2.0 ** L_OUT);
      err = y - y_expected;
      if (err < 0.0) err = -err;
      if (err > max_err) max_err = err;
      if (err > 0.5 * (2.0 ** L_OUT)) n_not_nearest++;
      if (y > 1.0 || y < -1.0) n_peak++;
      n_out++;
      checks++;
      if (err >= 2.0 ** L_OUT) begin
        failures++;
        $display("FAIL sample %0d: y_out=%f exact=%f", n_out, y, y_expected);
      end
      pending = 1'b0;
    end
    prev_in_valid = in_valid;
    if (!in_valid) n_stall++;
    else begin
      real acc;
      logic [SHIFT-1:0] low;
      for (int i = NB; i > 0; i--) uh[i] = uh[i-1];
      uh[0] = real'($signed(u_in)) * (2.0 ** L_IN);
      acc = 0.0;
      for (int i = 0; i <= NB; i++) acc += REF_B[0][i] * uh[i];
      for (int i = 1; i <= NA; i++) acc -= REF_A[0][i-1] * yh[i];
      for (int i = NA; i > 1; i--) yh[i] = yh[i-1];
      yh[1] = acc;
      y_expected = acc;
      pending = 1'b1;
      low = dut.y_ext[SHIFT-1:0];
      if (low[SHIFT-1]) n_round_up++;
      else if (low != '0) n_round_down++;
      n_wrap += count_wraps();
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [W_U-1:0] FS_POS = {1'b0, {(W_U-1){1'b1}}};  // 1 - 2^L_IN
  localparam logic [W_U-1:0] FS_NEG = {1'b1, {(W_U-1){1'b0}}};  // -1

  task automatic send(logic [W_U-1:0] u, bit allow_gap);
    @(negedge clk);
    if (allow_gap && ($urandom % 5) == 32'd0) begin
      in_valid = 1'b0;
      u_in = W_U'($urandom);          // ignored while in_valid is low
      @(negedge clk);
    end
    in_valid = 1'b1;
    u_in = u;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    real h [N_HIST];
    real hy [NA+1];
    foreach (uh[i]) uh[i] = 0.0;
    foreach (yh[i]) yh[i] = 0.0;
    rst_n = 1'b0; in_valid = 1'b0; u_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Impulse response of the exact filter, for the worst-case pattern.
    foreach (hy[i]) hy[i] = 0.0;
    for (int k = 0; k < N_HIST; k++) begin
      real acc;
      acc = (k <= NB) ? REF_B[0][k] : 0.0;
      for (int i = 1; i <= NA; i++) acc -= REF_A[0][i-1] * hy[i];
      for (int i = NA; i > 1; i--) hy[i] = hy[i-1];
      hy[1] = acc;
      h[k] = acc;
    end

    // Random samples with gaps.
    for (int n = 0; n < 4000; n++) send(W_U'($urandom), 1'b1);
    // Impulse and step.
    send(FS_POS, 1'b0);
    for (int n = 0; n < 60; n++) send('0, 1'b0);
    for (int n = 0; n < 60; n++) send(FS_NEG, 1'b0);
    // Full-scale square wave.
    for (int n = 0; n < 200; n++) send((n % 2 == 1) ? FS_POS : FS_NEG, 1'b1);
    // Worst-case peak pattern, positive then negative.
    for (int rep = 0; rep < 2; rep++) begin
      for (int j = 0; j < N_HIST; j++) begin
        bit pos;
        pos = (h[N_HIST-1-j] >= 0.0) ^ (rep == 1);
        send(pos ? FS_POS : FS_NEG, 1'b0);
      end
      for (int n = 0; n < 40; n++) send(W_U'($urandom), 1'b0);
    end
    repeat (3) @(negedge clk);

    $display("outputs=%0d max_error=%0.3f LSB not_nearest=%0d", n_out, max_err * (2.0 ** -L_OUT), n_not_nearest);
    $display("mechanisms: stall=%0d round_up=%0d round_down=%0d wrap=%0d peak=%0d",
             n_stall, n_round_up, n_round_down, n_wrap, n_peak);
    checks += 5;
    if (n_stall == 0)      begin failures++; $display("FAIL no stall"); end
    if (n_round_up == 0)   begin failures++; $display("FAIL no rounding up"); end
    if (n_round_down == 0) begin failures++; $display("FAIL no rounding down"); end
    if (n_wrap == 0)       begin failures++; $display("FAIL no internal wrap"); end
    if (n_peak == 0)       begin failures++; $display("FAIL no output beyond the input range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
