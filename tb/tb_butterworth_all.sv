// tb_butterworth_all: runs the five reference filters side by side.
//
// The filters are the 5th-order Butterworth low-pass filters for 12-bit
// signals with cut-off 0.6, 0.7, 0.8, 0.9 and 0.95 (iir_pkg), each built
// with its own derived formats (M_OUT, L_EXT).  All receive the same
// stimulus: random samples, full-scale random signs, a step and a slow
// full-scale sine.  Each output is compared with a double-precision model of
// its filter and must be within one output LSB (last-bit accuracy).  The
// largest error seen and the number of outputs that are not the nearest value
// are reported per filter.
module tb_butterworth_all;
  import iir_pkg::*;

  localparam int L_IN = REF_L_IN, L_OUT = REF_L_OUT;
  localparam int W_U  = 1 - L_IN;
  localparam int NS   = 6000;     // samples per run

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic           rst_n, in_valid;
  logic [W_U-1:0] u_in;

  typedef real coef_t [MAX_ORDER+1];

  function automatic coef_t coef_b(int f);
    coef_t c = '{default: 0.0};
    for (int i = 0; i <= 5; i++) c[i] = REF_B[f][i];
    return c;
  endfunction

  function automatic coef_t coef_a(int f);
    coef_t c = '{default: 0.0};
    for (int i = 0; i < 5; i++) c[i] = REF_A[f][i];
    return c;
  endfunction

  int  n_checked [N_REF];
  int  n_not_nearest [N_REF];
  real max_err [N_REF];

  for (genvar f = 0; f < N_REF; f++) begin : g_filter
    localparam int M_OUT = REF_M_OUT[f];
    localparam int L_EXT = REF_L_EXT[f];
    localparam int W_OUT = M_OUT - L_OUT + 1;
    localparam coef_t BC = coef_b(f);
    localparam coef_t AC = coef_a(f);

    logic             out_valid;
    logic [W_OUT-1:0] y_out;

    fix_iir #(
      .NB(5), .NA(5),
      .B(BC), .A(AC[0:MAX_ORDER-1]),
      .L_IN(L_IN), .L_OUT(L_OUT), .M_OUT(M_OUT), .L_EXT(L_EXT)
    ) dut (.clk, .rst_n, .in_valid, .u_in, .out_valid, .y_out);

    real uh [6];
    real yh [6];
    real y_expected;
    bit  pending = 1'b0;

    initial begin
      foreach (uh[i]) uh[i] = 0.0;
      foreach (yh[i]) yh[i] = 0.0;
      n_checked[f] = 0;
      n_not_nearest[f] = 0;
      max_err[f] = 0.0;
    end

    always @(posedge clk) if (rst_n) begin
      if (out_valid && pending) begin
        real y, err;
        y   = real'($signed(y_out)) * (2.0 ** L_OUT);
        err = y - y_expected;
        if (err < 0.0) err = -err;
        if (err > max_err[f]) max_err[f] = err;
        if (err > 0.5 * (2.0 ** L_OUT)) n_not_nearest[f]++;
        n_checked[f]++;
        checks++;
        if (err >= 2.0 ** L_OUT) begin
          failures++;
          if (failures < 20)
            $display("FAIL fc=%0.2f sample %0d: y_out=%f exact=%f", REF_FC[f], n_checked[f], y, y_expected);
        end
        pending = 1'b0;
      end
      if (in_valid) begin
        real acc;
        for (int i = 5; i > 0; i--) uh[i] = uh[i-1];
        uh[0] = real'($signed(u_in)) * (2.0 ** L_IN);
        acc = 0.0;
        for (int i = 0; i <= 5; i++) acc += REF_B[f][i] * uh[i];
        for (int i = 1; i <= 5; i++) acc -= REF_A[f][i-1] * yh[i];
        for (int i = 5; i > 1; i--) yh[i] = yh[i-1];
        yh[1] = acc;
        y_expected = acc;
        pending = 1'b1;
      end
    end
  end

  initial begin
    repeat (4 * NS + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [W_U-1:0] FS_POS = {1'b0, {(W_U-1){1'b1}}};
  localparam logic [W_U-1:0] FS_NEG = {1'b1, {(W_U-1){1'b0}}};

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; u_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      case (n * 4 / NS)
        0: u_in = W_U'($urandom);
        1: u_in = ($urandom % 2 == 32'd1) ? FS_POS : FS_NEG;
        2: u_in = (n % 200 < 100) ? FS_POS : FS_NEG;
        default: u_in = W_U'(longint'($floor(2047.0 * $sin(real'(n) * 0.05))));
      endcase
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(negedge clk);
    for (int f = 0; f < N_REF; f++) begin
      checks++;
      if (n_checked[f] != NS) begin
        failures++;
        $display("FAIL fc=%0.2f checked %0d of %0d outputs", REF_FC[f], n_checked[f], NS);
      end
      $display("fc=%0.2f M_OUT=%0d L_EXT=%0d outputs=%0d max_error=%0.3f LSB not_nearest=%0d",
               REF_FC[f], REF_M_OUT[f], REF_L_EXT[f], n_checked[f],
               max_err[f] * (2.0 ** -L_OUT), n_not_nearest[f]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
