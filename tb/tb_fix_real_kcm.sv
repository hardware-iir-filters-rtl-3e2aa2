// tb_fix_real_kcm: random check of the real-constant multiplier.
//
// Five multipliers cover every construction: generic tables with a positive
// and with a negative constant, a power of two shifted left (exact), a power
// of two shifted right (truncating) and zero (with a constant added).  For
// random and extreme inputs, the sum of the table outputs minus the constant
// is compared with the exact product c*x (in units of 2^L_P, computed in
// double precision) modulo 2^W_P.  Tables in offset form contribute a known
// constant (iir_pkg::kcm_offset), removed before the comparison.  The error must stay within the bound the
// sum of products relies on: D/2 units for D tables, below one unit for a
// truncating shift, zero otherwise.
module tb_fix_real_kcm;
  import iir_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int     NI = 5;
  localparam int     WP = 24;
  localparam real    CS   [NI] = '{0.7071, -3.3, -2.0, 0.25, 0.0};
  localparam int     WX   [NI] = '{18, 12, 12, 12, 12};
  localparam int     LX   [NI] = '{-17, -11, -11, -11, -11};
  localparam int     LP   [NI] = '{-20, -16, -14, -11, -14};
  localparam longint BS   [NI] = '{0, 9, 0, 1, 3};
  // Instance 0 has all its tables in offset form, the others a plain table 0.
  localparam bit     P0   [NI] = '{1'b0, 1'b1, 1'b1, 1'b1, 1'b1};
  // Error bound in units of 2^L_P: D/2 for D tables, one unit for a
  // truncating shift, zero for an exact shift or a zero constant.
  localparam real    BOUND [NI] = '{1.5, 1.0, 0.0, 1.0, 0.0};

  logic [17:0]  xin;
  longint       sums [NI];

  for (genvar k = 0; k < NI; k++) begin : g_dut
    localparam int D = num_chunks(WX[k]);
    logic [WP-1:0] t [D];
    fix_real_kcm #(.C(CS[k]), .W_X(WX[k]), .L_X(LX[k]), .L_P(LP[k]), .W_P(WP), .BIAS(BS[k]), .PLAIN0(P0[k]))
      u_kcm (.x(xin[WX[k]-1:0]), .t(t));
    always_comb begin
      logic [WP-1:0] s;
      s = '0;
      foreach (t[j]) s += t[j];
      sums[k] = longint'(s);
    end
  end

  // Reduce v to the signed range of WP bits.
  function automatic longint wrap(longint v);
    longint m;
    m = v & ((longint'(1) << WP) - 1);
    if (m >= (longint'(1) << (WP - 1))) m -= (longint'(1) << WP);
    return m;
  endfunction

  task automatic check_all();
    for (int k = 0; k < NI; k++) begin
      real    xv, v, err;
      longint fl, diff;
      logic [17:0] xk;
      xk   = xin & ((18'(1) << WX[k]) - 1);
      // Sign-extend the low WX[k] bits.
      xv   = real'(longint'(xk)) - (xk[WX[k]-1] ? real'(longint'(1) << WX[k]) : 0.0);
      v    = CS[k] * xv * (2.0 ** (LX[k] - LP[k]));
      fl   = longint'($floor(v));
      diff = wrap(sums[k] - BS[k] - kcm_offset(CS[k], WX[k], LX[k], LP[k], WP, P0[k]) - fl);
      err  = real'(diff) - (v - real'(fl));
      if (err < 0.0) err = -err;
      checks++;
      if ((BOUND[k] == 0.0) ? (err != 0.0) : (err > BOUND[k] + 1.0e-9)) begin
        failures++;
        $display("FAIL kcm %0d c=%f x=%0d err=%f units", k, CS[k], xk, err);
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Extremes first: zero, -1, most negative and most positive 12/18-bit values.
    logic [17:0] special [6] = '{18'h0, 18'h3FFFF, 18'h20000, 18'h1FFFF, 18'h00800, 18'h007FF};
    foreach (special[i]) begin
      xin = special[i];
      @(posedge clk);
      check_all();
    end
    for (int n = 0; n < 5000; n++) begin
      xin = 18'($urandom);
      @(posedge clk);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
