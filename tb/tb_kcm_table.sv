// tb_kcm_table: exhaustive check of three constant-multiplier tables.
//
// For every digit value the table output, minus its constant, must equal the
// product c * d * 2^SHIFT rounded to nearest, and lie within half a unit of
// it.  The expected value is computed here with $rtoi and an explicit
// rounding correction.  Instance 0 has an unsigned digit, instance 1 a signed
// digit and a constant added, instance 2 a constant so small that the table
// is neglected and must output only its constant.  Instance 3 is the signed
// table of instance 1 in offset form: its width, found here as the smallest
// two's complement width holding all expected entries, must leave every bit
// above it zero, and its entries must carry the inverted sign bit (entry plus
// half the width's range).
module tb_kcm_table;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam real    C0 = 0.7071,  C1 = -1.37, C2 = 0.001;
  localparam int     S0 = 3,       S1 = -2,    S2 = -2;
  localparam longint B0 = 0,       B1 = 5,     B2 = 7;

  logic [5:0]  d;
  logic [15:0] t0, t1, t2, t3;

  kcm_table #(.W_D(6), .SIGNED_D(1'b0), .C(C0), .SHIFT(S0), .W_T(16), .BIAS(B0)) u0 (.d(d), .t(t0));
  kcm_table #(.W_D(6), .SIGNED_D(1'b1), .C(C1), .SHIFT(S1), .W_T(16), .BIAS(B1)) u1 (.d(d), .t(t1));
  kcm_table #(.W_D(6), .SIGNED_D(1'b0), .C(C2), .SHIFT(S2), .W_T(16), .BIAS(B2)) u2 (.d(d), .t(t2));
  kcm_table #(.W_D(6), .SIGNED_D(1'b1), .C(C1), .SHIFT(S1), .W_T(16), .OFFSET_FORM(1'b1)) u3 (.d(d), .t(t3));

  // Nearest integer of v, ties upwards, computed from truncation toward zero.
  function automatic longint nearest(real v);
    longint r;
    r = longint'($rtoi(v));
    if (v - real'(r) >= 0.5) r = r + 1;
    else if (v - real'(r) < -0.5) r = r - 1;
    return r;
  endfunction

  task automatic check(string name, logic [15:0] t, real c, int s, longint bias, bit sgn, bit neglected);
    longint got, exp;
    real    v, dv;
    dv  = (sgn && d[5]) ? real'(int'(d) - 64) : real'(d);
    v   = c * dv * (2.0 ** s);
    got = longint'($signed(t)) - bias;
    exp = neglected ? 0 : nearest(v);
    checks++;
    if (got != exp || (!neglected && (real'(got) - v > 0.5 || v - real'(got) > 0.5))) begin
      failures++;
      $display("FAIL %s d=%0d got=%0d expected=%0d exact=%f", name, d, got, exp, v);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint lo = 0, hi = 0;
    int     wn;
    // Expected width of the offset-form table.
    for (int e = 0; e < 64; e++) begin
      longint v;
      v = nearest(C1 * real'(e >= 32 ? e - 64 : e) * (2.0 ** S1));
      if (v < lo) lo = v;
      if (v > hi) hi = v;
    end
    wn = 1;
    while (lo < -(longint'(1) << (wn - 1)) || hi >= (longint'(1) << (wn - 1))) wn++;
    for (int e = 0; e < 64; e++) begin
      d = 6'(e);
      @(posedge clk);
      check("unsigned", t0, C0, S0, B0, 1'b0, 1'b0);
      check("signed",   t1, C1, S1, B1, 1'b1, 1'b0);
      check("neglected", t2, C2, S2, B2, 1'b0, 1'b1);
      checks++;
      if ((t3 >> wn) != 0) begin
        failures++;
        $display("FAIL offset form d=%0d: bits above %0d not zero (%h)", d, wn, t3);
      end
      check("offset", t3, C1, S1, longint'(1) << (wn - 1), 1'b1, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
