// tb_fix_sopc: checks that the sum of products is faithful (last-bit
// accurate).
//
// Instance A is the default 4-input unit (two 12-bit and two 16-bit inputs,
// generic constants).  Instance B mixes a zero constant, 1, -0.5 and a
// generic constant, so that it uses the two special multipliers.  For random
// and extreme inputs the exact sum of products is computed in double
// precision, and the output must be within one output LSB of it (error
// strictly below 2^L_R), modulo the output range.  The guard-bit counts the
// unit derives are compared with a hand count: A has 2+2+3+3 = 10 half-ulps
// of multiplier error, so 4 guard bits; B has 0+0+2+3 = 5, so 3 guard bits.
// Results that are not the nearest value (allowed by faithful rounding) are
// counted and reported.
module tb_fix_sopc;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int  N = 4;
  localparam int  MX = iir_pkg::MAX_IN;
  localparam real CA [MX] = '{0: 0.3, 1: 0.6, 2: -1.2, 3: 0.4, default: 0.0};
  localparam real CB [MX] = '{0: 0.0, 1: 1.0, 2: -0.5, 3: 0.123, default: 0.0};
  localparam int  WX [MX] = '{0: 12, 1: 12, 2: 16, 3: 16, default: 1};
  localparam int  LX [MX] = '{0: -11, 1: -11, 2: -14, 3: -14, default: 0};
  localparam int  M_R = 1, L_R = -14, WR = M_R - L_R + 1;

  logic [15:0]   x [N];
  logic [WR-1:0] ra, rb;

  fix_sopc u_a (.x(x), .r(ra));
  fix_sopc #(.N(N), .C(CB), .W_X(WX), .L_X(LX), .WXMAX(16), .M_R(M_R), .L_R(L_R))
    u_b (.x(x), .r(rb));

  function automatic longint wrap(longint v);
    longint m;
    m = v & ((longint'(1) << WR) - 1);
    if (m >= (longint'(1) << (WR - 1))) m -= (longint'(1) << WR);
    return m;
  endfunction

  int not_nearest = 0;

  task automatic check_one(string name, logic [WR-1:0] r, real c [MX]);
    real    v, err;
    longint fl, diff;
    v = 0.0;
    for (int i = 0; i < N; i++) begin
      longint xi;
      xi = (WX[i] == 12) ? longint'($signed(x[i][11:0])) : longint'($signed(x[i]));
      v += c[i] * real'(xi) * (2.0 ** (LX[i] - L_R));
    end
    fl   = longint'($floor(v));
    diff = wrap(longint'(r) - fl);
    err  = real'(diff) - (v - real'(fl));
    checks++;
    if (err >= 1.0 || err <= -1.0) begin
      failures++;
      $display("FAIL %s error %f LSB", name, err);
    end else if (err > 0.5 || err < -0.5) begin
      not_nearest++;
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
    checks += 2;
    if (u_a.G != 4) begin failures++; $display("FAIL guard bits A = %0d", u_a.G); end
    if (u_b.G != 3) begin failures++; $display("FAIL guard bits B = %0d", u_b.G); end
    for (int n = 0; n < 6000; n++) begin
      for (int i = 0; i < N; i++) begin
        case (n % 3)
          0: x[i] = 16'($urandom);
          1: x[i] = ($urandom % 2) ? 16'h8000 : 16'h7FFF;   // extremes
          default: x[i] = 16'($signed(16'($urandom)) >>> ($urandom % 12));
        endcase
        if (WX[i] == 12) x[i] = 16'($signed(x[i][11:0]));
      end
      @(posedge clk);
      check_one("A", ra, CA);
      check_one("B", rb, CB);
    end
    $display("results not the nearest value (allowed): %0d of %0d", not_nearest, checks - 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
