// tb_final_round: exhaustive check of round-to-nearest by dropping LSBs.
//
// An 8-bit value with 3 bits dropped: every input is compared with
// floor(x/8 + 1/2) computed in real arithmetic and wrapped to 5 bits.  The
// count of inputs rounded up and down is also checked.
module tb_final_round;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] din;
  logic [4:0] dout;

  final_round #(.W_IN(8), .SHIFT(3)) dut (.din, .dout);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int up = 0, down = 0;
    for (int v = -128; v < 128; v++) begin
      real    q;
      longint e;
      din = 8'(v);
      @(posedge clk);
      q = real'(v) / 8.0;
      e = longint'($floor(q + 0.5));
      if (real'(e) > q) up++;
      if (real'(e) < q) down++;
      checks++;
      if (dout != 5'(e)) begin
        failures++;
        $display("FAIL din=%0d got %0d expected %0d", v, $signed(dout), e);
      end
    end
    checks++;
    if (up != 128 || down != 96) begin
      failures++;
      $display("FAIL rounding counts up=%0d down=%0d", up, down);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
