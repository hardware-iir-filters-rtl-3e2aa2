// tb_bitheap_sum: random check of the multi-operand adder.
//
// Two instances (12 terms of 20 bits, 5 terms of 9 bits) get random terms;
// each sum must equal the 64-bit sum of the terms reduced modulo 2^W.
module tb_bitheap_sum;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [19:0] ta [12];
  logic [8:0]  tb5 [5];
  logic [19:0] sa;
  logic [8:0]  sb;

  bitheap_sum #(.N_TERMS(12), .W(20)) u_a (.terms(ta),  .sum(sa));
  bitheap_sum #(.N_TERMS(5),  .W(9))  u_b (.terms(tb5), .sum(sb));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_a, ref_b;
    for (int n = 0; n < 2000; n++) begin
      ref_a = 0;
      ref_b = 0;
      for (int i = 0; i < 12; i++) begin
        // Every fourth vector uses extreme values to force carries out.
        ta[i] = (n % 4 == 0) ? 20'hFFFFF : 20'($urandom);
        ref_a += longint'(ta[i]);
      end
      for (int i = 0; i < 5; i++) begin
        tb5[i] = (n % 4 == 1) ? 9'h1FF : 9'($urandom);
        ref_b += longint'(tb5[i]);
      end
      @(posedge clk);
      checks += 2;
      if (sa != 20'(ref_a)) begin
        failures++;
        $display("FAIL 12x20: got %h expected %h", sa, 20'(ref_a));
      end
      if (sb != 9'(ref_b)) begin
        failures++;
        $display("FAIL 5x9: got %h expected %h", sb, 9'(ref_b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
