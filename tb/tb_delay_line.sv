// tb_delay_line: checks the tap chain against a software shift register.
//
// Random data with a random enable (about 70% of cycles) is pushed through a
// 12-bit, 5-deep chain after reset; after every edge all taps must match the
// model, which shifts only when the enable was high.  Taps must be zero just
// after reset.
module tb_delay_line;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n, en;
  logic [11:0] din;
  logic [11:0] taps [5];
  logic [11:0] model [5];

  delay_line #(.W(12), .DEPTH(5)) dut (.clk, .rst_n, .en, .din, .taps);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int j = 0; j < 5; j++) begin
      checks++;
      if (taps[j] !== model[j]) begin
        failures++;
        $display("FAIL tap %0d got %h expected %h", j, taps[j], model[j]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; din = '0;
    foreach (model[j]) model[j] = '0;
    repeat (2) @(posedge clk);
    #1 compare();
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en  = ($urandom % 10) < 7;
      din = 12'($urandom);
      @(posedge clk);
      if (en) begin
        for (int j = 4; j > 0; j--) model[j] = model[j-1];
        model[0] = din;
      end
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
