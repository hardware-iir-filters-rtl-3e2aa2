// final_round: rounds a fixed-point value to nearest by dropping SHIFT LSBs.
//
// The filter computes y~(k) in an extended format with SHIFT more fraction
// bits than its output.  This stage adds half an output LSB and truncates:
// dout = floor(din / 2^SHIFT + 1/2), ties rounding upwards.  Its error is at
// most half an output LSB.  The addition wraps within the W_IN-bit range, like
// the rest of the filter's datapath, whose output range already includes a
// margin for this rounding.
//
// Interface: din (W_IN bits, signed), dout (W_IN-SHIFT bits, signed).
// Timing: combinational.  SHIFT must be at least 1.
// Round to nearest at this point follows the method; the tie direction is
// this design's choice.
module final_round #(
  parameter int W_IN  = 16,
  parameter int SHIFT = 3
) (
  input  logic [W_IN-1:0]       din,
  output logic [W_IN-SHIFT-1:0] dout
);
  logic [W_IN-1:0] sum;

  if (SHIFT < 1) begin : g_bad_shift
    $error("final_round: SHIFT must be at least 1");
  end

  assign sum  = din + (W_IN'(1) << (SHIFT - 1));
  assign dout = sum[W_IN-1:SHIFT];
endmodule
