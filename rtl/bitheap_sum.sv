// bitheap_sum: adds the aligned outputs of all constant-multiplier tables of a
// sum of products into a single result.
//
// Every term is already aligned to the same LSB and carried at the full
// result width, so the bit heap reduces to a multi-operand addition modulo
// 2^W.  It is written as a balanced binary tree of adders (ceil(log2 N_TERMS)
// levels); synthesis maps it to carry chains or compressors.  Wrap-around is
// intended: the enclosing filter works modulo the range of its output, and
// intermediate overflows cancel out in the final result.
//
// Interface: terms[0..N_TERMS-1] in, sum out, all W bits.  Combinational.
// The original method leaves the compression to a bit-heap framework; the adder tree
// is this design's simplest equivalent.
module bitheap_sum #(
  parameter int N_TERMS = 12,
  parameter int W       = 20
) (
  input  logic [W-1:0] terms [N_TERMS],
  output logic [W-1:0] sum
);
  // Number of tree levels and leaves (padded to a power of two with zeros).
  localparam int LEVELS = (N_TERMS > 1) ? $clog2(N_TERMS) : 0;
  localparam int LEAVES = 1 << LEVELS;

  // Level by level, partial sum i of a level replaces entry i of the array;
  // entries 2i and 2i+1 are read before they are overwritten.
  always_comb begin
    logic [W-1:0] acc [LEAVES];
    for (int i = 0; i < LEAVES; i++)
      acc[i] = (i < N_TERMS) ? terms[i] : '0;
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < (LEAVES >> l); i++)
        acc[i] = acc[2*i] + acc[2*i+1];
    sum = acc[0];
  end

endmodule
