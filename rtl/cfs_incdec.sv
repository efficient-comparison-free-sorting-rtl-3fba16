// cfs_incdec: shared W-bit incrementor/decrementor for the flag registers.
//
// dec=0: y = a + 1 (write-evaluate, one more occurrence of an element).
// dec=1: y = a - 1, computed as a + all-ones (read-sort, one occurrence
// emitted). carry_out is the carry out of the W-bit addition. For a
// decrement it is 1 exactly when a is non-zero, so together with the
// one-detector it separates the three read-sort cases without a magnitude
// comparator: a == 0 (carry 0), a == 1 (one-detector), a > 1 (carry 1 and
// not one). Purely combinational.
module cfs_incdec #(
  parameter int unsigned W = 11
) (
  input  logic         dec,
  input  logic [W-1:0] a,
  output logic [W-1:0] y,
  output logic         carry_out
);

  logic [W-1:0] addend;

  always_comb begin
    addend = dec ? {W{1'b1}} : W'(1);
    {carry_out, y} = {1'b0, a} + {1'b0, addend};
  end

endmodule
