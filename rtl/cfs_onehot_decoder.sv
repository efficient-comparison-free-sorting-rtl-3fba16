// cfs_onehot_decoder: K-bit binary to 2^K-bit one-hot decoder.
//
// Converts an element (write-evaluate phase) or the parallel counter value
// (read-sort phase) into its one-hot weight, which selects one order register
// and one flag register. With en low every output is 0, so a cycle without
// a valid element selects nothing; the enable is this design's addition.
// Purely combinational.
module cfs_onehot_decoder #(
  parameter int unsigned K = 10,
  localparam int unsigned N = 1 << K
) (
  input  logic         en,
  input  logic [K-1:0] bin,
  output logic [N-1:0] onehot
);

  always_comb begin
    onehot = '0;
    if (en) onehot[bin] = 1'b1;
  end

endmodule
