// cfs_one_detector: detects a flag register value of exactly 1.
//
// In the read-sort phase a flag value of 1 means the element occurs once:
// it is stored and the parallel counter moves on. The detector is an AND of
// bit 0 with the NOR of all higher bits. Purely combinational.
module cfs_one_detector #(
  parameter int unsigned W = 11
) (
  input  logic [W-1:0] a,
  output logic         is_one
);

  assign is_one = a[0] & ~(|a[W-1:1]);

endmodule
