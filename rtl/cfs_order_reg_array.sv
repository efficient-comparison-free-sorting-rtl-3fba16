// cfs_order_reg_array: the order register (OR) array of the sorter.
//
// N = 2^K registers of K bits. In the write-evaluate phase the one-hot
// decoder selects register i for an input element of value i and that
// register records the element. In the read-sort phase the one-hot decoder,
// driven by the parallel counter, selects one register onto the read bus.
// The tri-state bus of a transistor-level design is written as an AND-OR of
// each register with its one-hot select, which gives the same value for a
// one-hot or all-zero select (all-zero reads 0).
// Timing: writes on the rising clock edge; the read is combinational.
// No reset: a register is read only after it was written in the same sort.
module cfs_order_reg_array #(
  parameter int unsigned K = 10,
  localparam int unsigned N = 1 << K
) (
  input  logic         clk,
  input  logic [N-1:0] we_onehot,
  input  logic [K-1:0] wdata,
  input  logic [N-1:0] re_onehot,
  output logic [K-1:0] rdata
);

  logic [K-1:0] regs [N];

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++)
      if (we_onehot[i]) regs[i] <= wdata;
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < N; i++)
      rdata |= regs[i] & {K{re_onehot[i]}};
  end

endmodule
