// cfs_flag_reg_array: the flag register (FR) array of the sorter.
//
// N occurrence counters of FLAG_W bits, one per possible element value.
// The increment or decrement itself is done by the shared incrementor/
// decrementor outside this array: the array presents the one-hot selected
// flag on rdata and loads wdata into every register whose we_onehot bit is
// set. clear zeroes all flags (used at the start of a sort; this design's
// choice). Timing: loads and clear on the rising edge, clear first;
// combinational AND-OR read; asynchronous active-low reset to 0.
module cfs_flag_reg_array #(
  parameter int unsigned N      = 1024,
  parameter int unsigned FLAG_W = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [N-1:0]      we_onehot,
  input  logic [FLAG_W-1:0] wdata,
  input  logic [N-1:0]      re_onehot,
  output logic [FLAG_W-1:0] rdata
);

  logic [FLAG_W-1:0] flags [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) flags[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < N; i++) flags[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++)
        if (we_onehot[i]) flags[i] <= wdata;
    end
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < N; i++)
      rdata |= flags[i] & {FLAG_W{re_onehot[i]}};
  end

endmodule
