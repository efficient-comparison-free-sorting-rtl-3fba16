// cfs_parallel_counter: the K-bit counter ("PC") of the sorter.
//
// In the write-evaluate phase it counts the N = 2^K input cycles and its
// terminal count (last) ends the phase. In the read-sort phase it indexes
// the values 0..N-1; its increment is held off while a duplicated element
// is being emitted. A plain binary register with synchronous clear and
// increment enable, wrapping from N-1 to 0, asynchronous active-low reset.
// One increment per clock when inc is high.
module cfs_parallel_counter #(
  parameter int unsigned K = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         inc,
  output logic [K-1:0] count,
  output logic         last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else if (inc)   count <= count + K'(1);
  end

  assign last = &count;

endmodule
