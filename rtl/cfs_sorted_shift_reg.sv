// cfs_sorted_shift_reg: the sorted register (SR) array, a serial shifter.
//
// N entries of K bits. The read-sort phase delivers elements in increasing
// value order, one per shift. With left=1 every entry moves one place toward
// index 0 and the new element enters at index N-1, so after N shifts q[0]
// holds the smallest element (ascending). With left=0 entries move toward
// index N-1 and the new element enters at index 0, so q[0] ends up the
// largest (descending). Selecting the order by the shift direction follows
// the source design; which direction means ascending is this design's
// choice. Timing: one shift per rising edge with shift high; clear zeroes
// the array (takes priority); asynchronous active-low reset.
module cfs_sorted_shift_reg #(
  parameter int unsigned K = 10,
  parameter int unsigned N = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         shift,
  input  logic         left,
  input  logic [K-1:0] din,
  output logic [K-1:0] q [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else if (shift) begin
      if (left) begin
        for (int i = 0; i < N - 1; i++) q[i] <= q[i+1];
        q[N-1] <= din;
      end else begin
        for (int i = N - 1; i > 0; i--) q[i] <= q[i-1];
        q[0] <= din;
      end
    end
  end

endmodule
