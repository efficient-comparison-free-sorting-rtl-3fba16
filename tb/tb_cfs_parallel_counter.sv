// tb_cfs_parallel_counter: drives the K = 4 counter with a random increment
// enable and occasional clears, and compares count and last against a
// model every cycle, including the wrap from N-1 to 0.
module tb_cfs_parallel_counter;
  localparam int unsigned K = 4;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0;
  logic [K-1:0] count;
  logic last;
  int model = 0, wraps = 0;
  int checks = 0, failures = 0;

  cfs_parallel_counter #(.K(K)) dut (.clk, .rst_n, .clear, .inc, .count, .last);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      checks++;
      if (count !== K'(model) || last !== (model == (1 << K) - 1)) begin
        failures++;
        $display("FAIL cycle %0d count=%0d model=%0d last=%0b", c, count, model, last);
      end
      clear = ($urandom_range(0, 99) < 3);
      inc   = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (clear) model = 0;
      else if (inc) begin
        if (model == (1 << K) - 1) wraps++;
        model = (model + 1) % (1 << K);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
