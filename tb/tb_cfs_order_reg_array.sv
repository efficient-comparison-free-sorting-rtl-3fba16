// tb_cfs_order_reg_array: K = 4, N = 16. Writes random values through
// one-hot selects (sometimes none), keeps a model array, and checks the
// one-hot read bus for every register and the all-zero select.
module tb_cfs_order_reg_array;
  localparam int unsigned K = 4;
  localparam int unsigned N = 1 << K;
  logic clk = 0;
  logic [N-1:0] we_onehot, re_onehot;
  logic [K-1:0] wdata, rdata;
  logic [K-1:0] model [N];
  int checks = 0, failures = 0;

  cfs_order_reg_array #(.K(K)) dut (.clk, .we_onehot, .wdata, .re_onehot, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_onehot = '0; re_onehot = '0; wdata = '0;
    // Fill every register once so each has a known value.
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we_onehot = N'(1) << i; wdata = K'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we_onehot = '0;
    for (int r = 0; r < 400; r++) begin
      int wi, ri;
      @(negedge clk);
      wi = $urandom_range(0, N);      // N means no write
      wdata = K'($urandom);
      we_onehot = (wi < N) ? (N'(1) << wi) : '0;
      @(posedge clk);
      if (wi < N) model[wi] = wdata;
      #1;
      we_onehot = '0;
      ri = $urandom_range(0, N);      // N means no select
      re_onehot = (ri < N) ? (N'(1) << ri) : '0;
      #1;
      checks++;
      if (rdata !== ((ri < N) ? model[ri] : '0)) begin
        failures++;
        $display("FAIL read %0d got %0d", ri, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
