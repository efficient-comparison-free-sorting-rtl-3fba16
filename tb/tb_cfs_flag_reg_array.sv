// tb_cfs_flag_reg_array: N = 16, FLAG_W = 5. Loads random values through
// one-hot selects, checks every register through the one-hot read bus
// against a model, then checks that clear zeroes all flags.
module tb_cfs_flag_reg_array;
  localparam int unsigned N = 16;
  localparam int unsigned FLAG_W = 5;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [N-1:0] we_onehot = '0, re_onehot = '0;
  logic [FLAG_W-1:0] wdata = '0, rdata;
  logic [FLAG_W-1:0] model [N];
  int checks = 0, failures = 0;

  cfs_flag_reg_array #(.N(N), .FLAG_W(FLAG_W)) dut (
    .clk, .rst_n, .clear, .we_onehot, .wdata, .re_onehot, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(string what);
    for (int i = 0; i < N; i++) begin
      re_onehot = N'(1) << i;
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL %s flag %0d = %0d, expected %0d", what, i, rdata, model[i]);
      end
    end
    re_onehot = '0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all("after reset");
    for (int r = 0; r < 300; r++) begin
      int wi;
      @(negedge clk);
      wi = $urandom_range(0, N - 1);
      we_onehot = N'(1) << wi;
      wdata = FLAG_W'($urandom);
      @(posedge clk);
      model[wi] = wdata;
      #1 we_onehot = '0;
      if (r % 50 == 49) check_all("after loads");
    end
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int i = 0; i < N; i++) model[i] = '0;
    check_all("after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
