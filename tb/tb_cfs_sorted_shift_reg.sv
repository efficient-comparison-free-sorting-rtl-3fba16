// tb_cfs_sorted_shift_reg: K = 4, N = 8. Shifts random elements in both
// directions with idle cycles in between and compares the whole array with
// a model after every cycle; checks clear.
module tb_cfs_sorted_shift_reg;
  localparam int unsigned K = 4;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, clear = 0, shift = 0, left = 1;
  logic [K-1:0] din = '0;
  logic [K-1:0] q [N];
  logic [K-1:0] model [N];
  int checks = 0, failures = 0;

  cfs_sorted_shift_reg #(.K(K), .N(N)) dut (.clk, .rst_n, .clear, .shift, .left, .din, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int c);
    checks++;
    for (int i = 0; i < N; i++)
      if (q[i] !== model[i]) begin
        failures++;
        $display("FAIL cycle %0d entry %0d = %0d, expected %0d", c, i, q[i], model[i]);
        break;
      end
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      compare(c);
      clear = ($urandom_range(0, 49) == 0);
      shift = $urandom_range(0, 1);
      if (c % 40 == 0) left = ~left;
      din = K'($urandom);
      @(posedge clk);
      if (clear) for (int i = 0; i < N; i++) model[i] = '0;
      else if (shift) begin
        if (left) begin
          for (int i = 0; i < N - 1; i++) model[i] = model[i+1];
          model[N-1] = din;
        end else begin
          for (int i = N - 1; i > 0; i--) model[i] = model[i-1];
          model[0] = din;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
