// tb_cfs_one_detector: checks the one-detector at W = 11 on all values
// 0..2047: is_one must be high for the value 1 only.
module tb_cfs_one_detector;
  localparam int unsigned W = 11;
  logic [W-1:0] a;
  logic         is_one;
  int checks = 0, failures = 0;

  cfs_one_detector #(.W(W)) dut (.a, .is_one);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      a = W'(v);
      #1;
      checks++;
      if (is_one !== (v == 1)) begin
        failures++;
        $display("FAIL a=%0d is_one=%0b", v, is_one);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
