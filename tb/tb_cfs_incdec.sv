// tb_cfs_incdec: exhaustive check of the incrementor/decrementor at W = 11.
// Increment: y = a+1 mod 2^W, carry out only from the all-ones value.
// Decrement: y = a-1 mod 2^W, carry out 1 exactly when a is non-zero
// (the signal the sorter uses to tell an absent value from a present one).
module tb_cfs_incdec;
  localparam int unsigned W = 11;
  localparam int unsigned M = 1 << W;
  logic         dec;
  logic [W-1:0] a, y;
  logic         carry_out;
  int checks = 0, failures = 0;

  cfs_incdec #(.W(W)) dut (.dec, .a, .y, .carry_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++)
      for (int v = 0; v < M; v++) begin
        int exp_y;
        logic exp_c;
        dec = d[0]; a = W'(v);
        #1;
        exp_y = d ? (v + M - 1) % M : (v + 1) % M;
        exp_c = d ? (v != 0) : (v == M - 1);
        checks++;
        if (y !== W'(exp_y) || carry_out !== exp_c) begin
          failures++;
          $display("FAIL dec=%0d a=%0d y=%0d c=%0b", d, v, y, carry_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
