// tb_cfs_onehot_decoder: exhaustive check of the one-hot decoder at K = 4.
// Every input value with en high must give exactly the bit of that index;
// en low must give all zeros. Self-checking, ends with a TB_RESULT line.
module tb_cfs_onehot_decoder;
  localparam int unsigned K = 4;
  localparam int unsigned N = 1 << K;
  logic         en;
  logic [K-1:0] bin;
  logic [N-1:0] onehot;
  int checks = 0, failures = 0;

  cfs_onehot_decoder #(.K(K)) dut (.en, .bin, .onehot);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < N; v++) begin
        en = e[0]; bin = K'(v);
        #1;
        checks++;
        if (onehot !== (e ? (N'(1) << v) : '0)) begin
          failures++;
          $display("FAIL en=%0d bin=%0d onehot=%h", e, v, onehot);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
