// tb_cfs_sorter_full: the sorter at its default size, K = 10 (N = 1024,
// the 10-bit system). Two complete sorts: a full set of 1024 random
// elements (with duplicates and absent values) in ascending order, and a
// partial set of 700 elements drawn from a narrow range in descending
// order. Checks every entry of the sorted array against a reference sort,
// sorted_count, the write-evaluate length (N cycles) and the read-sort
// length (elements + absent values).
module tb_cfs_sorter_full;
  localparam int unsigned K = 10;
  localparam int unsigned N = 1 << K;

  logic clk = 0, rst_n = 0, start = 0, ascending = 1, in_valid = 0;
  logic [K-1:0] data_in = '0;
  logic write_ena, read_ena, done;
  logic [K-1:0] sorted [N];
  logic [K:0] sorted_count;
  int checks = 0, failures = 0;

  cfs_sorter dut (.clk, .rst_n, .start, .ascending, .in_valid, .data_in,
                  .write_ena, .read_ena, .done, .sorted, .sorted_count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_sort(int cnt, int lo, int hi, bit asc);
    int elems[$], ref_sorted[$];
    int hist[N];
    bit valid[N];
    int absent = 0, wcyc = 0, rcyc = 0, k = 0, placed = 0, bad = 0;
    foreach (hist[i]) hist[i] = 0;
    for (int i = 0; i < cnt; i++) begin
      elems.push_back($urandom_range(lo, hi));
      hist[elems[i]]++;
    end
    foreach (hist[i]) if (hist[i] == 0) absent++;
    ref_sorted = elems;
    ref_sorted.sort();
    foreach (valid[i]) valid[i] = (cnt == N);
    while (cnt < N && placed < cnt) begin
      int p = $urandom_range(0, N - 1);
      if (!valid[p]) begin valid[p] = 1; placed++; end
    end

    @(negedge clk);
    start = 1; ascending = asc;
    @(negedge clk);
    start = 0;
    while (write_ena) begin
      wcyc++;
      in_valid = valid[wcyc-1];
      data_in  = in_valid ? K'(elems[k]) : K'($urandom);
      if (in_valid) k++;
      @(negedge clk);
    end
    in_valid = 0;
    while (read_ena) begin
      rcyc++;
      @(negedge clk);
    end
    $display("sort of %0d elements (%0d absent values, %s): write %0d cycles, read %0d cycles",
             cnt, absent, asc ? "ascending" : "descending", wcyc, rcyc);
    checks++;
    if (!done) begin failures++; $display("FAIL done not high"); end
    checks++;
    if (wcyc != N) begin failures++; $display("FAIL write-evaluate took %0d cycles", wcyc); end
    checks++;
    if (rcyc != cnt + absent) begin
      failures++;
      $display("FAIL read-sort took %0d cycles, expected %0d", rcyc, cnt + absent);
    end
    checks++;
    if (sorted_count != (K+1)'(cnt)) begin failures++; $display("FAIL sorted_count %0d", sorted_count); end
    for (int i = 0; i < N; i++) begin
      int exp_v;
      if (asc) exp_v = (i >= N - cnt) ? ref_sorted[i - (N - cnt)] : 0;
      else     exp_v = (i < cnt) ? ref_sorted[cnt - 1 - i] : 0;
      checks++;
      if (sorted[i] !== K'(exp_v)) begin
        failures++;
        if (bad++ < 10) $display("FAIL sorted[%0d] = %0d, expected %0d", i, sorted[i], exp_v);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_sort(N, 0, N - 1, 1);
    run_sort(700, 100, 400, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
