// tb_cfs_sorter: end-to-end test of the sorter at K = 3 (N = 8, the 3-bit
// system). Runs a series of sorts: full input sets with and without
// duplicates, all elements equal, partial sets with idle input cycles, and
// both orders. For each sort it checks the sorted array and sorted_count
// against a reference sort done here, the write-evaluate phase length
// (exactly N cycles) and the read-sort phase length (elements + absent
// values). It counts each read-sort case (absent value, single element,
// duplicate with the counter held), each order, partial and full input
// sets, and fails if one never happened.
module tb_cfs_sorter;
  localparam int unsigned K = 3;
  localparam int unsigned N = 1 << K;

  logic clk = 0, rst_n = 0, start = 0, ascending = 1, in_valid = 0;
  logic [K-1:0] data_in = '0;
  logic write_ena, read_ena, done;
  logic [K-1:0] sorted [N];
  logic [K:0] sorted_count;
  int checks = 0, failures = 0;
  int n_absent = 0, n_single = 0, n_dup = 0, n_asc = 0, n_desc = 0, n_partial = 0, n_full = 0;

  cfs_sorter #(.K(K)) dut (.clk, .rst_n, .start, .ascending, .in_valid, .data_in,
                           .write_ena, .read_ena, .done, .sorted, .sorted_count);

  always #5 clk = ~clk;

  // Read-sort cases, seen from the flag value the sorter is looking at.
  always @(posedge clk) if (rst_n && read_ena) begin
    if (dut.flag == 0) n_absent++;
    else if (dut.flag == 1) n_single++;
    else n_dup++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // elems: values to sort; valid: which of the N input cycles carry one.
  task automatic run_sort(int elems[$], bit valid[], bit asc);
    int ref_sorted[$];
    int hist[N];
    int absent = 0, wcyc = 0, rcyc = 0, k = 0, cnt;
    foreach (hist[i]) hist[i] = 0;
    foreach (elems[i]) hist[elems[i]]++;
    foreach (hist[i]) if (hist[i] == 0) absent++;
    ref_sorted = elems;
    ref_sorted.sort();
    cnt = elems.size();
    if (cnt == N) n_full++; else n_partial++;
    if (asc) n_asc++; else n_desc++;

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
    checks++;
    if (!done) begin failures++; $display("FAIL done not high after read-sort"); end
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
        $display("FAIL sorted[%0d] = %0d, expected %0d (asc=%0b)", i, sorted[i], exp_v, asc);
      end
    end
  endtask

  task automatic random_sort(int cnt, int maxval, bit asc);
    int elems[$];
    bit valid[];
    int placed = 0;
    valid = new[N];
    for (int i = 0; i < cnt; i++) elems.push_back($urandom_range(0, maxval));
    // Spread cnt valid cycles over the N input cycles.
    foreach (valid[i]) valid[i] = 0;
    while (placed < cnt) begin
      int p = $urandom_range(0, N - 1);
      if (!valid[p]) begin valid[p] = 1; placed++; end
    end
    run_sort(elems, valid, asc);
  endtask

  initial begin
    int perm[$];
    bit allv[];
    allv = new[N];
    foreach (allv[i]) allv[i] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // A permutation of 0..N-1: every value once.
    for (int i = 0; i < N; i++) perm.push_back(N - 1 - i);
    run_sort(perm, allv, 1);
    // All equal.
    perm = {};
    for (int i = 0; i < N; i++) perm.push_back(5);
    run_sort(perm, allv, 0);
    // Random sets.
    for (int t = 0; t < 40; t++)
      random_sort((t % 3 == 0) ? N : $urandom_range(0, N), N - 1, t[0]);
    checks++; if (n_absent == 0) begin failures++; $display("FAIL no absent value seen"); end
    checks++; if (n_single == 0) begin failures++; $display("FAIL no single element seen"); end
    checks++; if (n_dup == 0)    begin failures++; $display("FAIL no duplicate stall seen"); end
    checks++; if (n_asc == 0 || n_desc == 0) begin failures++; $display("FAIL an order never used"); end
    checks++; if (n_full == 0 || n_partial == 0) begin failures++; $display("FAIL full/partial set missing"); end
    $display("cases: absent=%0d single=%0d duplicate=%0d  sorts: asc=%0d desc=%0d full=%0d partial=%0d",
             n_absent, n_single, n_dup, n_asc, n_desc, n_full, n_partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
