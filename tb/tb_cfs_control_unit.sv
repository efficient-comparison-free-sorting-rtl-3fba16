// tb_cfs_control_unit: drives the sequencer with a modelled K = 3 counter
// (N = 8). Checks that start produces one clear cycle, WRITE-ENA lasts
// exactly N cycles, READ-ENA follows at once and lasts until the counter
// advances past N-1 (here with stalls injected, also at the last index), done then holds, start is
// ignored while busy, and a second start from DONE works.
module tb_cfs_control_unit;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, start = 0, pc_last, pc_advance = 1;
  logic write_ena, read_ena, done, clear;
  int pc = 0;
  int checks = 0, failures = 0;

  cfs_control_unit dut (.clk, .rst_n, .start, .pc_last, .pc_advance,
                        .write_ena, .read_ena, .done, .clear);

  assign pc_last = (pc == N - 1);

  // Counter model, wired as in the sorter.
  always_ff @(posedge clk)
    if (clear) pc <= 0;
    else if (write_ena || (read_ena && pc_advance)) pc <= (pc + 1) % N;

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bits(logic w, logic r, logic d, logic c, string what);
    checks++;
    if (write_ena !== w || read_ena !== r || done !== d || clear !== c) begin
      failures++;
      $display("FAIL %s: write=%0b read=%0b done=%0b clear=%0b", what, write_ena, read_ena, done, clear);
    end
  endtask

  task automatic run_sort(int stalls);
    int wcycles = 0, rcycles = 0, s_first = 0, s_last = 0;
    @(negedge clk);
    start = 1;
    #1 expect_bits(0, 0, done, 1, "clear on start");
    @(negedge clk);
    start = 0;
    while (write_ena) begin
      wcycles++;
      start = (wcycles == 3);          // ignored while busy
      #1 if (start) expect_bits(1, 0, 0, 0, "start ignored in write");
      @(negedge clk);
    end
    start = 0;
    checks++;
    if (wcycles != N) begin failures++; $display("FAIL write phase %0d cycles", wcycles); end
    expect_bits(0, 1, 0, 0, "read follows write");
    while (read_ena) begin
      rcycles++;
      // Hold the counter stalls/2 cycles at index 1 and at the last index.
      pc_advance = 1;
      if (pc == 1 && s_first < stalls / 2) begin pc_advance = 0; s_first++; end
      if (pc == N - 1 && s_last < stalls / 2) begin pc_advance = 0; s_last++; end
      @(negedge clk);
    end
    pc_advance = 1;
    checks++;
    if (rcycles != N + stalls) begin failures++; $display("FAIL read phase %0d cycles", rcycles); end
    expect_bits(0, 0, 1, 0, "done");
    repeat (3) @(negedge clk);
    expect_bits(0, 0, 1, 0, "done held");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_bits(0, 0, 0, 0, "idle after reset");
    run_sort(4);
    run_sort(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
