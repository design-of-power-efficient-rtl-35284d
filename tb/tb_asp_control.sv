// tb_asp_control: self-checking testbench for asp_control, with a real
// cycle_counter and a stand-in datapath output z that changes every cycle
// (z = cycle number), so the cycle at which the result is latched can be
// seen. For several run lengths n it checks that `issue` is high for
// exactly n consecutive cycles starting the cycle after `start`, that
// `first` is high only in the first of them, that `load` comes with
// `start`, that `done` rises exactly PIPE_LAT cycles after the last issue
// with `result` equal to z of that cycle, and that the counter stops at
// n + PIPE_LAT. A restart from DONE is included.
module tb_asp_control;
  localparam int LAT = 26;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, start, cnt_clear, cnt_en, load, issue, first, done;
  logic [31:0] n_iter, z, result;
  logic [63:0] count;

  cycle_counter u_cnt (.clk(clk), .rst(rst), .clear(cnt_clear), .en(cnt_en), .count(count));
  asp_control #(.PIPE_LAT(LAT)) dut (
    .clk(clk), .rst(rst), .start(start), .n_iter(n_iter), .count(count), .z(z),
    .cnt_clear(cnt_clear), .cnt_en(cnt_en), .load(load), .issue(issue),
    .first(first), .result(result), .done(done));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign z = 32'(cyc) * 32'd7 + 32'd3;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  task automatic run(input int n);
    int c_start, n_issue, n_first, c_first_issue, c_last_issue, c_done;
    logic [31:0] z_at_done;
    n_iter = n;
    start = 1'b1;
    #1 check(load && cnt_clear, "load and clear with start");
    c_start = cyc;
    @(negedge clk);
    start = 1'b0;
    n_issue = 0; n_first = 0; c_first_issue = -1; c_last_issue = -1;
    while (!done) begin
      if (issue) begin
        if (c_first_issue < 0) c_first_issue = cyc;
        c_last_issue = cyc;
        n_issue++;
      end
      if (first) n_first++;
      if (first) check(issue && cyc == c_first_issue, "first with the first issue");
      z_at_done = z;
      @(negedge clk);
    end
    c_done = cyc;
    check(n_issue == n, "number of issued samples");
    check(c_last_issue - c_first_issue == n - 1, "issue contiguous");
    check(c_first_issue == c_start + 1, "issue starts after start");
    check(n_first == 1, "one first");
    check(c_done == c_last_issue + LAT + 1, "done latency");
    check(result == z_at_done, "result latched from z");
    check(count == 64'(n + LAT), "final count");
    $display("n=%0d: count %0d, done %0d cycles after the last issue", n, count, c_done - c_last_issue - 1);
    repeat (4) @(negedge clk);
    check(done && count == 64'(n + LAT) && !issue, "holds in DONE");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; n_iter = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!done && !issue, "idle after reset");
    run(1);
    run(10);
    run(257);
    run(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
