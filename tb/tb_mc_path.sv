// tb_mc_path: self-checking testbench for one Monte Carlo path. With the
// design's test operating point (K1 = 1.111, drift = 0.1375,
// vsqrdt = 0.353553) it runs a data set of 3000 samples (with pauses in
// `issue`) and a second data set of 700 samples that must restart the
// sum. For each it compares `sum` with the software path model (relative
// error below 1e-5: exp may differ by one ulp), checks that `ready` rises
// exactly PATH_LAT = 20 cycles after the first issue, and that the sum is
// final PATH_LAT cycles after the last issue. It also checks that
// both branches of the sign multiplexer were exercised. Two more data
// sets change K1 so that every payoff passes (K1 = 0.25) and every payoff
// is cut, giving a sum of exactly zero (K1 = 8).
module tb_mc_path;
  import fp_ref_pkg::*;
  import mc_ref_pkg::*;
  import asp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, load, issue, first, ready, ovf, unf;
  logic [22:0] seeds [4];
  logic [31:0] sum;
  logic [31:0] k1v;

  mc_path dut (.clk(clk), .rst(rst), .load(load), .seeds(seeds), .issue(issue),
               .first(first), .vsqrdt(VSQRDT_C), .drift(DRIFT_C), .k1(k1v),
               .sum(sum), .ready(ready), .x_overflow(ovf), .x_underflow(unf));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  path_model m;

  task automatic run(input int n, input bit first_run);
    int c0, c_last;
    m.sum = 0.0;
    c0 = cyc;
    for (int i = 0; i < n; i++) begin
      issue = 1'b1; first = (i == 0);
      m.sample(VSQRDT_C, DRIFT_C, k1v);
      c_last = cyc;
      @(negedge clk);
      if (i % 211 == 5) begin issue = 1'b0; first = 1'b0; repeat (2) @(negedge clk); end
    end
    issue = 1'b0; first = 1'b0;
    while (cyc < c_last + PATH_LAT - 1) @(negedge clk);
    @(negedge clk);
    check(m.sum == 0.0 ? sum == 32'h0 : rel_err(sum, m.sum) < 1e-5, "sum");
    check(ready, "ready");
    $display("n=%0d K1=%f sum %f model %f", n, f2r(k1v), f2r(sum), m.sum);
    repeat (5) @(negedge clk);
    check(m.sum == 0.0 ? sum == 32'h0 : rel_err(sum, m.sum) < 1e-5, "sum holds");
  endtask

  // ready must rise exactly PATH_LAT cycles after the first issue
  int first_cyc = -1, ready_cyc = -1;
  always @(posedge clk) begin
    if (issue && first && first_cyc < 0) first_cyc = cyc;
    if (!rst && ready && ready_cyc < 0) ready_cyc = cyc;
  end

  initial begin
    int nz, np;
    seeds = '{23'd455, 23'd68787, 23'd8, 23'd98};
    k1v = K1_C;
    m = new(seeds);
    rst = 1'b1; load = 1'b0; issue = 1'b0; first = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0; load = 1'b1;
    check(!ready, "ready low after reset");
    @(negedge clk);
    load = 1'b0;
    run(3000, 1'b1);
    $display("ready %0d cycles after the first issue", ready_cyc - first_cyc);
    check(ready_cyc == first_cyc + PATH_LAT, "ready latency");
    run(700, 1'b0);
    check(m.n_zero > 0 && m.n_pos > 0, "both multiplexer inputs used");
    // deep in the money: the lowest sample e^(drift - 3.5 vsqrdt) = 0.33
    // is above K1 = 0.25, so every payoff passes
    nz = m.n_zero;
    k1v = 32'h3E800000;
    run(500, 1'b0);
    check(m.n_zero == nz, "K1 = 0.25: no payoff cut");
    // far out of the money: the highest sample e^(drift + 3.5 vsqrdt) = 3.96
    // is below K1 = 8, so the sum must be exactly zero
    np = m.n_pos;
    k1v = 32'h41000000;
    run(500, 1'b0);
    check(m.n_pos == np && sum == 32'h0, "K1 = 8: every payoff cut, sum zero");
    check(!ovf && !unf, "no accumulator range flags");
    $display("payoff zero %0d times, positive %0d times", m.n_zero, m.n_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
