// tb_asp_datapath: self-checking testbench for the datapath with its
// default 4 paths, driven directly (no control unit). Each path gets its
// own seeds. Six datasets of 1 to 1500 samples per path are issued (with
// pauses), some continuing the random streams and some with fresh seeds.
// For each, the output z must equal final_c times the sum of the four
// software path models (relative error below 1e-5) exactly
// datapath_lat(4) = 26 cycles after the last issue, with `ready` high
// and no range flag.
module tb_asp_datapath;
  import fp_ref_pkg::*;
  import mc_ref_pkg::*;
  import asp_pkg::*;

  localparam int NP = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, load, issue, first, ready, ovf, unf;
  logic [22:0] seeds [NP][4];
  logic [31:0] z, final_c;

  asp_datapath dut (.clk(clk), .rst(rst), .load(load), .seeds(seeds), .issue(issue),
                    .first(first), .vsqrdt(VSQRDT_C), .drift(DRIFT_C), .k1(K1_C),
                    .final_c(final_c), .z(z), .ready(ready), .x_overflow(ovf),
                    .x_underflow(unf));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  path_model m [NP];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one dataset of n samples per path, restarted with `first`
  task automatic run_set(input int n, input bit reload, input int r);
    int  c_last;
    real total, want;
    if (reload) begin
      for (int p = 0; p < NP; p++) begin
        seeds[p] = '{23'(455 + 7919 * p + r), 23'(68787 + 104729 * p), 23'(8 + 31 * p + 3 * r),
                     23'(98 + 1237 * p)};
        m[p] = new(seeds[p]);
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
    end
    foreach (m[p]) m[p].sum = 0.0;
    final_c = r2f(S0_R * EXPRT_R / (NP * n));
    c_last = cyc;
    for (int i = 0; i < n; i++) begin
      issue = 1'b1; first = (i == 0);
      foreach (m[p]) m[p].sample(VSQRDT_C, DRIFT_C, K1_C);
      c_last = cyc;
      @(negedge clk);
      if (i % 333 == 100) begin issue = 1'b0; first = 1'b0; @(negedge clk); end
    end
    issue = 1'b0; first = 1'b0;
    total = 0.0;
    foreach (m[p]) total += m[p].sum;
    want = total * f2r(final_c);
    while (cyc < c_last + datapath_lat(NP)) @(negedge clk);
    check(rel_err(z, want) < 1e-5 || (want == 0.0 && z == 32'h0),
          $sformatf("set %0d (n=%0d): z %f want %f", r, n, f2r(z), want));
    check(ready, $sformatf("set %0d: ready", r));
    check(!ovf && !unf, $sformatf("set %0d: range flags", r));
    $display("set %0d: n=%0d z %f model %f", r, n, f2r(z), want);
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; issue = 1'b0; first = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // the first set is the long one; later sets restart the sum with and
    // without fresh seeds, down to a single sample
    run_set(1500, 1'b1, 0);
    run_set(40, 1'b0, 1);
    repeat (7) @(negedge clk);
    run_set(1, 1'b0, 2);
    run_set(777, 1'b1, 3);
    run_set(5, 1'b0, 4);
    run_set(300, 1'b1, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
