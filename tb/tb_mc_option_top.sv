// tb_mc_option_top: end-to-end testbench of the whole accelerator at its
// default size (4 parallel paths), running the design's reference option
// pricing workload: S0 = 90, K = 100, r = 0.1, sigma = 0.25, t = 2 and
// n = 100000 iterations in total, i.e. 25000 per path.
//
// It loads the constants and seeds, pulses start and waits for done. It
// checks the price against the software model of the four paths
// (relative error below 1e-5), that the price is in the range a Monte
// Carlo estimate of this option gives (about 24 to 26), and that the run
// took exactly n_iter + 26 cycles. A second, short run (restart from
// DONE) must give its own, fresh result. Meanwhile the soft-core cycle
// counter registers time the first run, as a program on the processor
// would. Mechanisms counted: payoffs cut to zero by the sign multiplexer,
// payoffs passed, restarts of the accumulation, counter register
// accesses, completed passes of the multiplier self-test (whose LED must
// be on with no mismatches); a mechanism that never happened counts as a
// failure.
module tb_mc_option_top;
  import fp_ref_pkg::*;
  import mc_ref_pkg::*;
  import asp_pkg::*;

  localparam int NP = 4;          // the top's default

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, start, done, ovf, unf, mb_wr;
  logic [31:0] n_iter, final_c, result, mb_wdata, mb_rdata;
  logic [22:0] seeds [NP][4];
  logic [63:0] count;
  logic [3:0]  mb_addr;
  logic        st_led, st_done;
  logic [15:0] st_errors;

  mc_option_top dut (
    .clk(clk), .rst(rst), .start(start), .n_iter(n_iter), .vsqrdt(VSQRDT_C),
    .drift(DRIFT_C), .k1(K1_C), .final_c(final_c), .seeds(seeds), .result(result),
    .done(done), .count(count), .x_overflow(ovf), .x_underflow(unf),
    .mb_wr(mb_wr), .mb_addr(mb_addr), .mb_wdata(mb_wdata), .mb_rdata(mb_rdata),
    .selftest_led(st_led), .selftest_done(st_done),
    .selftest_errors(st_errors));

  int checks = 0, failures = 0;
  int n_restart = 0, n_regs = 0, n_selftest = 0;

  always @(posedge clk) if (!rst && st_done) n_selftest++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic mb_write(input logic [3:0] a, input logic [31:0] d);
    mb_wr = 1'b1; mb_addr = a; mb_wdata = d;
    @(negedge clk);
    mb_wr = 1'b0;
    n_regs++;
  endtask

  path_model m [NP];

  // one run of n iterations per path; returns the number of cycles waited
  task automatic run(input int n, input bit time_it);
    real total, want;
    longint mb_cycles;
    int waited;
    foreach (m[p]) begin
      m[p] = new(seeds[p]);
      for (int i = 0; i < n; i++) m[p].sample(VSQRDT_C, DRIFT_C, K1_C);
    end
    total = 0.0;
    foreach (m[p]) total += m[p].sum;
    n_iter  = n;
    final_c = r2f(S0_R * EXPRT_R / (NP * n));
    want    = total * f2r(final_c);
    if (time_it) begin
      mb_write(4'h0, 32'h2);
      mb_write(4'h0, 32'h1);
    end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n_restart++;
    waited = 1;
    while (!done) begin @(negedge clk); waited++; end
    if (time_it) begin
      mb_write(4'h0, 32'h0);
      mb_addr = 4'h8;
      #1 mb_cycles = longint'(mb_rdata);
      mb_addr = 4'h4;
      #1 mb_cycles += longint'(mb_rdata) << 32;
      n_regs += 2;
      $display("soft-core counter timed the run at %0d cycles", mb_cycles);
      check(mb_cycles == longint'(waited + 1), "soft-core counter");
    end
    $display("n=%0d per path: price %f, model %f, %0d cycles", n, f2r(result), want, count);
    check(rel_err(result, want) < 1e-5, "price against model");
    check(count == 64'(n + datapath_lat(NP)), "run length n + 26 cycles");
    check(waited == n + datapath_lat(NP) + 1, "done after the run");
    check(!ovf && !unf, "accumulator range flags");
  endtask

  initial begin
    int zeros, passes;
    for (int p = 0; p < NP; p++)
      seeds[p] = '{23'(455 + 7919 * p), 23'(68787 + 104729 * p), 23'(8 + 31 * p), 23'(98 + 1237 * p)};
    rst = 1'b1; start = 1'b0; n_iter = 0; final_c = 0;
    mb_wr = 1'b0; mb_addr = 0; mb_wdata = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!done, "idle after reset");

    run(25000, 1'b1);
    check(f2r(result) > 24.0 && f2r(result) < 26.0, "price in the expected range");
    zeros = 0; passes = 0;
    foreach (m[p]) begin zeros += m[p].n_zero; passes += m[p].n_pos; end

    run(300, 1'b0);
    foreach (m[p]) begin zeros += m[p].n_zero; passes += m[p].n_pos; end

    $display("mechanisms: payoff cut to zero %0d, payoff passed %0d, runs started %0d, counter register accesses %0d, self-test passes %0d",
             zeros, passes, n_restart, n_regs, n_selftest);
    check(zeros > 0, "sign multiplexer selected zero");
    check(passes > 0, "sign multiplexer passed the difference");
    check(n_restart >= 2, "accumulation restarted");
    check(n_regs > 0, "soft-core counter registers used");
    check(n_selftest > 0, "multiplier self-test completed a pass");
    check(st_led && st_errors == 0, "multiplier self-test LED on, no mismatches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
