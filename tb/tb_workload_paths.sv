// tb_workload_paths: the option-pricing workload (S0 = 90, K = 100,
// r = 0.1, sigma = 0.25, t = 2, n = 100000 iterations in total) on the
// other path counts of the accelerator: 1 path (no adder tree), 8 paths
// and 16 paths, side by side. The 4-path default is run by
// tb_mc_option_top. Each configuration splits the 100000 iterations evenly
// over its paths. Path 0 always starts from the seeds 455, 68787, 8 and
// 98, so the 1-path run draws the same samples as a C program using the
// same generator.
//
// For each configuration it checks the price against the software path
// models (relative error below 1e-5), that it lies in the expected
// Monte Carlo range (24 to 26), and that the run takes exactly
// n/N + datapath_lat(N) cycles: 100022, 12526 and 6278.
module tb_workload_paths;
  import fp_ref_pkg::*;
  import mc_ref_pkg::*;
  import asp_pkg::*;

  localparam int N_TOTAL = 100000;
  localparam int NC      = 3;
  localparam int NPS [NC] = '{1, 8, 16};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst, start;
  logic [NC-1:0] done, ovf, unf;
  logic [31:0]   final_c [NC], result [NC], mb_rdata [NC];
  logic [63:0]   count [NC];
  logic [NC-1:0] st_led, st_done;
  logic [15:0]   st_errors [NC];

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [22:0] seed(input int p, input int i);
    case (i)
      0: return 23'(455 + 7919 * p);
      1: return 23'(68787 + 104729 * p);
      2: return 23'(8 + 31 * p);
      default: return 23'(98 + 1237 * p);
    endcase
  endfunction

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int NP = NPS[c];
    logic [22:0] seeds [NP][4];
    for (genvar p = 0; p < NP; p++) begin : g_seed
      for (genvar i = 0; i < 4; i++) begin : g_i
        assign seeds[p][i] = seed(p, i);
      end
    end
    mc_option_top #(.N_PATHS(NP)) dut (
      .clk(clk), .rst(rst), .start(start), .n_iter(32'(N_TOTAL / NP)), .vsqrdt(VSQRDT_C),
      .drift(DRIFT_C), .k1(K1_C), .final_c(final_c[c]), .seeds(seeds), .result(result[c]),
      .done(done[c]), .count(count[c]), .x_overflow(ovf[c]), .x_underflow(unf[c]),
      .mb_wr(1'b0), .mb_addr(4'h0), .mb_wdata(32'h0), .mb_rdata(mb_rdata[c]),
      .selftest_led(st_led[c]), .selftest_done(st_done[c]),
      .selftest_errors(st_errors[c]));
  end

  initial begin
    repeat (N_TOTAL + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real want [NC];
    for (int c = 0; c < NC; c++) begin
      int n;
      real total;
      n = N_TOTAL / NPS[c];
      total = 0.0;
      for (int p = 0; p < NPS[c]; p++) begin
        path_model m;
        logic [22:0] s [4];
        for (int i = 0; i < 4; i++) s[i] = seed(p, i);
        m = new(s);
        for (int k = 0; k < n; k++) m.sample(VSQRDT_C, DRIFT_C, K1_C);
        total += m.sum;
      end
      final_c[c] = r2f(S0_R * EXPRT_R / N_TOTAL);
      want[c] = total * f2r(final_c[c]);
    end
    rst = 1'b1; start = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (done != '1) @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      int n;
      n = N_TOTAL / NPS[c];
      $display("%0d path(s): price %f, model %f, %0d cycles", NPS[c], f2r(result[c]), want[c], count[c]);
      check(rel_err(result[c], want[c]) < 1e-5, "price against model");
      check(f2r(result[c]) > 24.0 && f2r(result[c]) < 26.0, "price in the expected range");
      check(count[c] == 64'(n + datapath_lat(NPS[c])), "run length");
      check(!ovf[c] && !unf[c], "accumulator range flags");
      check(st_led[c] && st_errors[c] == 0, "multiplier self-test");
    end
    check(datapath_lat(1) == 22 && datapath_lat(8) == 26 && datapath_lat(16) == 28, "pipeline latencies");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
