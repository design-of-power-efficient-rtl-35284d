// tb_fp_mul_selftest: self-checking testbench for fp_mul_selftest. Lets
// the self-test run for many passes over its vectors and checks that:
// - each product on z_fp equals the testbench's own expected value, which
//   is worked out in real arithmetic for finite operands;
// - the comparison flag agrees with that value, and the LED is on from
//   the cycle after the first comparison;
// - comparisons start 4 cycles after reset is released;
// - `done` marks every N_VEC-th comparison.
// A second instance with 5 vectors checks the pass length follows N_VEC.
module tb_fp_mul_selftest;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst;
  logic [31:0] z8, z5;
  logic        mv8, m8, led8, done8, mv5, m5, led5, done5;
  logic [15:0] ne8, ne5;

  fp_mul_selftest dut (
    .clk(clk), .rst(rst), .z_fp(z8), .match_valid(mv8), .match(m8),
    .correct_led(led8), .done(done8), .n_errors(ne8)
  );
  fp_mul_selftest #(.N_VEC(5)) dut5 (
    .clk(clk), .rst(rst), .z_fp(z5), .match_valid(mv5), .match(m5),
    .correct_led(led5), .done(done5), .n_errors(ne5)
  );

  int checks = 0, failures = 0;
  int n8 = 0, n5 = 0, first = -1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // operands, same order as the vector ROM
  logic [31:0] xs [8] = '{32'h3FC00000, 32'hC0400000, 32'h3DCCCCCD, 32'h3F8E38E4,
                          32'h7F7FFFFF, 32'h00000000, 32'h3E0CCCCD, 32'hFF800000};
  logic [31:0] ys [8] = '{32'h40000000, 32'h40600000, 32'h41200000, 32'h42B40000,
                          32'h40000000, 32'h40A00000, 32'h3EB504F3, 32'hBF800000};

  function automatic logic [31:0] expected(input int i);
    if (i == 4 || i == 7) return 32'h7F800000;  // overflow, inf * -1
    return r2f(f2r(xs[i]) * f2r(ys[i]));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    repeat (4) @(negedge clk);
    check(!mv8 && !led8 && !done8 && ne8 == 0, "idle during reset");
    rst = 1'b0;
    for (int c = 1; c <= 4000; c++) begin
      @(negedge clk);
      if (mv8 && first < 0) begin
        first = c;
        check(c == 4, $sformatf("first comparison at cycle %0d, want 4", c));
      end
      if (mv8) begin
        check(z8 === expected(n8 % 8),
              $sformatf("vector %0d: z=%h want %h", n8 % 8, z8, expected(n8 % 8)));
        check(m8, $sformatf("vector %0d flagged as mismatch", n8 % 8));
        check(done8 == (n8 % 8 == 7), $sformatf("done at vector %0d", n8 % 8));
        check(n8 == 0 || led8, "LED low after a comparison");
        n8++;
      end else begin
        check(!done8, "done without a comparison");
      end
      if (mv5) begin
        check(z5 === expected(n5 % 5), $sformatf("5-vector instance, vector %0d", n5 % 5));
        check(done5 == (n5 % 5 == 4), "5-vector instance, done");
        check(m5 && (n5 == 0 || led5), "5-vector instance, match/LED");
        n5++;
      end
    end
    check(ne8 == 0 && ne5 == 0, "error counters");
    check(n8 == 3997 && n5 == 3997, $sformatf("comparison count %0d/%0d", n8, n5));
    // reset clears the LED and restarts the sweep
    rst = 1'b1;
    @(negedge clk);
    @(negedge clk);
    check(!led8 && !mv8, "LED cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
