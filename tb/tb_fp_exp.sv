// tb_fp_exp: self-checking testbench for fp_mul. Streams one operand pair
// per cycle (random normals and special cases), expects each product
// exactly 2 cycles later, and compares it with the correctly rounded
// product worked out in double precision (a product of two binary32
// significands is exact in double, so one rounding to binary32 gives the
// reference).
module tb_fp_exp;
  import fp_ref_pkg::*;

  localparam int LAT = 3;
  localparam int N   = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] x, z;
  fp_exp dut (.CLK(clk), .X(x), .R(z));

  logic [31:0] exp_q [$];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_exp(input logic [31:0] a);
    if (a[30:23] == 8'hFF && a[22:0] != 0) return 32'h7FC00000;
    if (a[30:23] == 8'hFF) return a[31] ? 32'h0 : 32'h7F800000;
    return r2f($exp(f2r(a)));
  endfunction

  task automatic drive(input logic [31:0] a);
    x = a;
    exp_q.push_back(ref_exp(a));
    @(posedge clk); #1;
  endtask

  initial begin
    logic [31:0] got, want;
    fork
      begin
        drive(32'h00000000);          // e^0 = 1
        drive(32'h3F800000);          // e
        drive(32'hBF800000);          // 1/e
        drive(32'h42C80000);          // e^100 = inf
        drive(32'hC2C80000);          // e^-100 = 0 (below normal range)
        drive(32'h7FC00000);          // NaN
        drive(32'hC2AE0000);          // e^-87, smallest normals
        drive(32'h42B00000);          // e^88
        for (int i = 0; i < N; i++) drive(i % 2 ? rand_fp(-30, 1) : rand_fp(-3, 6));
        x = 0;
      end
      begin
        repeat (LAT) @(posedge clk);
        #1;
        for (int i = 0; i < N + 8; i++) begin
          got  = z;
          want = exp_q.pop_front();
          checks++;
          if (!(got === want || (want[30:23] != 8'hFF && want[30:23] != 0 && ulp_diff(got, want) <= 1))) begin
            failures++;
            if (failures < 10) $display("mismatch %0d: got %h want %h", i, got, want);
          end
          @(posedge clk); #1;
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
