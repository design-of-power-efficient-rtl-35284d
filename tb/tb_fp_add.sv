// tb_fp_add: self-checking testbench for fp_mul. Streams one operand pair
// per cycle (random normals and special cases), expects each product
// exactly 2 cycles later, and compares it with the correctly rounded
// product worked out in double precision (a product of two binary32
// significands is exact in double, so one rounding to binary32 gives the
// reference).
module tb_fp_add;
  import fp_ref_pkg::*;

  localparam int LAT = 2;
  localparam int N   = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] x, y, z;
  fp_add dut (.CLK(clk), .X(x), .Y(y), .Z(z));

  logic [31:0] exp_q [$];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    logic an, bn, ai, bi;
    an = a[30:23] == 8'hFF && a[22:0] != 0;  bn = b[30:23] == 8'hFF && b[22:0] != 0;
    ai = a[30:23] == 8'hFF && a[22:0] == 0;  bi = b[30:23] == 8'hFF && b[22:0] == 0;
    if (an || bn || (ai && bi && a[31] != b[31])) return 32'h7FC00000;
    if (ai) return a;
    if (bi) return b;
    return r2f(f2r(a) + f2r(b)) & ((f2r(a) + f2r(b) == 0.0) ? 32'h0 : 32'hFFFFFFFF);
  endfunction

  task automatic drive(input logic [31:0] a, input logic [31:0] b);
    x = a; y = b;
    exp_q.push_back(ref_add(a, b));
    @(posedge clk); #1;
  endtask

  initial begin
    logic [31:0] got, want;
    fork
      begin
        drive(32'h3F800000, 32'h3F800000);             // 1+1
        drive(32'h40400000, 32'hC0600000);             // 3 - 3.5
        drive(32'h3F800001, 32'hBF800000);             // cancellation to 2^-23
        drive(32'h42C80000, 32'hC2C80000);             // x - x = 0
        drive(32'h7F800000, 32'hFF800000);             // inf - inf = NaN
        drive(32'h7F7FFFFF, 32'h7F7FFFFF);             // overflow to inf
        drive(32'h00000000, 32'hC2C80000);             // 0 + y
        drive(32'h4B800000, 32'h3F800000);             // 2^24 + 1: tie, even
        for (int i = 0; i < N; i++) begin
          logic [31:0] a;
          a = rand_fp(-10, 10);
          if (i % 8 == 0) drive(a, {~a[31], a[30:23], a[22:0] ^ 23'($urandom_range(7))});
          else drive(a, rand_fp(-10, 10));
        end
        x = 0; y = 0;
      end
      begin
        repeat (LAT) @(posedge clk);
        #1;
        for (int i = 0; i < N + 8; i++) begin
          got  = z;
          want = exp_q.pop_front();
          checks++;
          if (got !== want) begin
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
