// tb_fp_mul: self-checking testbench for fp_mul. Streams one operand pair
// per cycle (random normals and special cases), expects each product
// exactly 2 cycles later, and compares it with the correctly rounded
// product worked out in double precision (a product of two binary32
// significands is exact in double, so one rounding to binary32 gives the
// reference).
module tb_fp_mul;
  import fp_ref_pkg::*;

  localparam int LAT = 2;
  localparam int N   = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] x, y, z;
  fp_mul dut (.CLK(clk), .X(x), .Y(y), .Z(z));

  logic [31:0] exp_q [$];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) begin
      if ((a[30:23] == 8'hFF && a[22:0] != 0) || (b[30:23] == 8'hFF && b[22:0] != 0)) return 32'h7FC00000;
      if (a[30:23] == 0 || b[30:23] == 0) return 32'h7FC00000;
      return {a[31] ^ b[31], 8'hFF, 23'd0};
    end
    if (a[30:23] == 0 || b[30:23] == 0) return {a[31] ^ b[31], 31'd0};
    return r2f(f2r(a) * f2r(b));
  endfunction

  task automatic drive(input logic [31:0] a, input logic [31:0] b);
    x = a; y = b;
    exp_q.push_back(ref_mul(a, b));
    @(posedge clk); #1;
  endtask

  initial begin
    logic [31:0] got, want;
    fork
      begin
        drive(32'h3F800000, 32'h3F800000);             // 1*1
        drive(32'h40400000, 32'hC0600000);             // 3 * -3.5
        drive(32'h7F000000, 32'h40000000);             // overflow to inf
        drive(32'h00800000, 32'h3F000000);             // underflow to zero
        drive(32'h7F800000, 32'h00000000);             // inf*0 = NaN
        drive(32'h7F800000, 32'hBF800000);             // -inf
        drive(32'h00000000, 32'h42C80000);             // 0
        drive(32'h3FFFFFFF, 32'h3FFFFFFF);             // rounding carry
        for (int i = 0; i < N; i++) drive(rand_fp(-60, 60), rand_fp(-60, 60));
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
