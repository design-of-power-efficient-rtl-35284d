// tb_fp_add3: self-checking testbench for fp_mul. Streams one operand pair
// per cycle (random normals and special cases), expects each product
// exactly 2 cycles later, and compares it with the correctly rounded
// product worked out in double precision (a product of two binary32
// significands is exact in double, so one rounding to binary32 gives the
// reference).
module tb_fp_add3;
  import fp_ref_pkg::*;

  localparam int LAT = 2;
  localparam int N   = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] x, y, w, z;
  fp_add3 dut (.CLK(clk), .X(x), .Y(y), .Z(w), .R(z));

  logic [31:0] exp_q [$];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_add3(input logic [31:0] a, input logic [31:0] b, input logic [31:0] c);
    real s;
    if (a[30:23] == 8'hFF) return a;   // only +/-inf are used as specials here
    if (b[30:23] == 8'hFF) return b;
    if (c[30:23] == 8'hFF) return c;
    s = f2r(a) + f2r(b) + f2r(c);
    return (s == 0.0) ? 32'h0 : r2f(s);
  endfunction

  task automatic drive(input logic [31:0] a, input logic [31:0] b, input logic [31:0] c);
    x = a; y = b; w = c;
    exp_q.push_back(ref_add3(a, b, c));
    @(posedge clk); #1;
  endtask

  initial begin
    logic [31:0] got, want;
    fork
      begin
        drive(32'h3F800000, 32'h40000000, 32'h40400000);  // 1+2+3
        drive(32'h3F800001, 32'hBF800000, 32'h34000000);  // cancellation
        drive(32'h42C80000, 32'hC2C80000, 32'h00000000);  // zero
        drive(32'h7F800000, 32'h3F800000, 32'h3F800000);  // inf
        drive(32'h7F000000, 32'h7F000000, 32'h7F000000);  // overflow
        drive(32'h4B800000, 32'h3F000000, 32'h3F000000);  // 2^24+0.5+0.5
        drive(32'hC0400000, 32'h3F800000, 32'hBF800000);
        drive(32'h3F800000, 32'h3F800000, 32'h3F800000);
        for (int i = 0; i < N; i++) drive(rand_fp(-8, 8), rand_fp(-8, 8), rand_fp(-8, 8));
        x = 0; y = 0; w = 0;
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
