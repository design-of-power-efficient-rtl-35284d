// tb_fp_adder_tree: self-checking testbench for fp_adder_tree. Two trees
// are driven with fresh random inputs every cycle: the default N = 4
// (a 3:1 adder, then a 2:1 adder; latency 4) and N = 7 (3:1, 3:1 and a
// delayed pass-through, then 3:1; latency 4), which exercises all three
// kinds of node. Each output is compared bit for bit, at exactly the
// expected latency, with the same additions rounded in software (exact
// in double for the exponent range used).
module tb_fp_adder_tree;
  import fp_ref_pkg::*;
  import asp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] in4 [4], in7 [7], out4, out7;
  fp_adder_tree dut4 (.clk(clk), .in(in4), .out(out4));
  fp_adder_tree #(.N(7)) dut7 (.clk(clk), .in(in7), .out(out7));

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] add(input logic [31:0] a, input logic [31:0] b);
    real s;
    s = f2r(a) + f2r(b);
    return s == 0.0 ? 32'h0 : r2f(s);
  endfunction
  function automatic logic [31:0] add3(input logic [31:0] a, input logic [31:0] b, input logic [31:0] c);
    real s;
    s = f2r(a) + f2r(b) + f2r(c);
    return s == 0.0 ? 32'h0 : r2f(s);
  endfunction

  logic [31:0] q4 [$], q7 [$];

  initial begin
    checks++;
    if (tree_lat(4) != 4 || tree_lat(7) != 4 || tree_lat(1) != 0) failures++;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      foreach (in4[i]) in4[i] = rand_fp(-4, 4);
      foreach (in7[i]) in7[i] = rand_fp(-4, 4);
      q4.push_back(add(add3(in4[0], in4[1], in4[2]), in4[3]));
      q7.push_back(add3(add3(in7[0], in7[1], in7[2]), add3(in7[3], in7[4], in7[5]), in7[6]));
      if (t >= 4) begin
        logic [31:0] w4, w7;
        w4 = q4.pop_front();
        w7 = q7.pop_front();
        checks += 2;
        if (out4 !== w4) begin failures++; if (failures < 10) $display("N=4 got %h want %h", out4, w4); end
        if (out7 !== w7) begin failures++; if (failures < 10) $display("N=7 got %h want %h", out7, w7); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
