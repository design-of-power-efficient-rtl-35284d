// tb_fp_acc: self-checking testbench for fp_acc. Streams data sets of
// random binary32 values (exponents -16..3, both signs), starting each set
// with newDataset, and checks data_out every cycle against the running
// sum kept in double precision (exact for these inputs) rounded once to
// binary32, taking the latency of 3 into account. Also checks `ready`,
// the XOverflow flag for an input of 32.0 (above 2^(MAX_MSB_X+1)) and the
// XUnderflow flag for 2^-50 (below 2^LSB_A), and that both flags clear at
// the next newDataset.
module tb_fp_acc;
  import fp_ref_pkg::*;

  localparam int LAT = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, nd, ovf, unf, ready;
  logic [31:0] x, dout;
  fp_acc dut (.CLK(clk), .rst(rst), .X(x), .newDataset(nd), .data_out(dout),
              .XOverflow(ovf), .XUnderflow(unf), .ready(ready));

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected data_out, ovf, unf per cycle, LAT cycles later
  logic [33:0] exp_q [$];
  real sum = 0.0;
  logic fo = 0, fu = 0, started = 0;

  task automatic put(input logic [31:0] v, input logic newd);
    logic o, u;
    x = v; nd = newd;
    o = v[30:23] != 0 && int'(v[30:23]) - 127 > 3;
    u = v[30:23] != 0 && int'(v[30:23]) - 127 < -40;
    if (newd) begin sum = 0.0; fo = 0; fu = 0; started = 1; end
    if (!o && !u) sum += f2r(v);
    fo |= o; fu |= u;
    exp_q.push_back({fo, fu, (sum == 0.0) ? 32'h0 : r2f(sum)});
    @(negedge clk);
  endtask

  always @(negedge clk) begin
    if (!rst && exp_q.size() > LAT) begin
      logic [33:0] w;
      w = exp_q.pop_front();
      checks++;
      if (dout !== w[31:0] || ovf !== w[33] || unf !== w[32] || !ready) begin
        failures++;
        if (failures < 10) $display("got %h %b%b%b want %h %b%b", dout, ovf, unf, ready, w[31:0], w[33], w[32]);
      end
    end
  end

  initial begin
    rst = 1'b1; x = 0; nd = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    checks++;
    if (ready !== 1'b0) failures++;
    for (int set = 0; set < 8; set++) begin
      for (int i = 0; i < 1000; i++) begin
        logic [31:0] v;
        v = rand_fp(-16, 3);
        if (set == 2 && i == 500) v = 32'h4200_0000;   // 32.0: overflow
        if (set == 3 && i == 10)  v = 32'h2680_0000;   // 2^-50: underflow
        if (i % 50 == 7) v = 32'h0;
        put(v, i == 0);
      end
    end
    repeat (LAT + 1) put(32'h0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
