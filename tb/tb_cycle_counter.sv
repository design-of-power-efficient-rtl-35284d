// tb_cycle_counter: self-checking testbench for cycle_counter. Counts
// random stretches of enabled and disabled cycles, with occasional
// clears, against a software count. A second, 8-bit instance checks that
// the count wraps around modulo 2^W.
module tb_cycle_counter;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, clear, en;
  logic [63:0] count;
  logic [7:0]  count8;
  cycle_counter dut (.clk(clk), .rst(rst), .clear(clear), .en(en), .count(count));
  cycle_counter #(.W(8)) dut8 (.clk(clk), .rst(rst), .clear(clear), .en(en), .count(count8));

  int checks = 0, failures = 0;
  longint model = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clear = 1'b0; en = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      en    = 1'($urandom_range(3) != 0);
      clear = ($urandom_range(500) == 0);
      @(negedge clk);
      if (clear) model = 0;
      else if (en) model++;
      checks++;
      if (count !== 64'(model) || count8 !== 8'(model)) begin
        failures++;
        if (failures < 10) $display("got %0d/%0d want %0d", count, count8, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
