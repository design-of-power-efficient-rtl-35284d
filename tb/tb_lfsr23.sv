// tb_lfsr23: self-checking testbench for lfsr23. Compares the register
// with a software model of the same right-shifting LFSR (x >> 1, XOR
// 0x420000 when the shifted-out bit is 1) for several thousand steps,
// checks that `en` low holds the value, that a zero seed is replaced,
// and that the sequence from seed 1 first returns to 1 after exactly
// 2^23 - 1 steps (the full period).
module tb_lfsr23;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        load, en;
  logic [22:0] seed, q;
  lfsr23 dut (.clk(clk), .load(load), .seed(seed), .en(en), .q(q));

  int checks = 0, failures = 0;

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [22:0] step(input logic [22:0] s);
    return (s >> 1) ^ ({23{s[0]}} & 23'h420000);
  endfunction

  task automatic check(input logic [22:0] want, input string what);
    checks++;
    if (q !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %h want %h", what, q, want);
    end
  endtask

  initial begin
    logic [22:0] model;
    int period;
    load = 1'b1; en = 1'b0; seed = 23'd455;
    @(posedge clk); #1;
    load = 1'b0;
    model = 23'd455;
    check(model, "seed");
    en = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk); #1;
      model = step(model);
      check(model, "step");
    end
    en = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(model, "hold");
    load = 1'b1; seed = '0;
    @(posedge clk); #1;
    load = 1'b0;
    check(23'd1, "zero seed");
    // full period from seed 1
    en = 1'b1;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (q != 23'd1 && period < 8_500_000);
    checks++;
    if (period != (1 << 23) - 1) begin
      failures++;
      $display("period %0d", period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
