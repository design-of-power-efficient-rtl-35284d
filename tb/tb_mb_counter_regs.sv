// tb_mb_counter_regs: self-checking testbench for the soft-core cycle
// counter registers. Writes 0x2 (reset) and 0x1 (start) to the control
// register, lets the counter run for a known number of cycles, writes 0x0
// (stop) and checks the count MSB and LSB registers against the number of
// cycles between the two writes; checks that the count holds while
// stopped, that 0x2 clears it, that the control register reads back and
// that unmapped offsets read zero.
module tb_mb_counter_regs;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, wr;
  logic [3:0]  addr;
  logic [31:0] wdata, rdata;
  mb_counter_regs dut (.clk(clk), .rst(rst), .wr(wr), .addr(addr), .wdata(wdata), .rdata(rdata));

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [3:0] a, input logic [31:0] d);
    wr = 1'b1; addr = a; wdata = d;
    @(negedge clk);
    wr = 1'b0;
  endtask

  task automatic expect_reg(input logic [3:0] a, input logic [31:0] want, input string what);
    addr = a;
    #1;
    checks++;
    if (rdata !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, rdata, want);
    end
  endtask

  initial begin
    rst = 1'b1; wr = 1'b0; addr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 4; k++) begin
      int run;
      run = 5 + k * 1234;
      write(4'h0, 32'h2);
      expect_reg(4'h0, 32'h2, "control readback");
      @(negedge clk);                     // the counter clears at this edge
      expect_reg(4'h8, 32'h0, "cleared");
      write(4'h0, 32'h1);                 // enable is set at this edge
      repeat (run - 1) @(negedge clk);
      write(4'h0, 32'h0);                 // this edge still counts
      expect_reg(4'h8, 32'(run), "count LSB");
      expect_reg(4'h4, 32'h0, "count MSB");
      repeat (10) @(negedge clk);
      expect_reg(4'h8, 32'(run), "count holds");
      expect_reg(4'hC, 32'h0, "unmapped offset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
