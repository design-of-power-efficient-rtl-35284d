// mb_counter_regs: memory-mapped cycle counter for the soft-core
// processor system. A processor measures how many cycles a program takes
// by writing a control register and reading a 64-bit count as two 32-bit
// registers.
//
// Register map (byte offsets from the block's base address):
//   0x0 control  bit 1: counter reset, bit 0: counter enable.
//                Writing 0x2 clears the count, writing 0x1 starts it,
//                writing 0x0 stops it (the count holds).
//   0x4 count MSB (read only), bits 63:32 of the count
//   0x8 count LSB (read only), bits 31:0 of the count
// Other offsets read as zero.
//
// Bus: a simple synchronous register port. `wr` with `addr`/`wdata`
// writes at the clock edge; `rdata` shows the register at `addr`
// combinationally.
//
// The three registers, their order, the meaning of 0x1 and 0x2 and the
// 64-bit counter follow the design; the bus protocol is this design's,
// as the processor's own bus is vendor defined.
module mb_counter_regs (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr,
  input  logic [3:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  logic [1:0]  ctrl;
  logic [63:0] count;

  always_ff @(posedge clk) begin
    if (rst)                     ctrl <= 2'b00;
    else if (wr && addr == 4'h0) ctrl <= wdata[1:0];
  end

  cycle_counter #(.W(64)) u_cnt (.clk(clk), .rst(rst), .clear(ctrl[1]),
                                 .en(ctrl[0]), .count(count));

  always_comb begin
    case (addr)
      4'h0:    rdata = {30'd0, ctrl};
      4'h4:    rdata = count[63:32];
      4'h8:    rdata = count[31:0];
      default: rdata = '0;
    endcase
  end

endmodule
