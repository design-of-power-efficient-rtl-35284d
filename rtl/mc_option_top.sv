// mc_option_top: FPGA accelerator that prices a European call option by
// Monte Carlo simulation, and beside it the memory-mapped cycle counter of
// the soft-core processor system it is compared with.
//
// Accelerator: the host computes the loop constants vsqrdt = sigma*sqrt(t),
// drift = (r - sigma^2/2) t, K1 = K/S0 and final_c (the scale factor that
// turns the payoff sum into the price) and the random seeds, sets n_iter
// (iterations per path) and pulses `start`. The control unit (asp_control)
// clears the 64-bit cycle counter, loads the seeds, issues n_iter samples
// into each of the N_PATHS pipelined paths of the datapath, and stops when
// the counter reaches n_iter + pipeline latency. `result` then holds the
// binary32 price, `done` is high and `count` holds the run length in
// cycles: n_iter + 26 with the default 4 paths (n_iter + 22 with 1 path).
//
// Soft-core side: the processor itself is vendor IP and not part of this
// RTL; its register bus (mb_wr, mb_addr, mb_wdata, mb_rdata) is brought
// out to the ports of mb_counter_regs.
//
// Multiplier self-test: fp_mul_selftest runs beside the accelerator from
// reset onwards. It checks a separate fp_mul against a ROM of known
// products and shows the outcome on `selftest_led`, with the mismatch
// count on `selftest_errors`; `selftest_done` pulses at the end of each
// pass over the vectors.
//
// One clock, synchronous active-high reset. The differential-to-single-
// ended clock buffer of the board is outside this RTL.
module mc_option_top
  import asp_pkg::*;
#(
  parameter int N_PATHS = 4
) (
  input  logic        clk,
  input  logic        rst,
  // accelerator
  input  logic        start,
  input  logic [31:0] n_iter,
  input  logic [31:0] vsqrdt,
  input  logic [31:0] drift,
  input  logic [31:0] k1,
  input  logic [31:0] final_c,
  input  logic [22:0] seeds [N_PATHS][4],
  output logic [31:0] result,
  output logic        done,
  output logic [63:0] count,
  output logic        x_overflow,
  output logic        x_underflow,
  // soft-core processor cycle-counter registers
  input  logic        mb_wr,
  input  logic [3:0]  mb_addr,
  input  logic [31:0] mb_wdata,
  output logic [31:0] mb_rdata,
  // multiplier self-test
  output logic        selftest_led,
  output logic        selftest_done,
  output logic [15:0] selftest_errors
);

  localparam int PIPE_LAT = datapath_lat(N_PATHS);

  logic        cnt_clear, cnt_en, load, issue, first, dp_ready;
  logic [31:0] z;

  cycle_counter #(.W(64)) u_counter (.clk(clk), .rst(rst), .clear(cnt_clear),
                                     .en(cnt_en), .count(count));

  asp_control #(.PIPE_LAT(PIPE_LAT)) u_ctrl (
    .clk(clk), .rst(rst), .start(start), .n_iter(n_iter), .count(count), .z(z),
    .cnt_clear(cnt_clear), .cnt_en(cnt_en), .load(load), .issue(issue),
    .first(first), .result(result), .done(done));

  asp_datapath #(.N_PATHS(N_PATHS)) u_dp (
    .clk(clk), .rst(rst), .load(load), .seeds(seeds), .issue(issue), .first(first),
    .vsqrdt(vsqrdt), .drift(drift), .k1(k1), .final_c(final_c), .z(z),
    .ready(dp_ready), .x_overflow(x_overflow), .x_underflow(x_underflow));

  // the result is only taken once every path holds a valid sum
  assert property (@(posedge clk) disable iff (rst) $rose(done) |-> dp_ready);

  mb_counter_regs u_mb_regs (.clk(clk), .rst(rst), .wr(mb_wr), .addr(mb_addr),
                             .wdata(mb_wdata), .rdata(mb_rdata));

  // z_fp, match_valid and match are probe points for a logic analyser
  fp_mul_selftest u_selftest (.clk(clk), .rst(rst), .z_fp(), .match_valid(), .match(),
                              .correct_led(selftest_led), .done(selftest_done),
                              .n_errors(selftest_errors));

endmodule
