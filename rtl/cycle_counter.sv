// cycle_counter: W-bit (default 64) free-running cycle counter with
// synchronous clear and count enable. It measures the length of a run in
// clock cycles; 64 bits cover far more than the 37 bits needed for a
// 30-minute run at 100 MHz.
//
// Timing: `clear` sets the count to 0 at the next edge and wins over
// `en`; with `en` high the count rises by one per cycle.
// Width and the reset/enable interface follow the design; the clear
// having priority is this design's choice.
module cycle_counter #(
  parameter int W = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         en,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst || clear) count <= '0;
    else if (en)      count <= count + W'(1);
  end

endmodule
