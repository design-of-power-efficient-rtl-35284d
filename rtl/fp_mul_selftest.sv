// fp_mul_selftest: on-board self-test for the binary32 multiplier. A small
// controller steps through a ROM of test vectors, each holding two operands
// and the expected product. It feeds the operands to an fp_mul and compares
// the product with the expected value, then lights an LED if the products
// match.
//
// Timing: one vector is issued per clock cycle. The ROM read takes 1 cycle
// and the multiplier 2, so each comparison lands 3 cycles after its
// address was issued, and the first one 4 cycles after reset is
// released. After the last vector of a pass, `done` pulses for
// one cycle together with the last comparison, and the sweep starts again
// from address 0. The test keeps running so that a logic analyser can
// trigger on it at any time.
//
// From the design: the ROM-to-multiplier-to-controller arrangement, the
// product output `z_fp` and the LED that shows a correct product.
// This design's choices: the vector contents; the ROM, controller and
// multiplier sitting in one module; the LED staying high only while every
// comparison since reset has matched; and the mismatch counter.
module fp_mul_selftest #(
  parameter int N_VEC = 8
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] z_fp,         // multiplier output
  output logic        match_valid,  // a comparison happens this cycle
  output logic        match,        // z_fp equals the expected product
  output logic        correct_led,  // every comparison so far matched
  output logic        done,         // last vector of a pass compared
  output logic [15:0] n_errors      // mismatches since reset (saturating)
);

  localparam int AW = (N_VEC > 1) ? $clog2(N_VEC) : 1;
  localparam int MUL_LAT = 2;

  // ---- vector ROM: {X, Y, X*Y} ----
  function automatic logic [95:0] rom_word(input int a);
    case (a % 8)
      0: return {32'h3FC00000, 32'h40000000, 32'h40400000}; // 1.5 * 2 = 3
      1: return {32'hC0400000, 32'h40600000, 32'hC1280000}; // -3 * 3.5 = -10.5
      2: return {32'h3DCCCCCD, 32'h41200000, 32'h3F800000}; // 0.1 * 10 = 1 (rounded)
      3: return {32'h3F8E38E4, 32'h42B40000, 32'h42C80001}; // K1 * S0
      4: return {32'h7F7FFFFF, 32'h40000000, 32'h7F800000}; // overflow to +inf
      5: return {32'h00000000, 32'h40A00000, 32'h00000000}; // 0 * 5 = 0
      6: return {32'h3E0CCCCD, 32'h3EB504F3, 32'h3D471F0C}; // drift * vsqrdt
      default: return {32'hFF800000, 32'hBF800000, 32'h7F800000}; // -inf * -1
    endcase
  endfunction

  // ---- controller: address sequencing ----
  logic [AW-1:0] addr;
  logic          issue;
  always_ff @(posedge clk) begin
    if (rst) begin
      addr  <= '0;
      issue <= 1'b0;
    end else begin
      issue <= 1'b1;
      if (issue) addr <= (addr == AW'(N_VEC - 1)) ? '0 : addr + AW'(1);
    end
  end

  // ---- ROM read (registered) ----
  logic [31:0] rom_x, rom_y, rom_z;
  logic        rom_valid, rom_last;
  always_ff @(posedge clk) begin
    {rom_x, rom_y, rom_z} <= rom_word(int'(addr));
    rom_valid <= issue && !rst;
    rom_last  <= issue && !rst && (addr == AW'(N_VEC - 1));
  end

  // ---- multiplier under test ----
  fp_mul fpmul1 (.CLK(clk), .X(rom_x), .Y(rom_y), .Z(z_fp));

  // expected value and flags delayed to line up with the product
  logic [31:0] exp_sr  [MUL_LAT];
  logic        val_sr  [MUL_LAT];
  logic        last_sr [MUL_LAT];
  always_ff @(posedge clk) begin
    exp_sr[0]  <= rom_z;
    val_sr[0]  <= rom_valid && !rst;
    last_sr[0] <= rom_last && !rst;
    for (int i = 1; i < MUL_LAT; i++) begin
      exp_sr[i]  <= exp_sr[i-1];
      val_sr[i]  <= val_sr[i-1] && !rst;
      last_sr[i] <= last_sr[i-1] && !rst;
    end
  end

  // ---- comparison ----
  assign match_valid = val_sr[MUL_LAT-1];
  assign match       = (z_fp == exp_sr[MUL_LAT-1]);
  assign done        = last_sr[MUL_LAT-1];

  logic seen_ok, seen_err;
  always_ff @(posedge clk) begin
    if (rst) begin
      seen_ok  <= 1'b0;
      seen_err <= 1'b0;
      n_errors <= '0;
    end else if (match_valid) begin
      if (match) seen_ok <= 1'b1;
      else begin
        seen_err <= 1'b1;
        if (n_errors != '1) n_errors <= n_errors + 16'd1;
      end
    end
  end
  assign correct_led = seen_ok && !seen_err;

endmodule
