// fp_adder_tree: sums N binary32 values with a pipelined tree of 3-input
// (fp_add3) and 2-input (fp_add) floating-point adders; it combines the
// sums of parallel Monte Carlo paths.
//
// Each level takes its inputs in groups of three; a full group goes to a
// 3:1 adder, a group of two to a 2:1 adder and a single leftover value is
// delayed by two registers so that every level has latency 2. For N = 4
// this is one 3:1 adder on inputs 0-2 and a 2:1 adder that adds input 3
// to its result, latency 4. For N = 1 the tree is a wire (latency 0).
//
// Timing: out follows the inputs by asp_pkg::tree_lat(N) = 2 * levels
// cycles. That the tree is made of 3:1 and 2:1 adders follows the design;
// the grouping is this design's choice.
module fp_adder_tree
  import asp_pkg::*;
#(
  parameter int N = 4
) (
  input  logic        clk,
  input  logic [31:0] in [N],
  output logic [31:0] out
);

  localparam int LEVELS = tree_levels(N);

  logic [31:0] node [LEVELS+1][N];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign node[0][i] = in[i];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int C = tree_width(N, l);
    localparam int G = (C + 2) / 3;
    for (genvar g = 0; g < N; g++) begin : g_grp
      if (g >= G) begin : g_unused
        assign node[l+1][g] = '0;
      end else if (C - 3 * g >= 3) begin : g_add3
        fp_add3 u_add3 (.CLK(clk), .X(node[l][3*g]), .Y(node[l][3*g+1]),
                        .Z(node[l][3*g+2]), .R(node[l+1][g]));
      end else if (C - 3 * g == 2) begin : g_add2
        fp_add u_add (.CLK(clk), .X(node[l][3*g]), .Y(node[l][3*g+1]),
                      .Z(node[l+1][g]));
      end else begin : g_pass
        logic [31:0] d0, d1;
        always_ff @(posedge clk) begin
          d0 <= node[l][3*g];
          d1 <= d0;
        end
        assign node[l+1][g] = d1;
      end
    end
  end

  assign out = node[LEVELS][0];

endmodule
