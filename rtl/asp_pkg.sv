// asp_pkg: latencies of the arithmetic units and of the pipeline built
// from them, shared by the Monte Carlo path, the adder tree, the datapath
// and the control unit. The unit latencies (random generator 8, multiply
// 2, add 2, exponential 3, accumulate 3, 3-input add 2) are those of the
// units the design was specified with; the zero-latency sign multiplexer
// and the resulting totals are this design's.
package asp_pkg;

  localparam int RND_LAT  = 8;
  localparam int MUL_LAT  = 2;
  localparam int ADD_LAT  = 2;
  localparam int ADD3_LAT = 2;
  localparam int EXP_LAT  = 3;
  localparam int ACC_LAT  = 3;

  // issue -> accumulator input (random, *vsqrdt, +drift, exp, -K1, mux)
  localparam int PATH_TO_ACC = RND_LAT + MUL_LAT + ADD_LAT + EXP_LAT + ADD_LAT;
  // issue -> accumulator output
  localparam int PATH_LAT    = PATH_TO_ACC + ACC_LAT;

  // Number of levels of the adder tree for n inputs: each level sums
  // groups of three (3:1 adder), two (2:1 adder) or passes one on.
  function automatic int tree_levels(input int n);
    int c, l;
    c = n;
    l = 0;
    while (c > 1) begin
      c = (c + 2) / 3;
      l++;
    end
    return l;
  endfunction

  // Number of nodes at level l of the tree for n inputs.
  function automatic int tree_width(input int n, input int l);
    int c;
    c = n;
    for (int i = 0; i < l; i++) c = (c + 2) / 3;
    return c;
  endfunction

  function automatic int tree_lat(input int n);
    return ADD3_LAT * tree_levels(n);
  endfunction

  // issue of the first sample -> final result on the datapath output
  function automatic int datapath_lat(input int n);
    return PATH_LAT + tree_lat(n) + MUL_LAT;
  endfunction

endpackage
