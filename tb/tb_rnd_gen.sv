// tb_rnd_gen: self-checking testbench for rnd_gen. A software model steps
// four LFSRs from the seeds 455, 68787, 8 and 98, averages them, forms
// the binary32 value in [2,4), subtracts 3.0 and multiplies by 3.5; each
// hardware sample must equal the model bit for bit and arrive exactly 8
// cycles after its enable. Gaps in `en` check that only enabled cycles
// advance the sequence. Over all samples the mean must be near 0 and the
// variance near 1.1.
module tb_rnd_gen;
  import fp_ref_pkg::*;

  localparam int LAT = 8;
  localparam int N   = 40000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        load, en;
  logic [22:0] seeds [4];
  logic [31:0] rnd;
  rnd_gen dut (.clk(clk), .load(load), .seeds(seeds), .en(en), .rnd(rnd));

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [22:0] m [4];
  logic        en_hist [$];

  function automatic logic [22:0] step(input logic [22:0] s);
    return (s >> 1) ^ ({23{s[0]}} & 23'h420000);
  endfunction

  function automatic logic [31:0] model_next();
    logic [24:0] sum;
    for (int i = 0; i < 4; i++) m[i] = step(m[i]);
    sum = 25'(m[0]) + 25'(m[1]) + 25'(m[2]) + 25'(m[3]);
    return r2f((f2r({9'b0_1000_0000, sum[24:2]}) - 3.0) * 3.5);
  endfunction

  real s1 = 0.0, s2 = 0.0;
  int  got_n = 0;

  // the sample on rnd now belongs to the enable of LAT cycles ago
  always @(posedge clk) begin
    en_hist.push_back(en);
    if (en_hist.size() > LAT) begin
      if (en_hist.pop_front()) begin
        logic [31:0] want;
        real v;
        want = model_next();
        checks++;
        if (rnd !== want) begin
          failures++;
          if (failures < 10) $display("sample %0d: got %h want %h", got_n, rnd, want);
        end
        v = f2r(rnd);
        s1 += v; s2 += v * v;
        got_n++;
      end
    end
  end

  initial begin
    real mean, var_;
    seeds = '{23'd455, 23'd68787, 23'd8, 23'd98};
    m = seeds;
    load = 1'b1; en = 1'b0;
    @(negedge clk);
    load = 1'b0;
    for (int i = 0; i < N; i++) begin
      en = 1'b1;
      @(negedge clk);
      if (i % 97 == 0) begin en = 1'b0; repeat (3) @(negedge clk); end
    end
    en = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    mean = s1 / got_n;
    var_ = s2 / got_n - mean * mean;
    $display("samples %0d mean %f variance %f", got_n, mean, var_);
    checks++;
    if (got_n != N) failures++;
    checks++;
    if (mean > 0.05 || mean < -0.05) failures++;
    checks++;
    if (var_ < 1.0 || var_ > 1.2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
