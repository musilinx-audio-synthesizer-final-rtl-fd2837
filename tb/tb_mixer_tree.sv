// tb_mixer_tree: self-checking test of mixer_tree.
//
// A 6-input averaging tree (padded to 8 leaves) and a 32-input clipping tree
// get random inputs, including all-ones vectors that saturate the clipping
// tree. Outputs are compared, LEVELS clocks later, with a testbench model of
// a balanced tree: averaging gives a level-by-level halving of pairwise sums,
// clipping a saturating sum.
module tb_mixer_tree;
  import musilinx_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t in6 [6];
  sample_t in32 [32];
  sample_t out6, out32;
  int checks = 0, failures = 0;

  mixer_tree #(.N(6),  .MODE(1'b1)) dut_avg  (.clk, .rst_n, .in(in6),  .out(out6));
  mixer_tree #(.N(32), .MODE(1'b0)) dut_clip (.clk, .rst_n, .in(in32), .out(out32));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int avg_tree(int v[], int n);
    int cur[$];
    cur.delete();
    for (int i = 0; i < n; i++) cur.push_back(v[i]);
    while (cur.size() > 1) begin
      int nxt[$];
      nxt.delete();
      for (int i = 0; i < cur.size(); i += 2) nxt.push_back((cur[i] + cur[i+1]) >> 1);
      cur = nxt;
    end
    return cur[0];
  endfunction

  initial begin
    int v6[], v32[];
    int e6, e32, sat;
    v6 = new[8]; v32 = new[32];
    foreach (in6[i]) in6[i] = 0;
    foreach (in32[i]) in32[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int i = 0; i < 8; i++) v6[i] = 0;
      for (int i = 0; i < 6; i++) begin
        in6[i] = (n == 0) ? 16'hFFFF : 16'($urandom);
        v6[i] = in6[i];
      end
      for (int i = 0; i < 32; i++) begin
        in32[i] = (n % 3 == 0) ? 16'($urandom_range(0, 4000)) : 16'($urandom);
        v32[i] = in32[i];
      end
      e6 = avg_tree(v6, 8);
      // saturating tree: each node min(a+b, 65535)
      begin
        int cur[$];
        cur.delete();
        for (int i = 0; i < 32; i++) cur.push_back(v32[i]);
        while (cur.size() > 1) begin
          int nxt[$];
          nxt.delete();
          for (int i = 0; i < cur.size(); i += 2) begin
            sat = cur[i] + cur[i+1];
            nxt.push_back(sat > 65535 ? 65535 : sat);
          end
          cur = nxt;
        end
        e32 = cur[0];
      end
      // hold the inputs until both trees have produced their result
      repeat (5) @(posedge clk);
      #1;
      checks += 2;
      if (out6 !== 16'(e6)) begin
        failures++;
        $display("FAIL avg tree: got %h expected %h", out6, e6);
      end
      if (out32 !== 16'(e32)) begin
        failures++;
        $display("FAIL clip tree: got %h expected %h", out32, e32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
