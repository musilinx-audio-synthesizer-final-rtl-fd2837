// tb_vca: self-checking test of vca.
//
// Applies random and corner-case sample / envelope / volume triples, one per
// clock, and checks each output two clocks later against
// ((s * e) >> 16) * v >> 16 computed in the testbench. The volume feeds the
// second multiplier, so the model pairs each sample and envelope with the
// volume applied one clock later.
module tb_vca;
  import musilinx_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t s, y;
  logic [15:0] e, v;
  int checks = 0, failures = 0;
  logic [15:0] p1_q [$];   // stage-1 model results, oldest first

  vca dut (.clk, .rst_n, .sample_in(s), .env(e), .volume(v), .sample_out(y));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] mulhi(logic [15:0] a, logic [15:0] b);
    longint unsigned p;
    p = (longint'(a) * longint'(b)) >> 16;
    return p[15:0];
  endfunction

  initial begin
    logic [15:0] ex;
    s = 0; e = 0; v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // output now reflects the triple applied two clocks ago
      if (p1_q.size() == 2) begin
        ex = mulhi(p1_q.pop_front(), v);  // v: applied one clock ago
        checks++;
        if (y !== ex) begin
          failures++;
          if (failures < 10) $display("FAIL: got %h expected %h", y, ex);
        end
      end
      if (n < 4) begin
        s = 16'hFFFF; e = (n[0]) ? 16'hFFFF : 16'h8000; v = (n[1]) ? 16'hFFFF : 16'h4000;
      end else begin
        s = $urandom; e = $urandom; v = $urandom;
      end
      p1_q.push_back(mulhi(s, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
