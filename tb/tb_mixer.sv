// tb_mixer: self-checking test of mixer in both modes.
//
// One clipping and one averaging instance get the same random and corner-case
// inputs; each output is compared one clock later with min(a+b, 0xFFFF) and
// (a+b)/2 respectively. Counts how often clipping actually saturated.
module tb_mixer;
  import musilinx_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t a, b, y_clip, y_avg;
  int checks = 0, failures = 0, clipped = 0;

  mixer #(.MODE(1'b0)) dut_clip (.clk, .rst_n, .a, .b, .y(y_clip));
  mixer #(.MODE(1'b1)) dut_avg  (.clk, .rst_n, .a, .b, .y(y_avg));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      case (n)
        0: begin a = 16'hFFFF; b = 16'hFFFF; end
        1: begin a = 16'h8000; b = 16'h8000; end
        2: begin a = 16'h7FFF; b = 16'h8000; end
        3: begin a = 0;        b = 0;        end
        default: begin a = $urandom; b = $urandom; end
      endcase
      sum = int'(a) + int'(b);
      @(posedge clk); #1;
      checks += 2;
      if (y_clip !== ((sum > 65535) ? 16'hFFFF : 16'(sum))) begin
        failures++;
        $display("FAIL clip: %h+%h -> %h", a, b, y_clip);
      end
      if (y_avg !== 16'(sum >> 1)) begin
        failures++;
        $display("FAIL avg: %h+%h -> %h", a, b, y_avg);
      end
      if (sum > 65535) clipped++;
    end
    checks++;
    if (clipped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
