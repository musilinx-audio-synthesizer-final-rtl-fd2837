// mixer: combines two 16-bit unsigned samples into one.
//
// The samples are added in 17 bits. With MODE = 0 (clipping) a sum that
// overflows 16 bits is clamped to all ones; with MODE = 1 (averaging) the
// output is the sum halved, which can never overflow. The output is
// registered (one clock of latency). The two modes and their selection by a
// parameter follow the design; the output register is this implementation's
// choice, so that a tree of mixers stays fast.
module mixer
  import musilinx_pkg::*;
#(
  parameter bit MODE = 1'b0   // 0: clipping, 1: averaging
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t a,
  input  sample_t b,
  output sample_t y
);

  logic [SAMPLE_W:0] sum;
  assign sum = {1'b0, a} + {1'b0, b};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     y <= '0;
    else if (MODE)  y <= sum[SAMPLE_W:1];
    else            y <= sum[SAMPLE_W] ? '1 : sum[SAMPLE_W-1:0];
  end

endmodule
