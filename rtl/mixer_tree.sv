// mixer_tree: mixes N samples with a balanced binary tree of mixers.
//
// The N inputs are padded with silent (zero) leaves up to the next power of
// two, so every input sits at the same depth LEVELS = ceil(log2 N). This
// matters in averaging mode: each input then contributes exactly 1/2^LEVELS
// of the output, whereas an unbalanced tree would favour the inputs nearest
// the root. In clipping mode the zero leaves change nothing. Each level is one
// registered mixer stage, so the output lags the inputs by LEVELS clocks.
// The balanced tree follows the design; padding with zeros is how this
// implementation balances an N that is not a power of two.
module mixer_tree
  import musilinx_pkg::*;
#(
  parameter int N    = 32,
  parameter bit MODE = 1'b1   // 0: clipping, 1: averaging
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t in [N],
  output sample_t out
);

  localparam int LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int LEAVES = 1 << LEVELS;

  // node[l] holds LEAVES >> l values; node[0] are the (padded) inputs
  sample_t node [LEVELS+1][LEAVES];

  for (genvar i = 0; i < LEAVES; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign node[0][i] = in[i];
    end else begin : g_pad
      assign node[0][i] = '0;
    end
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < (LEAVES >> (l + 1)); i++) begin : g_mix
      mixer #(.MODE(MODE)) u_mix (
        .clk   (clk),
        .rst_n (rst_n),
        .a     (node[l][2*i]),
        .b     (node[l][2*i+1]),
        .y     (node[l+1][i])
      );
    end
    for (genvar i = (LEAVES >> (l + 1)); i < LEAVES; i++) begin : g_unused
      assign node[l+1][i] = '0;
    end
  end

  assign out = node[LEVELS][0];

endmodule
