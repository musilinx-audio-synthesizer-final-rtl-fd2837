// vca: "voltage controlled amplifier" - scales a sample by the envelope and
// the volume.
//
// Two multipliers separated by flip-flops. Stage 1 multiplies the U(16,0)
// sample by the U(0,16) envelope and keeps the upper 16 bits of the 32-bit
// product (the integer part); stage 2 does the same with the U(0,16) volume:
//   sample_out = ((sample_in * env) >> 16) * volume >> 16
// Both stages are registered, so sample_out follows sample_in by two clocks,
// every clock (no enable). Structure and truncation follow the design.
module vca
  import musilinx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sample_t     sample_in,
  input  logic [15:0] env,      // ADSR output, U(0,16)
  input  logic [15:0] volume,   // U(0,16)
  output sample_t     sample_out
);

  logic [31:0] prod1, prod2;
  sample_t     stage1_q;

  assign prod1 = sample_in * env;
  assign prod2 = stage1_q * volume;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1_q   <= '0;
      sample_out <= '0;
    end else begin
      stage1_q   <= prod1[31:16];
      sample_out <= prod2[31:16];
    end
  end

endmodule
