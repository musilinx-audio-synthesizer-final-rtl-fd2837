// tempo_generator: one pulse every tempo_rate + 1 sample periods.
//
// A counter advances on each sample pulse; when it is about to roll over
// (count >= tempo_rate) it returns to 0 and `tempo_pulse` is raised for one
// clock, the clock after the sample pulse. For a tempo in beats per minute,
// tempo_rate = 60 * f_sample / bpm - 1. tempo_rate is a 32-bit AXI-Lite
// register at offset 0x0 of the block (reset 0, which pulses every sample).
// Counter, pulse and register follow the design; the 32-bit width and the
// reset value are this implementation's choices.
module tempo_generator
  import musilinx_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  input  logic      sample_pulse,
  output logic      tempo_pulse
);

  logic [31:0] regs [1];
  logic [31:0] count_q;

  axil_regs #(.NREGS(1)) u_regs (
    .clk   (clk),
    .rst_n (rst_n),
    .req   (s_axil_req),
    .rsp   (s_axil_rsp),
    .regs  (regs)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q     <= '0;
      tempo_pulse <= 1'b0;
    end else begin
      tempo_pulse <= 1'b0;
      if (sample_pulse) begin
        if (count_q >= regs[0]) begin
          count_q     <= '0;
          tempo_pulse <= 1'b1;
        end else begin
          count_q <= count_q + 32'd1;
        end
      end
    end
  end

endmodule
