// sequencer: turns a bit sequence into a note trigger, one bit per beat.
//
// A step counter advances on each tempo pulse and wraps after
// sequence_length steps; `trigger` is bit <step> of the sequence register
// (bit 0 first). A run of ones holds the trigger high, i.e. a held note; a
// 1 after a 0 re-strikes the note. Two AXI-Lite registers set it: offset 0x0
// the sequence (SEQ_BITS = 32 steps), offset 0x4 sequence_length. A length of
// 0 silences the trigger; lengths above SEQ_BITS act as SEQ_BITS. Writing the
// registers does not reset the step counter. The trigger is combinational
// from the step counter and the register. Counter and look-up follow the
// design; the register width and the handling of odd lengths are this
// implementation's choices.
module sequencer
  import musilinx_pkg::*;
#(
  parameter int SEQ_BITS = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  input  logic      tempo_pulse,
  output logic      trigger
);

  localparam int STEP_W = $clog2(SEQ_BITS);

  logic [31:0]       regs [2];
  logic [STEP_W-1:0] step_q;
  logic [31:0]       len;

  axil_regs #(.NREGS(2)) u_regs (
    .clk   (clk),
    .rst_n (rst_n),
    .req   (s_axil_req),
    .rsp   (s_axil_rsp),
    .regs  (regs)
  );

  assign len = (regs[1] > 32'(SEQ_BITS)) ? 32'(SEQ_BITS) : regs[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q <= '0;
    end else if (len == 0) begin
      step_q <= '0;
    end else if (tempo_pulse) begin
      step_q <= (32'(step_q) + 32'd1 >= len) ? '0 : step_q + 1'b1;
    end
  end

  assign trigger = (len != 0) && regs[0][step_q];

endmodule
