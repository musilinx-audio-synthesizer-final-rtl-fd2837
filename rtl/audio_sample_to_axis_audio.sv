// audio_sample_to_axis_audio: sends one stereo AES3 frame of the current
// sample on AXI Stream Audio for every `enable` pulse.
//
// On `enable` (the sample pulse) the input sample is latched and two
// sub-frames are sent, channel 0 then channel 1, both carrying it (the
// synthesizer is mono). TID is the channel number. TDATA of a sub-frame:
//   [3:0]   preamble: BSYNC for channel 0 of frame 0, SF1SYNC for channel 0
//           of other frames, SF2SYNC for channel 1
//   [11:4]  zero (a 16-bit audio word is left-aligned in the 24-bit field)
//   [27:12] the 16-bit sample
//   [28]    validity, [29] user: always 0
//   [30]    channel status: bit <frame> of the 192-bit CHANNEL_STATUS word,
//           the same bit in both sub-frames of a frame
//   [31]    parity: always 0 (the receiving I2S transmitter ignores it)
// The frame number counts 0..191 and wraps. TVALID is held, with TDATA and
// TID stable, until TREADY; nothing is queued, so an `enable` that arrives
// while a frame is still being sent is dropped (`dropped` pulses). With
// TREADY high a frame takes two clocks after the enable clock.
// The format follows the design. The channel-status word is a preset; the
// receiving I2S transmitter does not act on it, and its default here is an
// arbitrary placeholder of this implementation, to be set as required.
module audio_sample_to_axis_audio
  import musilinx_pkg::*;
#(
  parameter logic [AES_FRAMES-1:0] CHANNEL_STATUS = AES_FRAMES'(32'h0A00_0000)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  sample_t               sample,
  output logic [31:0]           m_axis_tdata,
  output logic [AXIS_TID_W-1:0] m_axis_tid,
  output logic                  m_axis_tvalid,
  input  logic                  m_axis_tready,
  output logic                  dropped
);

  logic [7:0] frame_q;
  logic       sub_q;     // 0: channel 0 sub-frame, 1: channel 1 sub-frame
  sample_t    sample_q;
  logic [3:0] preamble;

  always_comb begin
    if (sub_q)              preamble = PRE_SF2SYNC;
    else if (frame_q == 0)  preamble = PRE_BSYNC;
    else                    preamble = PRE_SF1SYNC;
  end

  assign m_axis_tdata = {1'b0,                              // parity
                         CHANNEL_STATUS[frame_q],           // channel status
                         1'b0,                              // user
                         1'b0,                              // validity
                         sample_q,                          // audio word
                         8'h00,                             // low audio bits
                         preamble};
  assign m_axis_tid   = AXIS_TID_W'(sub_q);
  assign dropped      = enable && m_axis_tvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q       <= '0;
      sub_q         <= 1'b0;
      sample_q      <= '0;
      m_axis_tvalid <= 1'b0;
    end else if (!m_axis_tvalid) begin
      if (enable) begin
        sample_q      <= sample;
        sub_q         <= 1'b0;
        m_axis_tvalid <= 1'b1;
      end
    end else if (m_axis_tready) begin
      if (!sub_q) begin
        sub_q <= 1'b1;
      end else begin
        sub_q         <= 1'b0;
        m_axis_tvalid <= 1'b0;
        frame_q       <= (frame_q == 8'(AES_FRAMES - 1)) ? '0 : frame_q + 8'd1;
      end
    end
  end

  // AXI Stream rule: once raised, TVALID and TDATA hold until TREADY.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tid))
    else $error("AXI Stream Audio: TVALID/TDATA changed before TREADY");

endmodule
