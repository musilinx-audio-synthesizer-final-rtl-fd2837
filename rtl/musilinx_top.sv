// musilinx_top: the MusiLinx synthesizer fabric - NUM_VOICES voices mixed to
// one sample stream and sent out as AXI Stream Audio.
//
// The audio sample clock (96 kHz, from the I2S transmitter) is turned into a
// one-cycle sample pulse on the system clock by audio_pulse_gen. Every pulse
//   - steps every voice (oscillator + ADSR + VCA),
//   - advances the tempo generator, whose beat pulse steps the sequencer,
//   - sends the previous mixed sample as one stereo AES3 frame.
// Voice i is triggered by bit i of `gpio_trigger` (the processor's GPIO
// register: one bit per voice, 32 voices tuned C3..G5) or by the sequencer
// trigger when bit i of `seq_route` is set. The voices' 16-bit outputs are
// combined by a balanced mixer tree (MIX_MODE 1 = averaging, 0 = clipping).
//
// Configuration comes from the processor over one AXI-Lite slave port,
// decoded into 32-byte windows:
//   0x000 + 0x20*i  voice i (8 registers, see audio_voice)
//   0x20*NUM_VOICES         sequencer (0x0 sequence, 0x4 sequence_length)
//   0x20*(NUM_VOICES+1)     tempo generator (0x0 tempo_rate)
// The processor, GPIO, I2S transmitter and codec are outside this module;
// their connections are the ports.
// Timing: a voice sample is ready 36 clocks after a pulse and the mixed sample
// LEVELS (5 for 32 voices) clocks later; it is transmitted at the next pulse,
// so the sample clock must be slower than about 45 system clocks.
// The blocks and their connections follow the design; the address map,
// sequencer routing port and single AXI-Lite port are this implementation's
// choices.
module musilinx_top
  import musilinx_pkg::*;
#(
  parameter int NUM_VOICES  = 32,
  parameter bit MIX_MODE    = 1'b1,
  parameter int SYNC_STAGES = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  aud_clk,
  // processor AXI-Lite configuration port
  input  axil_req_t             s_axil_req,
  output axil_rsp_t             s_axil_rsp,
  // processor GPIO
  input  logic [NUM_VOICES-1:0] gpio_trigger,
  input  logic [NUM_VOICES-1:0] seq_route,
  // AXI Stream Audio to the I2S transmitter
  output logic [31:0]           m_axis_tdata,
  output logic [AXIS_TID_W-1:0] m_axis_tid,
  output logic                  m_axis_tvalid,
  input  logic                  m_axis_tready,
  output logic                  frame_dropped
);

  localparam int NSLAVES   = NUM_VOICES + 2;
  localparam int SEQ_SLV   = NUM_VOICES;
  localparam int TEMPO_SLV = NUM_VOICES + 1;

  axil_req_t s_req [NSLAVES];
  axil_rsp_t s_rsp [NSLAVES];

  logic    sample_pulse, tempo_pulse, seq_trigger;
  sample_t voice_sample [NUM_VOICES];
  sample_t mix_sample;

  audio_pulse_gen #(.SYNC_STAGES(SYNC_STAGES)) u_pulse (
    .clk     (clk),
    .rst_n   (rst_n),
    .aud_clk (aud_clk),
    .pulse   (sample_pulse)
  );

  axil_decoder #(.NSLAVES(NSLAVES), .SPAN_BITS(5)) u_dec (
    .clk   (clk),
    .rst_n (rst_n),
    .m_req (s_axil_req),
    .m_rsp (s_axil_rsp),
    .s_req (s_req),
    .s_rsp (s_rsp)
  );

  tempo_generator u_tempo (
    .clk          (clk),
    .rst_n        (rst_n),
    .s_axil_req   (s_req[TEMPO_SLV]),
    .s_axil_rsp   (s_rsp[TEMPO_SLV]),
    .sample_pulse (sample_pulse),
    .tempo_pulse  (tempo_pulse)
  );

  sequencer u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .s_axil_req  (s_req[SEQ_SLV]),
    .s_axil_rsp  (s_rsp[SEQ_SLV]),
    .tempo_pulse (tempo_pulse),
    .trigger     (seq_trigger)
  );

  for (genvar v = 0; v < NUM_VOICES; v++) begin : g_voice
    audio_voice u_voice (
      .clk          (clk),
      .rst_n        (rst_n),
      .s_axil_req   (s_req[v]),
      .s_axil_rsp   (s_rsp[v]),
      .sample_pulse (sample_pulse),
      .trigger      (gpio_trigger[v] || (seq_route[v] && seq_trigger)),
      .sample       (voice_sample[v])
    );
  end

  mixer_tree #(.N(NUM_VOICES), .MODE(MIX_MODE)) u_mix (
    .clk   (clk),
    .rst_n (rst_n),
    .in    (voice_sample),
    .out   (mix_sample)
  );

  audio_sample_to_axis_audio u_axis (
    .clk           (clk),
    .rst_n         (rst_n),
    .enable        (sample_pulse),
    .sample        (mix_sample),
    .m_axis_tdata  (m_axis_tdata),
    .m_axis_tid    (m_axis_tid),
    .m_axis_tvalid (m_axis_tvalid),
    .m_axis_tready (m_axis_tready),
    .dropped       (frame_dropped)
  );

endmodule
