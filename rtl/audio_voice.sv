// audio_voice: one synthesizer voice - oscillator, ADSR envelope and VCA,
// configured through eight AXI-Lite registers.
//
// On every sample pulse the oscillator computes the next wave value and the
// ADSR advances its envelope (started by `trigger`); the VCA then scales the
// wave by the envelope and by the volume. Registers (32-bit words, low bits
// used):
//   0x00 wave_select (2 bits: 0 triangle, 1 sawtooth, 2 square)
//   0x04 half_period       0x08 adsr_attack     0x0C adsr_decay
//   0x10 adsr_sustain      0x14 adsr_sustain_duration
//   0x18 adsr_release      0x1C volume (U(0,16))
// All reset to 0, i.e. a silent voice until configured.
// Timing: `sample` settles 36 clocks after a sample pulse (34 in the
// oscillator, 2 in the VCA) and holds until the next one, so sample pulses
// must be at least 36 clocks apart; it reflects the envelope level reached at
// that pulse. The sub-blocks and register map follow the design; register
// read-back and reset values are this implementation's choices.
module audio_voice
  import musilinx_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  input  logic      sample_pulse,
  input  logic      trigger,
  output sample_t   sample
);

  logic [31:0] regs [VOICE_NREGS];
  sample_t     osc_sample;
  logic        osc_valid;
  logic [15:0] env;
  adsr_state_e env_state;

  axil_regs #(.NREGS(VOICE_NREGS)) u_regs (
    .clk   (clk),
    .rst_n (rst_n),
    .req   (s_axil_req),
    .rsp   (s_axil_rsp),
    .regs  (regs)
  );

  oscillator u_osc (
    .clk          (clk),
    .rst_n        (rst_n),
    .sample_pulse (sample_pulse),
    .wave_select  (wave_e'(regs[REG_WAVE_SELECT][1:0])),
    .half_period  (regs[REG_HALF_PERIOD][15:0]),
    .sample       (osc_sample),
    .valid        (osc_valid)
  );

  adsr u_adsr (
    .clk              (clk),
    .rst_n            (rst_n),
    .sample_pulse     (sample_pulse),
    .trigger          (trigger),
    .attack           (regs[REG_ATTACK][15:0]),
    .decay            (regs[REG_DECAY][15:0]),
    .sustain          (regs[REG_SUSTAIN][15:0]),
    .sustain_duration (regs[REG_SUSTAIN_DUR][15:0]),
    .release_step     (regs[REG_RELEASE][15:0]),
    .level            (env),
    .state            (env_state)
  );

  vca u_vca (
    .clk        (clk),
    .rst_n      (rst_n),
    .sample_in  (osc_sample),
    .env        (env),
    .volume     (regs[REG_VOLUME][15:0]),
    .sample_out (sample)
  );

endmodule
