// adsr: Attack-Decay-Sustain-Release envelope generator.
//
// Five-state machine (WAIT, ATTACK, DECAY, SUSTAIN, RELEASE) that moves once
// per sample pulse; `level` (the envelope, 16 bits) is its counter:
//   WAIT     level 0; a high trigger starts ATTACK.
//   ATTACK   level += attack until it would pass 0xFFFF; then 0xFFFF, DECAY.
//   DECAY    level -= decay until it would reach `sustain`; then SUSTAIN.
//   SUSTAIN  level held at `sustain` and the held samples counted; once at
//            least sustain_duration samples have passed and the trigger is
//            low, RELEASE.
//   RELEASE  level -= release until it would reach 0; then WAIT. A trigger
//            that rises again during RELEASE restarts ATTACK from the
//            current level.
// So attack/decay/release are per-sample steps, (2^16-1)/(t*f_sample), and
// sustain_duration is a count of samples, t*f_sample. A step of 0 holds the
// level (an infinitely long segment). `level` updates on the clock after the
// sample pulse. The states, outputs and parameter meanings follow the design;
// the exact transition tests and the retrigger rule are this
// implementation's reading of them.
module adsr
  import musilinx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sample_pulse,
  input  logic        trigger,
  input  logic [15:0] attack,
  input  logic [15:0] decay,
  input  logic [15:0] sustain,
  input  logic [15:0] sustain_duration,
  input  logic [15:0] release_step,
  output logic [15:0] level,
  output adsr_state_e state
);

  logic [15:0] dur_q;
  logic        trig_q;   // trigger seen at the previous sample pulse

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ADSR_WAIT;
      level  <= '0;
      dur_q  <= '0;
      trig_q <= 1'b0;
    end else if (sample_pulse) begin
      trig_q <= trigger;
      unique case (state)
        ADSR_WAIT: begin
          level <= '0;
          if (trigger) state <= ADSR_ATTACK;
        end
        ADSR_ATTACK: begin
          if (17'(level) + 17'(attack) >= 17'hFFFF) begin
            level <= 16'hFFFF;
            state <= ADSR_DECAY;
          end else begin
            level <= level + attack;
          end
        end
        ADSR_DECAY: begin
          if (17'(level) <= 17'(sustain) + 17'(decay)) begin
            level <= sustain;
            dur_q <= '0;
            state <= ADSR_SUSTAIN;
          end else begin
            level <= level - decay;
          end
        end
        ADSR_SUSTAIN: begin
          level <= sustain;
          if (dur_q != 16'hFFFF) dur_q <= dur_q + 16'd1;
          if (dur_q >= sustain_duration && !trigger) state <= ADSR_RELEASE;
        end
        ADSR_RELEASE: begin
          if (trigger && !trig_q) begin
            state <= ADSR_ATTACK;
          end else if (level <= release_step) begin
            level <= '0;
            state <= ADSR_WAIT;
          end else begin
            level <= level - release_step;
          end
        end
        default: begin
          state <= ADSR_WAIT;
          level <= '0;
        end
      endcase
    end
  end

endmodule
