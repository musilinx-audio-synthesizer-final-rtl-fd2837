// audio_pulse_gen: one-cycle sample pulse on the system clock for every
// rising edge of the audio clock.
//
// The audio clock (the sample-rate clock of the I2S transmitter, 96 kHz) is
// far slower than the system clock, and all audio work is done on the system
// clock. The audio clock is first passed through a SYNC_STAGES-deep
// flip-flop synchronizer to let metastability settle, then a positive edge
// detector compares the synchronized value with its previous value and raises
// `pulse` for exactly one system-clock cycle when it goes from 0 to 1.
// Latency from an audio-clock edge to the pulse is SYNC_STAGES to
// SYNC_STAGES+1 system clocks. The two-part structure follows the design; the
// synchronizer is written as plain flip-flops (a vendor CDC macro in the
// original) and its depth of 4 is this implementation's choice.
module audio_pulse_gen #(
  parameter int SYNC_STAGES = 4
) (
  input  logic clk,      // system clock
  input  logic rst_n,
  input  logic aud_clk,  // asynchronous audio sample clock
  output logic pulse     // one system-clock cycle per aud_clk rising edge
);

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   prev_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= '0;
      prev_q <= 1'b0;
    end else begin
      sync_q <= {sync_q[SYNC_STAGES-2:0], aud_clk};
      prev_q <= sync_q[SYNC_STAGES-1];
    end
  end

  assign pulse = sync_q[SYNC_STAGES-1] && !prev_q;

  initial assert (SYNC_STAGES >= 2) else $error("SYNC_STAGES must be at least 2");

endmodule
