// oscillator: triangle, sawtooth or square wave, one new value per sample.
//
// A two-state machine (RISE, FALL) spends `half_period` sample pulses in each
// state, so the period is 2*half_period samples, i.e.
// half_period = f_sample / (2 * f_desired). A phase counter counts sample
// pulses within the current state. At each sample pulse the value for the
// current phase is computed and then the phase advances:
//   triangle  RISE: 0 -> max over the half period, FALL: max -> 0
//   sawtooth  rises over RISE and FALL together, back to 0 when FALL ends
//   square    0 in RISE, all ones in FALL
// Ramps are phase * 65535 / span (span = half_period for the triangle,
// 2*half_period for the sawtooth), computed by a sequential divider, so
// `sample` and the one-cycle `valid` strobe appear 34 system clocks after
// the pulse; square values take the same path for uniform latency. A
// half_period of 0 parks the oscillator with output 0.
// The FSM, its states and the per-wave behaviour follow the design; the
// divider-based ramp scaling is this implementation's choice.
module oscillator
  import musilinx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sample_pulse,  // one clk cycle per audio sample
  input  wave_e       wave_select,
  input  logic [15:0] half_period,   // samples per half period
  output sample_t     sample,
  output logic        valid          // one-cycle strobe: new sample
);

  typedef enum logic {ST_RISE = 1'b0, ST_FALL = 1'b1} osc_state_e;

  osc_state_e  state_q;
  logic [15:0] phase_q;
  logic        square_q;   // divider result replaced by square level
  logic        sq_level_q;

  logic [16:0] ramp_pos;   // phase position within the ramp
  logic [16:0] ramp_span;  // ramp length in samples
  logic        div_busy, div_done;
  logic [32:0] div_quo;

  always_comb begin
    ramp_pos  = 17'(phase_q);
    ramp_span = {1'b0, half_period};
    unique case (wave_select)
      WAVE_SAWTOOTH: begin
        ramp_span = {half_period, 1'b0};
        ramp_pos  = (state_q == ST_RISE) ? 17'(phase_q) : 17'(half_period) + 17'(phase_q);
      end
      WAVE_TRIANGLE: begin
        ramp_pos  = (state_q == ST_RISE) ? 17'(phase_q) : 17'(half_period) - 17'(phase_q);
      end
      default: ;
    endcase
  end

  udiv_seq #(.NUM_W(33), .DEN_W(17)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .start (sample_pulse && half_period != 0),
    .num   (33'(ramp_pos) * 33'd65535),
    .den   (ramp_span),
    .busy  (div_busy),
    .done  (div_done),
    .quo   (div_quo)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_RISE;
      phase_q    <= '0;
      square_q   <= 1'b0;
      sq_level_q <= 1'b0;
      sample     <= '0;
      valid      <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (sample_pulse) begin
        if (half_period == 0) begin
          state_q <= ST_RISE;
          phase_q <= '0;
          sample  <= '0;
          valid   <= 1'b1;
        end else begin
          square_q   <= (wave_select == WAVE_SQUARE);
          sq_level_q <= (state_q == ST_FALL);
          if (phase_q + 16'd1 >= half_period) begin
            phase_q <= '0;
            state_q <= (state_q == ST_RISE) ? ST_FALL : ST_RISE;
          end else begin
            phase_q <= phase_q + 16'd1;
          end
        end
      end
      if (div_done) begin
        sample <= square_q ? {SAMPLE_W{sq_level_q}} : sample_t'(div_quo);
        valid  <= 1'b1;
      end
    end
  end

  // A new sample must not start while the previous one is still being divided.
  assert property (@(posedge clk) disable iff (!rst_n) sample_pulse |-> !div_busy)
    else $error("oscillator: sample pulses closer than the divider latency");

endmodule
