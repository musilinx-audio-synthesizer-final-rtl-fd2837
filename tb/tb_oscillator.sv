// tb_oscillator: self-checking test of oscillator.
//
// Sample pulses are issued every 40 clocks. For each waveform and several
// half periods (including a C3 and a G5 tuning value at 96 kHz) the testbench
// keeps its own phase/state model and checks every output sample against
//   triangle  rise: p*65535/hp         fall: (hp-p)*65535/hp
//   sawtooth  rise: p*65535/(2hp)      fall: (hp+p)*65535/(2hp)
//   square    rise: 0                  fall: 0xFFFF
// It also checks that `valid` comes exactly LAT clocks after each pulse and
// that the period is 2*hp samples (the sawtooth returns to 0 every 2*hp).
module tb_oscillator;
  import musilinx_pkg::*;
  // valid is set by the 34th clock edge after the edge that samples the
  // pulse; counted in negedges from raising the pulse that is 35
  localparam int LAT = 35;
  logic clk = 0, rst_n = 0, pulse = 0;
  wave_e wave;
  logic [15:0] hp;
  sample_t smp;
  logic valid;
  int checks = 0, failures = 0;

  oscillator dut (.clk, .rst_n, .sample_pulse(pulse), .wave_select(wave),
                  .half_period(hp), .sample(smp), .valid);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(wave_e w, int st, int p, int h);
    case (w)
      WAVE_TRIANGLE: return (st == 0) ? (longint'(p) * 65535) / h : (longint'(h - p) * 65535) / h;
      WAVE_SAWTOOTH: return (st == 0) ? (longint'(p) * 65535) / (2 * h)
                                      : (longint'(h + p) * 65535) / (2 * h);
      default:       return (st == 0) ? 0 : 65535;
    endcase
  endfunction

  task automatic run(wave_e w, int h, int nsamples);
    int st, p, lat, zeros;
    wave = w; hp = 16'(h);
    // restart the oscillator from the RISE state
    rst_n = 0; @(posedge clk); rst_n = 1;
    st = 0; p = 0; zeros = 0;
    for (int n = 0; n < nsamples; n++) begin
      @(negedge clk); pulse = 1; @(negedge clk); pulse = 0;
      lat = 1;
      while (!valid && lat < 60) begin @(negedge clk); lat++; end
      checks += 2;
      if (lat != LAT) begin
        failures++;
        $display("FAIL latency %0d", lat);
      end
      if (int'(smp) != expected(w, st, p, h)) begin
        failures++;
        if (failures < 20) $display("FAIL w=%0d hp=%0d n=%0d got %0d exp %0d", w, h, n, smp, expected(w, st, p, h));
      end
      if (w == WAVE_SAWTOOTH && smp == 0) zeros++;
      // advance the model
      p++;
      if (p >= h) begin p = 0; st = 1 - st; end
      repeat (40 - lat - 1) @(negedge clk);
    end
    if (w == WAVE_SAWTOOTH) begin
      checks++;
      if (zeros != (nsamples + 2 * h - 1) / (2 * h)) begin
        failures++;
        $display("FAIL sawtooth restarted %0d times in %0d samples (hp=%0d)", zeros, nsamples, h);
      end
    end
  endtask

  initial begin
    wave = WAVE_TRIANGLE; hp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(WAVE_TRIANGLE, 5, 30);
    run(WAVE_SAWTOOTH, 5, 30);
    run(WAVE_SQUARE,   5, 30);
    run(WAVE_TRIANGLE, 367, 800);   // C3 at 96 kHz
    run(WAVE_SAWTOOTH, 61, 300);    // G5 at 96 kHz
    run(WAVE_SQUARE,   61, 150);
    run(WAVE_TRIANGLE, 1, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
