// tb_audio_pulse_gen: self-checking test of audio_pulse_gen.
//
// Drives an audio clock whose high and low phases last a random number of
// system clocks (at least 3), and checks that exactly one one-cycle pulse
// follows each rising edge, SYNC_STAGES to SYNC_STAGES+1 clocks after it, and
// that no pulse occurs otherwise.
module tb_audio_pulse_gen;
  localparam int SYNC = 4;
  logic clk = 0, rst_n = 0, aud_clk = 0, pulse;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -100, pulses = 0, rises = 0;

  audio_pulse_gen #(.SYNC_STAGES(SYNC)) dut (.clk, .rst_n, .aud_clk, .pulse);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check each pulse against the most recent rising edge
  always @(posedge clk) if (rst_n && pulse) begin
    int lat;
    lat = cyc - last_rise;
    pulses++;
    checks++;
    if (lat < SYNC - 1 || lat > SYNC) begin
      failures++;
      $display("FAIL: pulse %0d clocks after edge", lat);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      repeat (3 + $urandom_range(0, 6)) @(posedge clk);
      #2 aud_clk = 1; last_rise = cyc + 1; rises++;
      repeat (3 + $urandom_range(0, 6)) @(posedge clk);
      #2 aud_clk = 0;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (pulses != rises) begin
      failures++;
      $display("FAIL: %0d pulses for %0d rising edges", pulses, rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
