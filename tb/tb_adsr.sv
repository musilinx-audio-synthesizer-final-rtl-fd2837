// tb_adsr: self-checking test of adsr.
//
// Sample pulses every 4 clocks. A reference envelope model in the testbench is
// stepped at each pulse and the DUT's level and state are compared after
// every pulse. Scripted notes cover: a full attack-decay-sustain-release with
// the trigger released early (sustain held for sustain_duration), a note
// held longer than sustain_duration (release waits for the trigger), a
// retrigger during release, and random parameter sets with random trigger
// patterns. Every state must be visited.
module tb_adsr;
  import musilinx_pkg::*;
  logic clk = 0, rst_n = 0, pulse = 0, trig = 0;
  logic [15:0] att, dec, sus, sdur, rel, level;
  adsr_state_e state;
  int checks = 0, failures = 0;
  int visits [5];
  int retriggers = 0;

  // reference model state
  int m_state = 0, m_level = 0, m_dur = 0, m_trig_prev = 0;

  adsr dut (.clk, .rst_n, .sample_pulse(pulse), .trigger(trig), .attack(att),
            .decay(dec), .sustain(sus), .sustain_duration(sdur), .release_step(rel),
            .level, .state);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step(int t);
    case (m_state)
      0: begin m_level = 0; if (t) m_state = 1; end
      1: if (m_level + att >= 65535) begin m_level = 65535; m_state = 2; end
         else m_level += att;
      2: if (m_level <= sus + dec) begin m_level = sus; m_dur = 0; m_state = 3; end
         else m_level -= dec;
      3: begin
           m_level = sus;
           if (m_dur >= sdur && !t) m_state = 4;
           if (m_dur < 65535) m_dur++;
         end
      4: if (t && !m_trig_prev) begin m_state = 1; retriggers++; end
         else if (m_level <= rel) begin m_level = 0; m_state = 0; end
         else m_level -= rel;
      default: ;
    endcase
    m_trig_prev = t;
  endtask

  task automatic step(int t);
    @(negedge clk); trig = t[0]; pulse = 1;
    @(negedge clk); pulse = 0;
    model_step(t);
    checks++;
    visits[int'(state)]++;
    if (int'(level) != m_level || int'(state) != m_state) begin
      failures++;
      if (failures < 20)
        $display("FAIL t=%0d: level %0d state %0d, expected %0d state %0d", t, level, state, m_level, m_state);
    end
    @(negedge clk); @(negedge clk);
  endtask

  initial begin
    att = 16'd8000; dec = 16'd3000; sus = 16'd30000; sdur = 16'd10; rel = 16'd2000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // short press: release must wait for the sustain duration
    repeat (3) step(1);
    repeat (60) step(0);
    // long press: release must wait for the trigger
    repeat (60) step(1);
    repeat (5) step(0);
    // retrigger during release
    step(1);
    repeat (40) step(0);
    // random parameter sets and trigger patterns
    for (int k = 0; k < 40; k++) begin
      att = 16'($urandom_range(1, 20000)); dec = 16'($urandom_range(1, 20000));
      sus = 16'($urandom); sdur = 16'($urandom_range(0, 30)); rel = 16'($urandom_range(1, 20000));
      for (int n = 0; n < 200; n++) step(($urandom_range(0, 9) < 4) ? 1 : 0);
    end
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL: state %0d never visited", s); end
    end
    checks++;
    if (retriggers == 0) begin failures++; $display("FAIL: no retrigger during release"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
