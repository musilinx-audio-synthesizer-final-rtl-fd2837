// tb_audio_voice: self-checking test of audio_voice.
//
// Programs the eight registers over AXI-Lite (and reads them back), then runs
// sample pulses every 48 clocks with a scripted trigger. A testbench model of
// the oscillator, envelope and VCA predicts every output sample, which is
// checked just before the next pulse, and the output must be settled 36
// clocks after the pulse. Runs each waveform with different envelopes and
// volumes, including the G5 and C3 half periods at 96 kHz.
module tb_audio_voice;
  import musilinx_pkg::*;
  localparam int GAP = 48;
  logic clk = 0, rst_n = 0, pulse = 0, trig = 0;
  axil_req_t req;
  axil_rsp_t rsp;
  sample_t smp;
  int checks = 0, failures = 0;

  // configuration mirror and model state
  int c_wave, c_hp, c_att, c_dec, c_sus, c_sdur, c_rel, c_vol;
  int o_st, o_p;
  int m_state, m_level, m_dur, m_trig_prev;

  audio_voice dut (.clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
                   .sample_pulse(pulse), .trigger(trig), .sample(smp));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axil_write(logic [31:0] addr, logic [31:0] data);
    @(negedge clk);
    req.awaddr = addr; req.awvalid = 1; req.wdata = data; req.wstrb = '1; req.wvalid = 1;
    req.bready = 1;
    do @(posedge clk); while (!(rsp.awready && rsp.wready));
    @(negedge clk); req.awvalid = 0; req.wvalid = 0;
    while (!rsp.bvalid) @(negedge clk);
    checks++;
    if (rsp.bresp != AXI_RESP_OKAY) failures++;
    @(negedge clk); req.bready = 0;
  endtask

  task automatic axil_read(logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    req.araddr = addr; req.arvalid = 1; req.rready = 1;
    do @(posedge clk); while (!rsp.arready);
    @(negedge clk); req.arvalid = 0;
    while (!rsp.rvalid) @(negedge clk);
    data = rsp.rdata;
    @(negedge clk); req.rready = 0;
  endtask

  task automatic configure(int w, int hp, int a, int d, int s, int sd, int r, int v);
    int vals[8];
    logic [31:0] rd;
    vals = '{w, hp, a, d, s, sd, r, v};
    for (int i = 0; i < 8; i++) axil_write(32'(4 * i), 32'(vals[i]));
    for (int i = 0; i < 8; i++) begin
      axil_read(32'(4 * i), rd);
      checks++;
      if (rd != 32'(vals[i])) begin failures++; $display("FAIL readback reg %0d", i); end
    end
    c_wave = w; c_hp = hp; c_att = a; c_dec = d; c_sus = s; c_sdur = sd; c_rel = r; c_vol = v;
    // restart oscillator and envelope from a known state
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    // reset cleared the registers: write them again
    for (int i = 0; i < 8; i++) axil_write(32'(4 * i), 32'(vals[i]));
    o_st = 0; o_p = 0; m_state = 0; m_level = 0; m_dur = 0; m_trig_prev = 0;
  endtask

  function automatic int osc_value();
    case (c_wave)
      0: return (o_st == 0) ? (longint'(o_p) * 65535) / c_hp : (longint'(c_hp - o_p) * 65535) / c_hp;
      1: return (o_st == 0) ? (longint'(o_p) * 65535) / (2 * c_hp)
                            : (longint'(c_hp + o_p) * 65535) / (2 * c_hp);
      default: return (o_st == 0) ? 0 : 65535;
    endcase
  endfunction

  task automatic env_step(int t);
    case (m_state)
      0: begin m_level = 0; if (t) m_state = 1; end
      1: if (m_level + c_att >= 65535) begin m_level = 65535; m_state = 2; end
         else m_level += c_att;
      2: if (m_level <= c_sus + c_dec) begin m_level = c_sus; m_dur = 0; m_state = 3; end
         else m_level -= c_dec;
      3: begin
           m_level = c_sus;
           if (m_dur >= c_sdur && !t) m_state = 4;
           if (m_dur < 65535) m_dur++;
         end
      4: if (t && !m_trig_prev) m_state = 1;
         else if (m_level <= c_rel) begin m_level = 0; m_state = 0; end
         else m_level -= c_rel;
      default: ;
    endcase
    m_trig_prev = t;
  endtask

  task automatic play(int t, int n);
    for (int k = 0; k < n; k++) begin
      int ov, ex;
      @(negedge clk); trig = t[0]; pulse = 1;
      @(negedge clk); pulse = 0;
      ov = osc_value();
      env_step(t);
      ex = int'((longint'((longint'(ov) * m_level) >> 16) * c_vol) >> 16);
      o_p++;
      if (o_p >= c_hp) begin o_p = 0; o_st = 1 - o_st; end
      repeat (36) @(negedge clk);
      checks++;
      if (int'(smp) != ex) begin
        failures++;
        if (failures < 20) $display("FAIL wave %0d: sample %0d expected %0d", c_wave, smp, ex);
      end
      repeat (GAP - 38) @(negedge clk);
      checks++;
      if (int'(smp) != ex) begin failures++; $display("FAIL: sample not held"); end
    end
  endtask

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    configure(0, 7, 9000, 2000, 40000, 5, 3000, 65535);
    play(1, 30); play(0, 40);
    configure(1, 61, 20000, 500, 20000, 20, 1000, 32768);
    play(1, 60); play(0, 60);
    configure(2, 13, 65535, 65535, 50000, 2, 65535, 49152);
    play(1, 20); play(0, 10); play(1, 10); play(0, 10);
    configure(0, 367, 3000, 100, 60000, 100, 400, 65535);
    play(1, 200); play(0, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
