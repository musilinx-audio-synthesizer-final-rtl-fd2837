// tb_musilinx_top: end-to-end test of the synthesizer at its default size
// (32 voices, averaging mixer tree), with a 100 MHz system clock and a
// 96 kHz audio sample clock.
//
// The processor's part is played by the testbench: over the AXI-Lite port it
// tunes voice i to note C3 + i semitones (half_period = round(96000 /
// (2 f))), gives the voices triangle, sawtooth and square waves in turn and
// sets their envelopes and volumes, programs the tempo generator and a
// sequencer rhythm routed to voice 31, and then plays notes through the GPIO
// trigger bits: single notes, a chord, and random key presses. A model of
// every voice (oscillator, envelope, VCA), the balanced averaging mixer
// tree, the tempo generator and the sequencer predicts each sample; every
// AXI Stream Audio sub-frame is checked against the sample of the previous
// sample period, together with TID, preamble and the zero fields.
// Mechanisms that must each occur at least once: every waveform, every
// envelope state, a retrigger in release, a tempo beat, a sequencer-driven
// note, a stalled stream (TREADY low), the 192-frame block wrap, and a DECERR
// for an unmapped address.
module tb_musilinx_top;
  import musilinx_pkg::*;
  localparam int NV       = 32;
  localparam int NSAMPLES = 420;
  localparam realtime AUD_HALF = 5208ns;   // 96 kHz
  logic clk = 0, rst_n = 0, aud_clk = 0, tready = 1;
  axil_req_t req;
  axil_rsp_t rsp;
  logic [NV-1:0] gpio = '0, route = '0;
  logic [31:0] tdata;
  logic [2:0] tid;
  logic tvalid, dropped;
  int checks = 0, failures = 0;

  musilinx_top dut (.clk, .rst_n, .aud_clk, .s_axil_req(req), .s_axil_rsp(rsp),
                    .gpio_trigger(gpio), .seq_route(route), .m_axis_tdata(tdata),
                    .m_axis_tid(tid), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
                    .frame_dropped(dropped));

  always #5ns clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- configuration mirror and model ----------------
  int c_wave[NV], c_hp[NV], c_att[NV], c_dec[NV], c_sus[NV], c_sdur[NV], c_rel[NV], c_vol[NV];
  int o_st[NV], o_p[NV];
  int m_state[NV], m_level[NV], m_dur[NV], m_trig_prev[NV];
  int tempo_rate = 0, tempo_cnt = 0;
  logic [31:0] seq_bits = '0;
  int seq_len = 0, seq_step = 0;
  int prev_mix = 0;
  int exp_q[$];
  // mechanism counters
  int n_wave[3], n_state[5], n_retrig = 0, n_beats = 0, n_seq_notes = 0, n_stall = 0,
      n_bsync = 0, n_decerr = 0;

  function automatic int osc_value(int v);
    case (c_wave[v])
      0: return (o_st[v] == 0) ? (longint'(o_p[v]) * 65535) / c_hp[v]
                               : (longint'(c_hp[v] - o_p[v]) * 65535) / c_hp[v];
      1: return (o_st[v] == 0) ? (longint'(o_p[v]) * 65535) / (2 * c_hp[v])
                               : (longint'(c_hp[v] + o_p[v]) * 65535) / (2 * c_hp[v]);
      default: return (o_st[v] == 0) ? 0 : 65535;
    endcase
  endfunction

  task automatic env_step(int v, int t);
    case (m_state[v])
      0: begin m_level[v] = 0; if (t) m_state[v] = 1; end
      1: if (m_level[v] + c_att[v] >= 65535) begin m_level[v] = 65535; m_state[v] = 2; end
         else m_level[v] += c_att[v];
      2: if (m_level[v] <= c_sus[v] + c_dec[v]) begin
           m_level[v] = c_sus[v]; m_dur[v] = 0; m_state[v] = 3;
         end else m_level[v] -= c_dec[v];
      3: begin
           m_level[v] = c_sus[v];
           if (m_dur[v] >= c_sdur[v] && !t) m_state[v] = 4;
           if (m_dur[v] < 65535) m_dur[v]++;
         end
      4: if (t && !m_trig_prev[v]) begin m_state[v] = 1; n_retrig++; end
         else if (m_level[v] <= c_rel[v]) begin m_level[v] = 0; m_state[v] = 0; end
         else m_level[v] -= c_rel[v];
      default: ;
    endcase
    m_trig_prev[v] = t;
    n_state[m_state[v]]++;
  endtask

  // one sample period of the whole design, at each audio clock rising edge
  always @(posedge aud_clk) begin
    int s[$];
    int seq_trig;
    exp_q.push_back(prev_mix);
    seq_trig = (seq_len != 0) ? int'(seq_bits[seq_step]) : 0;
    s.delete();
    for (int v = 0; v < NV; v++) begin
      int ov, t;
      t = int'(gpio[v]) | (int'(route[v]) & seq_trig);
      if (route[v] && seq_trig && !m_trig_prev[v]) n_seq_notes++;
      ov = (c_hp[v] == 0) ? 0 : osc_value(v);
      env_step(v, t);
      s.push_back(int'((longint'((longint'(ov) * m_level[v]) >> 16) * c_vol[v]) >> 16));
      if (c_hp[v] != 0) begin
        if (m_level[v] != 0 && c_vol[v] != 0) n_wave[c_wave[v]]++;
        o_p[v]++;
        if (o_p[v] >= c_hp[v]) begin o_p[v] = 0; o_st[v] = 1 - o_st[v]; end
      end
    end
    // balanced averaging tree
    while (s.size() > 1) begin
      int nxt[$];
      nxt.delete();
      for (int i = 0; i < s.size(); i += 2) nxt.push_back((s[i] + s[i+1]) >> 1);
      s = nxt;
    end
    prev_mix = s[0];
    // tempo generator and sequencer
    if (tempo_cnt >= tempo_rate) begin
      tempo_cnt = 0; n_beats++;
      if (seq_len != 0) seq_step = (seq_step + 1 >= seq_len) ? 0 : seq_step + 1;
    end else tempo_cnt++;
  end

  // ---------------- stream checker ----------------
  int frame = 0, sub = 0, cur_exp = 0;
  always @(posedge clk) if (rst_n && tvalid && !tready) n_stall++;
  always @(posedge clk) if (rst_n && tvalid && tready) begin
    logic [3:0] pre;
    if (sub == 0) begin
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: frame without a sample period"); cur_exp = -1;
      end else cur_exp = exp_q.pop_front();
    end
    pre = (sub == 1) ? PRE_SF2SYNC : (frame == 0) ? PRE_BSYNC : PRE_SF1SYNC;
    checks++;
    if (int'(tdata[27:12]) != cur_exp || tid !== 3'(sub) || tdata[3:0] !== pre ||
        tdata[11:4] !== 8'h00 || tdata[29:28] !== 2'b00 || tdata[31] !== 1'b0) begin
      failures++;
      if (failures < 20) $display("FAIL frame %0d sub %0d: tdata %h tid %0d, expected sample %h",
                                  frame, sub, tdata, tid, cur_exp);
    end
    if (sub == 0 && frame == 0) n_bsync++;
    if (sub == 1) frame = (frame + 1) % AES_FRAMES;
    sub = 1 - sub;
  end

  always @(posedge clk) if (rst_n && dropped) begin
    failures++; $display("FAIL: frame dropped");
  end

  // random back-pressure on the stream
  always @(negedge clk) tready <= ($urandom_range(0, 3) != 0);

  // ---------------- AXI-Lite master ----------------
  task automatic axil_write(logic [31:0] addr, logic [31:0] data, output logic [1:0] resp);
    @(negedge clk);
    req.awaddr = addr; req.awvalid = 1; req.wdata = data; req.wstrb = '1; req.wvalid = 1;
    req.bready = 1;
    do @(posedge clk); while (!(rsp.awready && rsp.wready));
    @(negedge clk); req.awvalid = 0; req.wvalid = 0;
    while (!rsp.bvalid) @(negedge clk);
    resp = rsp.bresp;
    @(negedge clk); req.bready = 0;
  endtask

  task automatic axil_read(logic [31:0] addr, output logic [31:0] data, output logic [1:0] resp);
    @(negedge clk);
    req.araddr = addr; req.arvalid = 1; req.rready = 1;
    do @(posedge clk); while (!rsp.arready);
    @(negedge clk); req.arvalid = 0;
    while (!rsp.rvalid) @(negedge clk);
    data = rsp.rdata; resp = rsp.rresp;
    @(negedge clk); req.rready = 0;
  endtask

  task automatic wr(logic [31:0] addr, logic [31:0] data);
    logic [1:0] resp;
    axil_write(addr, data, resp);
    checks++;
    if (resp != AXI_RESP_OKAY) begin failures++; $display("FAIL: write %h not OKAY", addr); end
  endtask

  // ---------------- stimulus ----------------
  task automatic sample_periods(int n);
    for (int k = 0; k < n; k++) begin
      #(AUD_HALF) aud_clk = 1;
      #(AUD_HALF) aud_clk = 0;
    end
  endtask

  initial begin
    logic [31:0] rd;
    logic [1:0] resp;
    req = '0;
    for (int v = 0; v < NV; v++) begin
      c_wave[v] = 0; c_hp[v] = 0; c_att[v] = 0; c_dec[v] = 0; c_sus[v] = 0; c_sdur[v] = 0;
      c_rel[v] = 0; c_vol[v] = 0; o_st[v] = 0; o_p[v] = 0; m_state[v] = 0; m_level[v] = 0;
      m_dur[v] = 0; m_trig_prev[v] = 0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    // voice configuration: note C3 + v semitones
    for (int v = 0; v < NV; v++) begin
      real f;
      int vals[8];
      f = 130.81 * (2.0 ** (real'(v) / 12.0));
      c_wave[v] = v % 3;
      c_hp[v]   = int'(96000.0 / (2.0 * f));
      c_att[v]  = 6000 + 500 * v;
      c_dec[v]  = 800;
      c_sus[v]  = 30000 + 500 * v;
      c_sdur[v] = 8;
      c_rel[v]  = 1500 + 100 * v;
      c_vol[v]  = 65535 - 1000 * v;
      vals = '{c_wave[v], c_hp[v], c_att[v], c_dec[v], c_sus[v], c_sdur[v], c_rel[v], c_vol[v]};
      for (int r = 0; r < 8; r++) wr(32'(32 * v + 4 * r), 32'(vals[r]));
    end
    axil_read(32'(32 * 5 + 4), rd, resp);
    checks++;
    if (rd != 32'(c_hp[5]) || resp != AXI_RESP_OKAY) begin failures++; $display("FAIL: voice readback"); end
    // sequencer rhythm 1,1,0,1,0,0 on voice 31, one beat per 12 samples
    seq_bits = 32'b00_1011; seq_len = 6; tempo_rate = 11;
    wr(32'(32 * NV), seq_bits);
    wr(32'(32 * NV + 4), 32'(seq_len));
    wr(32'(32 * (NV + 1)), 32'(tempo_rate));
    // unmapped address
    axil_write(32'(32 * (NV + 2)), 32'h1234, resp);
    checks++;
    if (resp == AXI_RESP_DECERR) n_decerr++; else begin failures++; $display("FAIL: no DECERR"); end
    axil_read(32'h0001_0000, rd, resp);
    checks++;
    if (resp == AXI_RESP_DECERR) n_decerr++; else begin failures++; $display("FAIL: no DECERR on read"); end

    // play: a single note (monophonic), a chord, then random key presses
    sample_periods(5);
    gpio[0] = 1;                 sample_periods(40);
    gpio[0] = 0;                 sample_periods(30);
    gpio[12] = 1; gpio[16] = 1; gpio[19] = 1;   // C-E-G chord
    sample_periods(50);
    gpio = '0;                   sample_periods(8);
    gpio[12] = 1;                sample_periods(4);   // retrigger while releasing
    gpio = '0;
    route[31] = 1;               // sequencer drives voice 31 from here on
    for (int k = 0; k < 20; k++) begin
      gpio[$urandom_range(0, NV - 2)] = 1'($urandom_range(0, 1));
      sample_periods(12);
    end
    gpio = '0;
    sample_periods(NSAMPLES - 5 - 40 - 30 - 50 - 8 - 4 - 240);
    sample_periods(1);           // flush the last frame
    repeat (20) @(posedge clk);

    checks++;
    if (exp_q.size() > 1) begin failures++; $display("FAIL: %0d frames missing", exp_q.size()); end
    // every mechanism must have happened
    for (int w = 0; w < 3; w++) begin
      checks++; if (n_wave[w] == 0) begin failures++; $display("FAIL: waveform %0d never heard", w); end
    end
    for (int s = 0; s < 5; s++) begin
      checks++; if (n_state[s] == 0) begin failures++; $display("FAIL: envelope state %0d never used", s); end
    end
    checks += 6;
    if (n_retrig == 0)     begin failures++; $display("FAIL: no retrigger"); end
    if (n_beats == 0)      begin failures++; $display("FAIL: no tempo beat"); end
    if (n_seq_notes == 0)  begin failures++; $display("FAIL: sequencer never played"); end
    if (n_stall == 0)      begin failures++; $display("FAIL: no stream stall"); end
    if (n_bsync < 2)       begin failures++; $display("FAIL: 192-frame block did not wrap"); end
    if (n_decerr < 2)      begin failures++; $display("FAIL: DECERR not seen"); end
    $display("waves %0d/%0d/%0d states %0d/%0d/%0d/%0d/%0d retrig %0d beats %0d seq-notes %0d stalls %0d blocks %0d decerr %0d",
             n_wave[0], n_wave[1], n_wave[2], n_state[0], n_state[1], n_state[2], n_state[3], n_state[4],
             n_retrig, n_beats, n_seq_notes, n_stall, n_bsync, n_decerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
