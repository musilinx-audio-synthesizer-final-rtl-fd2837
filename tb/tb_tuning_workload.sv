// tb_tuning_workload: plays the 32 notes C3..G5 one at a time through the
// whole synthesizer and measures their pitch from the output stream.
//
// Voice v is tuned to f = 130.81 Hz * 2^(v/12) with
// half_period = round(f_sample / (2 f)), f_sample = 96 kHz, and set to a
// full-level square wave with an instant envelope. Each note is played alone;
// the testbench records the audio word of every AXI Stream Audio frame and
// measures the distance between successive rising edges of the square wave.
// Checks: every period equals 2*half_period samples, and the resulting
// tuning error in cents is reported per note. The number of notes within
// +/-5 cents of equal temperament is checked against the 25 that integer
// half periods allow at 96 kHz (C#5 is the worst at about -8.2 cents).
// The audio clock runs at 1/64 of the system clock to keep the run short;
// pitch in samples does not depend on it. The top keeps its default
// parameters.
module tb_tuning_workload;
  import musilinx_pkg::*;
  localparam int NV = 32;
  logic clk = 0, rst_n = 0, aud_clk = 0;
  axil_req_t req;
  axil_rsp_t rsp;
  logic [NV-1:0] gpio = '0, route = '0;
  logic [31:0] tdata;
  logic [2:0] tid;
  logic tvalid, dropped;
  int checks = 0, failures = 0;
  int rec[$];
  bit recording = 0;

  musilinx_top dut (.clk, .rst_n, .aud_clk, .s_axil_req(req), .s_axil_rsp(rsp),
                    .gpio_trigger(gpio), .seq_route(route), .m_axis_tdata(tdata),
                    .m_axis_tid(tid), .m_axis_tvalid(tvalid), .m_axis_tready(1'b1),
                    .frame_dropped(dropped));

  always #5ns clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && tvalid && tid == 0 && recording)
    rec.push_back(int'(tdata[27:12]));

  task automatic axil_write(logic [31:0] addr, logic [31:0] data);
    @(negedge clk);
    req.awaddr = addr; req.awvalid = 1; req.wdata = data; req.wstrb = '1; req.wvalid = 1;
    req.bready = 1;
    do @(posedge clk); while (!(rsp.awready && rsp.wready));
    @(negedge clk); req.awvalid = 0; req.wvalid = 0;
    while (!rsp.bvalid) @(negedge clk);
    @(negedge clk); req.bready = 0;
  endtask

  task automatic sample_periods(int n);
    for (int k = 0; k < n; k++) begin
      repeat (32) @(posedge clk); aud_clk = 1;
      repeat (32) @(posedge clk); aud_clk = 0;
    end
  endtask

  initial begin
    int hp[NV];
    real f[NV];
    int in_tune = 0;
    real worst = 0.0;
    int worst_v = 0;
    req = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      f[v]  = 130.81 * (2.0 ** (real'(v) / 12.0));
      hp[v] = int'(96000.0 / (2.0 * f[v]));   // real-to-int conversion rounds
      axil_write(32'(32 * v + 0),  32'(WAVE_SQUARE));
      axil_write(32'(32 * v + 4),  32'(hp[v]));
      axil_write(32'(32 * v + 8),  32'd65535);   // attack: one sample
      axil_write(32'(32 * v + 12), 32'd0);       // decay: none
      axil_write(32'(32 * v + 16), 32'd65535);   // sustain at full level
      axil_write(32'(32 * v + 20), 32'd0);
      axil_write(32'(32 * v + 24), 32'd65535);   // release: one sample
      axil_write(32'(32 * v + 28), 32'd65535);
    end
    for (int v = 0; v < NV; v++) begin
      int edges[$];
      real fm, cents;
      edges.delete();
      gpio = '0; gpio[v] = 1'b1;
      sample_periods(8);                 // let the envelope reach full level
      rec.delete(); recording = 1;
      sample_periods(6 * hp[v] + 4);     // three periods
      recording = 0;
      gpio = '0;
      sample_periods(8);                 // release
      for (int i = 1; i < rec.size(); i++)
        if (rec[i - 1] == 0 && rec[i] != 0) edges.push_back(i);
      checks++;
      if (edges.size() < 2) begin
        failures++; $display("FAIL note %0d: no full period seen", v);
        continue;
      end
      for (int e = 1; e < edges.size(); e++) begin
        checks++;
        if (edges[e] - edges[e - 1] != 2 * hp[v]) begin
          failures++;
          $display("FAIL note %0d: period %0d samples, expected %0d", v, edges[e] - edges[e - 1], 2 * hp[v]);
        end
      end
      fm = 96000.0 / real'(edges[1] - edges[0]);
      cents = 1200.0 * $ln(fm / f[v]) / $ln(2.0);
      if (cents <= 5.0 && cents >= -5.0) in_tune++;
      if ((cents < 0 ? -cents : cents) > (worst < 0 ? -worst : worst)) begin worst = cents; worst_v = v; end
      $display("note %2d: target %7.2f Hz, half_period %3d, measured %7.2f Hz, %6.2f cents", v, f[v], hp[v], fm, cents);
    end
    $display("%0d of %0d notes within +/-5 cents; worst note %0d at %0.2f cents", in_tune, NV, worst_v, worst);
    checks++;
    if (in_tune != 25) begin failures++; $display("FAIL: expected 25 notes within 5 cents"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
