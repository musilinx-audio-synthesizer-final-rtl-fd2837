// tb_tempo_generator: self-checking test of tempo_generator.
//
// Writes tempo_rate over AXI-Lite (checking the OKAY response and the read
// back value), then drives sample pulses every 3 clocks and checks that beat
// pulses come exactly every tempo_rate + 1 samples, each one clock after a
// sample pulse. Rates tried: 0, 1, 7 and 59 (e.g. 60*fs/bpm - 1 for a scaled
// sample rate).
module tb_tempo_generator;
  import musilinx_pkg::*;
  logic clk = 0, rst_n = 0, spulse = 0, tpulse;
  axil_req_t req;
  axil_rsp_t rsp;
  int checks = 0, failures = 0;

  tempo_generator dut (.clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
                       .sample_pulse(spulse), .tempo_pulse(tpulse));

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  task automatic run(int rate);
    logic [31:0] rd;
    int since, beats;
    axil_write(32'h0, 32'(rate));
    axil_read(32'h0, rd);
    checks++;
    if (rd != 32'(rate)) begin failures++; $display("FAIL readback %0d", rd); end
    since = -1; beats = 0;
    for (int n = 0; n < 20 * (rate + 1) + 5; n++) begin
      @(negedge clk); spulse = 1;
      @(negedge clk); spulse = 0;
      // beat pulse appears on the clock after the sample pulse
      if (tpulse) begin
        if (since >= 0) begin
          checks++;
          if (since != rate + 1) begin
            failures++;
            $display("FAIL rate %0d: beat after %0d samples", rate, since);
          end
        end
        since = 0; beats++;
      end
      since = (since >= 0) ? since + 1 : since;
      @(negedge clk);
      if (tpulse) begin failures++; $display("FAIL: beat pulse longer than one clock"); end
    end
    checks++;
    if (beats < 19) begin failures++; $display("FAIL rate %0d: only %0d beats", rate, beats); end
  endtask

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(7);
    run(0);
    run(1);
    run(59);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
