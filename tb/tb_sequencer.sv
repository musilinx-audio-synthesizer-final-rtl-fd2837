// tb_sequencer: self-checking test of sequencer.
//
// Loads sequences and lengths over AXI-Lite (checked by reading back), then
// issues tempo pulses and compares the trigger at every step with bit
// <step mod length> of the sequence, starting from step 0 after reset.
// Covers the example pattern of a short repeating rhythm, an all-ones held
// note, length 32, length 0 (silent) and a length above 32 (treated as 32).
module tb_sequencer;
  import musilinx_pkg::*;
  logic clk = 0, rst_n = 0, tpulse = 0, trig;
  axil_req_t req;
  axil_rsp_t rsp;
  int checks = 0, failures = 0;

  sequencer dut (.clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
                 .tempo_pulse(tpulse), .trigger(trig));

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

  task automatic run(logic [31:0] seq, int len, int steps);
    logic [31:0] rd;
    int eff;
    // reset so that the step counter starts from 0
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    axil_write(32'h0, seq);
    axil_write(32'h4, 32'(len));
    axil_read(32'h0, rd);
    checks++; if (rd != seq) failures++;
    axil_read(32'h4, rd);
    checks++; if (rd != 32'(len)) failures++;
    eff = (len > 32) ? 32 : len;
    for (int n = 0; n < steps; n++) begin
      logic exp;
      exp = (eff == 0) ? 1'b0 : seq[n % eff];
      checks++;
      if (trig !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL seq %h len %0d step %0d: trigger %0b", seq, len, n, trig);
      end
      @(negedge clk); tpulse = 1; @(negedge clk); tpulse = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32'b1011_0010, 8, 40);
    run(32'hFFFF_FFFF, 5, 20);
    run(32'h8421_F00D, 32, 100);
    run(32'h0000_0003, 3, 12);
    run(32'hFFFF_FFFF, 0, 10);
    run(32'h1357_9BDF, 40, 70);
    for (int k = 0; k < 10; k++) run($urandom, $urandom_range(1, 32), 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
