// tb_audio_sample_to_axis_audio: self-checking test of the AXI Stream Audio
// sender.
//
// Issues 400 enable pulses (more than two 192-frame blocks), each with a new
// random sample, while TREADY is randomly withheld. Every accepted sub-frame
// is checked: TID alternates 0,1; preamble BSYNC on channel 0 of frame 0,
// SF1SYNC on other channel-0 sub-frames, SF2SYNC on channel 1; bits [27:12]
// hold the sample and [11:4] are zero; V, U and P are 0; C is bit <frame> of
// the channel-status parameter. With TREADY high a frame must complete within
// two clocks of the enable. An enable while TVALID is held low-ready must be
// dropped and flagged.
module tb_audio_sample_to_axis_audio;
  import musilinx_pkg::*;
  localparam logic [191:0] CS = {64'hDEAD_BEEF_0123_4567, 64'h89AB_CDEF_F0E1_D2C3, 64'hA5A5_5A5A_1234_8765};
  logic clk = 0, rst_n = 0, en = 0, tready = 0, dropped;
  sample_t smp;
  logic [31:0] tdata;
  logic [2:0] tid;
  logic tvalid;
  int checks = 0, failures = 0, drops_seen = 0, stalls = 0;
  int frame = 0, sub = 0, bsyncs = 0;
  sample_t sent;

  audio_sample_to_axis_audio #(.CHANNEL_STATUS(CS)) dut (
    .clk, .rst_n, .enable(en), .sample(smp), .m_axis_tdata(tdata), .m_axis_tid(tid),
    .m_axis_tvalid(tvalid), .m_axis_tready(tready), .dropped);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check every accepted sub-frame
  always @(posedge clk) if (rst_n && tvalid && tready) begin
    logic [3:0] pre;
    pre = (sub == 1) ? PRE_SF2SYNC : (frame == 0) ? PRE_BSYNC : PRE_SF1SYNC;
    checks++;
    if (tid !== 3'(sub) || tdata[3:0] !== pre || tdata[11:4] !== 8'h00 ||
        tdata[27:12] !== sent || tdata[29:28] !== 2'b00 || tdata[31] !== 1'b0 ||
        tdata[30] !== CS[frame]) begin
      failures++;
      if (failures < 10) $display("FAIL frame %0d sub %0d: tid %0d tdata %h (sample %h)", frame, sub, tid, tdata, sent);
    end
    if (sub == 1 && frame == 0) bsyncs++;
    if (sub == 1) frame = (frame + 1) % 192;
    sub = 1 - sub;
  end

  always @(posedge clk) if (rst_n && tvalid && !tready) stalls++;

  initial begin
    smp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      smp = $urandom; sent = smp; en = 1;
      tready = (n % 4 != 0) || ($urandom_range(0, 1) == 1);
      @(negedge clk); en = 0; smp = $urandom;
      if (n % 4 == 0 && !tready) begin
        // an enable while the frame is still pending must be dropped
        repeat (2) @(negedge clk);
        en = 1; #1;
        checks++;
        if (!dropped) begin failures++; $display("FAIL: drop not flagged"); end
        @(negedge clk); en = 0;
        drops_seen++;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        tready = 1;
      end else if (tready) begin
        // with TREADY high the two sub-frames go on the two clocks after the
        // one that takes the enable
        @(negedge clk); @(negedge clk);
        checks++;
        if (tvalid !== 1'b0) begin failures++; $display("FAIL: frame took more than two clocks"); end
      end
      while (tvalid) @(negedge clk);
      repeat ($urandom_range(1, 4)) @(negedge clk);
    end
    checks += 3;
    if (bsyncs < 2) begin failures++; $display("FAIL: frame counter did not wrap twice"); end
    if (drops_seen == 0) failures++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
