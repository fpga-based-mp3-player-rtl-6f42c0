// tb_ac97_link: self-checking test of the AC-link frame engine against a
// behavioural codec.  Checks: codec-ready detection; a register write lands
// in the codec's register file; a register read returns the codec's value;
// every sample is delivered once, in order, only in frames the codec asked
// for, at the requested rate (44.1 kHz out of 48 kHz frames); frame length is
// 256 BIT_CLK periods; an underrun is flagged when the source runs dry.
module tb_ac97_link;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst = 1'b1;
  logic bit_clk, sync, sdata_out, sdata_in;
  logic cmd_valid = 1'b0, cmd_read = 1'b0, cmd_taken;
  logic [6:0] cmd_addr = '0;
  logic [15:0] cmd_data = '0;
  logic pcm_valid, pcm_pop, pcm_underrun;
  logic [31:0] pcm_data;
  logic rd_valid, codec_ready, frame_start;
  logic [6:0] rd_addr;
  logic [15:0] rd_data;

  int checks = 0, failures = 0;
  int underruns = 0, pops = 0, frames = 0;
  logic [31:0] src_q [$];
  logic [31:0] sent_q [$];
  bit src_on = 1'b0;

  always #4 clk = ~clk;

  ac97_link dut (.*);
  ac97_codec_model codec (.bit_clk, .sync, .sdata_out, .sdata_in);

  assign pcm_valid = src_on && (src_q.size() > 0);
  assign pcm_data  = (src_q.size() > 0) ? src_q[0] : 32'h0;

  always @(posedge clk) begin
    if (pcm_pop) begin
      sent_q.push_back(src_q.pop_front());
      pops++;
    end
    if (pcm_underrun) underruns++;
    if (frame_start) frames++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic reg_cmd(input bit rd, input logic [6:0] a, input logic [15:0] d);
    @(posedge clk);
    cmd_valid <= 1'b1; cmd_read <= rd; cmd_addr <= a; cmd_data <= d;
    do @(posedge clk); while (!cmd_taken);
    cmd_valid <= 1'b0;
  endtask

  // frame period in clk cycles
  longint t_last = 0;
  int period_bad = 0, periods = 0;
  always @(posedge clk) if (frame_start) begin
    if (t_last != 0) begin
      longint dt;
      dt = longint'($time) - t_last;
      periods++;
      if (dt < 20800 || dt > 20870) period_bad++;
    end
    t_last = longint'($time);
  end

  initial begin
    logic [15:0] got;
    repeat (10) @(posedge clk);
    rst <= 1'b0;
    wait (codec_ready);
    check(1'b1, "codec ready seen");
    // DAC rate 44100 Hz, then read back the vendor ID
    reg_cmd(1'b0, 7'h2C, 16'd44100);
    repeat (3000) @(posedge clk);
    check(codec.regs[7'h2C >> 1] == 16'd44100, "register write reached codec");
    check(codec.reg_writes == 1, "one register write");
    reg_cmd(1'b1, 7'h7C, 16'h0);
    fork
      begin : wait_rd
        do @(posedge clk); while (!rd_valid);
        got = rd_data;
        check(rd_addr == 7'h7C, "read address echo");
        check(got == 16'h4144, "read data");
      end
      begin
        repeat (20000) @(posedge clk);
        check(1'b0, "read timeout");
        disable wait_rd;
      end
    join_any
    disable fork;
    // source runs dry first: underruns expected
    repeat (8000) @(posedge clk);
    check(underruns > 0, "underrun flagged while empty");
    codec.samples.delete();
    codec.requests = 0;
    // play 441 samples
    for (int i = 0; i < 441; i++) src_q.push_back({16'(i * 3 + 1), 16'(16'hF000 - i)});
    src_on = 1'b1;
    begin
      int f0;
      f0 = frames;
      wait (src_q.size() == 0);
      // 441 samples at 44.1 kHz take 480 frames (+-2)
      check((frames - f0) >= 478 && (frames - f0) <= 482, "sample rate 44.1 kHz");
    end
    repeat (6000) @(posedge clk);
    // frames already in flight when the source was switched on carry silence
    while (codec.samples.size() > 0 && codec.samples[0] == 32'h0) void'(codec.samples.pop_front());
    // after the last sample the FIFO is empty again, so later frames carry silence
    check(codec.samples.size() >= 441, "all samples delivered");
    for (int i = 441; i < codec.samples.size(); i++)
      check(codec.samples[i] == 32'h0, "silence after the last sample");
    for (int i = 0; i < 441 && i < codec.samples.size(); i++)
      check(codec.samples[i] == {16'(i * 3 + 1), 16'(16'hF000 - i)}, "sample value/order");
    check(codec.errors == 0, "no sample without a request");
    check(periods > 100 && period_bad == 0, "frame period 256 BIT_CLKs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
