// tb_ac97_controller: self-checking test of the memory-mapped AC97
// controller with a behavioural codec on its AC-link.  A bus-master model
// runs the player's codec setup (codec reset, wait for codec ready, clear
// FIFO, DAC rate 44.1 kHz, volumes) and then writes one MP3 frame's worth of
// samples (1152) with the driver's rule: poll the FIFO-full bit, then write.
// Checks: register writes reach the codec, a register read returns the
// vendor ID, status bits (ready, busy, finished, full, half full, empty,
// underrun, level), the interrupt, FIFO clear, word decoding of Control, sample order and count, that
// the writer really was held off by a full FIFO, and the playback time
// (1152 samples at 44.1 kHz = 1254 frames of 48 kHz).
module tb_ac97_controller;
  timeunit 1ns;
  timeprecision 1ps;
  import mp3_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic sel;
  bus_req_t req = '0;
  bus_rsp_t rsp;
  logic irq;
  logic bit_clk, sync, sdata_out, sdata_in;

  int checks = 0, failures = 0;
  int full_polls = 0;

  always #4 clk = ~clk;
  assign sel = (req.addr[31:8] == 24'hFFFF80);

  ac97_controller dut (.*);
  ac97_codec_model codec (.bit_clk, .sync, .sdata_out, .sdata_in);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic bus_write(input logic [7:0] ofs, input logic [31:0] d);
    @(posedge clk);
    req <= '{addr: {24'hFFFF80, ofs}, wdata: d, be: 4'hF, wr: 1'b1, rd: 1'b0};
    do @(posedge clk); while (!rsp.ack);
    req.wr <= 1'b0;
  endtask

  task automatic bus_read(input logic [7:0] ofs, output logic [31:0] d);
    @(posedge clk);
    req <= '{addr: {24'hFFFF80, ofs}, wdata: '0, be: 4'hF, wr: 1'b0, rd: 1'b1};
    do @(posedge clk); while (!rsp.ack);
    d = rsp.rdata;
    req.rd <= 1'b0;
  endtask

  task automatic codec_write(input logic [6:0] r, input logic [15:0] v);
    logic [31:0] st;
    bus_write(AC97_OFS_REG_WRITE, 32'(v));
    bus_write(AC97_OFS_REG_ADDR, 32'(r));
    bus_read(AC97_OFS_STATUS, st);
    check(st[ST_REG_BUSY] && !st[ST_REG_DONE], "busy right after RegAddr write");
    do bus_read(AC97_OFS_STATUS, st); while (st[ST_REG_BUSY]);
    check(st[ST_REG_DONE], "access finished");
  endtask

  function automatic logic [31:0] sample(input int i);
    return {16'(i * 7 + 3), 16'(16'h8000 ^ i)};
  endfunction

  initial begin
    logic [31:0] st, d;
    int f0, frames_used;
    repeat (10) @(posedge clk);
    rst <= 1'b0;
    bus_read(AC97_OFS_STATUS, st);
    check(st[ST_IN_EMPTY] && !st[ST_IN_FULL] && st[ST_OUT_EMPTY], "status after reset");
    // codec setup as the player does it
    codec_write(7'h00, 16'h0000);                        // codec reset register
    do bus_read(AC97_OFS_STATUS, st); while (!st[ST_CODEC_RDY]);
    check(1'b1, "codec ready");
    bus_write(AC97_OFS_CONTROL, 32'h3);                  // clear FIFOs
    codec_write(7'h2C, 16'd44100);                       // DAC rate
    codec_write(7'h02, 16'h0000);                        // master volume max
    codec_write(7'h04, 16'h0000);                        // headphone volume max
    codec_write(7'h18, 16'h0000);                        // PCM out volume max
    codec_write(7'h0A, 16'h8000);                        // PC beep mute
    codec_write(7'h26, 16'h0100);                        // power-down register
    check(codec.regs[7'h2C >> 1] == 16'd44100, "DAC rate in codec");
    check(codec.regs[7'h0A >> 1] == 16'h8000, "mute in codec");
    check(codec.regs[7'h26 >> 1] == 16'h0100, "power-down reg in codec");
    check(codec.reg_writes == 7, "seven codec writes");
    // register read: vendor ID
    bus_write(AC97_OFS_REG_ADDR, 32'h80 | 32'h7C);
    do bus_read(AC97_OFS_STATUS, st); while (st[ST_REG_BUSY]);
    bus_read(AC97_OFS_REG_READ, d);
    check(d[15:0] == 16'h4144, "vendor ID read");
    // underrun: the codec asks for samples while the FIFO is empty
    repeat (6000) @(posedge clk);
    bus_read(AC97_OFS_STATUS, st);
    check(st[ST_IN_UNDERRUN], "underrun flagged");
    check(irq == 1'b0, "no interrupt while disabled");
    bus_write(8'h0E, 32'h1 | 32'h4);                     // clear, enable interrupt (byte lane 2 of Control)
    bus_read(AC97_OFS_STATUS, st);
    check(!st[ST_IN_UNDERRUN], "underrun cleared");
    check(irq == 1'b1, "interrupt when below half full");
    // FIFO clear drops queued samples
    for (int i = 0; i < 5; i++) bus_write(AC97_OFS_IN_FIFO, 32'hDEAD0000 | 32'(i));
    bus_read(AC97_OFS_STATUS, st);
    check(st[ST_IN_LEVEL_LSB +: 5] >= 5'd3 && !st[ST_IN_EMPTY], "level counts writes");
    bus_write(AC97_OFS_CONTROL, 32'h1 | 32'h4);
    bus_read(AC97_OFS_STATUS, st);
    check(st[ST_IN_EMPTY] && st[ST_IN_LEVEL_LSB +: 5] == 5'd0, "clear empties FIFO");
    // let in-flight silence/cleared frames pass, then start counting
    repeat (6000) @(posedge clk);
    codec.samples.delete();
    codec.errors = 0;
    // one MP3 frame: 1152 samples
    f0 = codec.frames;
    for (int i = 0; i < 1152; i++) begin
      do begin
        bus_read(AC97_OFS_STATUS, st);
        if (st[ST_IN_FULL]) full_polls++;
      end while (st[ST_IN_FULL]);
      bus_write(AC97_OFS_IN_FIFO, sample(i));
      if (i > 20) check(irq == 1'b0, "interrupt off while above half full");
    end
    do bus_read(AC97_OFS_STATUS, st); while (!st[ST_IN_EMPTY]);
    frames_used = codec.frames - f0;
    repeat (6000) @(posedge clk);
    while (codec.samples.size() > 0 && codec.samples[0] == 32'h0) void'(codec.samples.pop_front());
    check(codec.samples.size() >= 1152, "all samples played");
    for (int i = 0; i < 1152 && i < codec.samples.size(); i++)
      check(codec.samples[i] == sample(i), "sample order and value");
    check(codec.errors == 0, "samples only on request");
    check(full_polls > 100, "writer held off by a full FIFO");
    // 1152 samples, 16 of them already queued when the last one is written
    check(frames_used >= 1240 && frames_used <= 1260, "playback time at 44.1 kHz");
    $display("full polls %0d frames %0d", full_polls, frames_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
