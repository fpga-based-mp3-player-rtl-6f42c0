// tb_ac97_rates: plays stereo PCM through the AC97 controller at the three
// MP3 sampling frequencies, 48 kHz, 44.1 kHz and 32 kHz, with the codec's
// DAC rate register set to each in turn.  The AC-link frame rate stays at
// 48 kHz; the codec asks for a sample in rate/48000 of the frames.  For
// each rate the bus master keeps the FIFO full, and the test measures the
// samples taken per frame over a 300-sample window (expected 1.000, 0.919
// and 0.667, within 1%) and checks every sample's order and value.
module tb_ac97_rates;
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
  int stalls = 0;

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
    do bus_read(AC97_OFS_STATUS, st); while (st[ST_REG_BUSY]);
    check(st[ST_REG_DONE], "register write finished");
  endtask

  function automatic logic [31:0] sample(input int r, input int i);
    return {16'(r * 1000 + i + 1), 16'(16'h4000 + i)};
  endfunction

  localparam int N = 400;
  int rates [3] = '{48000, 44100, 32000};

  initial begin
    logic [31:0] st;
    int f_a, f_b, s_a, s_b, nz;
    real ratio, want;
    repeat (10) @(posedge clk);
    rst <= 1'b0;
    codec_write(7'h00, 16'h0000);
    do bus_read(AC97_OFS_STATUS, st); while (!st[ST_CODEC_RDY]);
    for (int r = 0; r < 3; r++) begin
      codec_write(7'h2C, 16'(rates[r]));
      check(codec.regs[7'h2C >> 1] == 16'(rates[r]), "rate register in codec");
      bus_write(AC97_OFS_CONTROL, 32'h1);
      repeat (6000) @(posedge clk);
      codec.samples.delete();
      f_a = 0; f_b = 0; s_a = 0; s_b = 0;
      for (int i = 0; i < N; i++) begin
        do begin
          bus_read(AC97_OFS_STATUS, st);
          if (st[ST_IN_FULL]) stalls++;
        end while (st[ST_IN_FULL]);
        bus_write(AC97_OFS_IN_FIFO, sample(r, i));
        if (i == 50)  begin f_a = codec.frames; s_a = codec.samples.size(); end
        if (i == 350) begin f_b = codec.frames; s_b = codec.samples.size(); end
      end
      do bus_read(AC97_OFS_STATUS, st); while (!st[ST_IN_EMPTY]);
      repeat (6000) @(posedge clk);
      ratio = real'(s_b - s_a) / real'(f_b - f_a);
      want  = real'(rates[r]) / 48000.0;
      check(ratio > want * 0.99 && ratio < want * 1.01,
            $sformatf("%0d Hz: %f samples per frame, expected %f", rates[r], ratio, want));
      $display("%0d Hz: %0d samples in %0d frames (%f per frame)", rates[r], s_b - s_a, f_b - f_a, ratio);
      nz = 0;
      for (int k = 0; k < codec.samples.size(); k++)
        if (codec.samples[k] != 32'h0) begin
          if (nz < N) check(codec.samples[k] == sample(r, nz), "sample order and value");
          nz++;
        end
      check(nz == N, $sformatf("%0d Hz: %0d of %0d samples played", rates[r], nz, N));
    end
    check(stalls > 0, "writer held off by a full FIFO");
    check(codec.errors == 0, "samples only in requested frames");
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
