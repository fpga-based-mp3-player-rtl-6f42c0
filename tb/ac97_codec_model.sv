// ac97_codec_model: behavioural model of the AD1981B codec's AC-link side,
// for testbenches only.
//
// Generates BIT_CLK (12.288 MHz), finds frames by the rising edge of SYNC
// (sampled on BIT_CLK falling edges, like the real codec), decodes the
// controller's tag and slots 1-4, and answers on SDATA_IN.  It keeps a
// 64-entry register file (vendor ID 0x4144/0x5374 at 0x7C/0x7E), answers
// register reads in the following frame, reports codec-ready after
// READY_FRAMES frames, and requests PCM samples through the slot-3 request
// bit at the rate held in its DAC-rate register 0x2C (48 kHz after reset),
// using a phase accumulator over the 48 kHz frame rate.  Samples received in
// slots 3/4 are appended to the queue `samples` ({left, right}); counters
// record register writes, reads and protocol errors (a sample in a frame
// that did not follow a request).
module ac97_codec_model #(
  parameter int unsigned READY_FRAMES = 4
) (
  output logic bit_clk,
  input  logic sync,
  input  logic sdata_out,
  output logic sdata_in
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [15:0] regs [64];
  logic [31:0] samples [$];
  int          frames, reg_writes, reg_reads, errors, requests;
  int          rate_acc;

  logic        sync_q;
  int          rx_pos;
  logic [255:0] rx_frame, tx_frame, tx_shift;
  logic        req_now, req_prev;
  logic        rd_pending;
  logic [6:0]  rd_addr;
  int          tx_pos;

  initial begin
    bit_clk = 1'b0;
    forever #(40.690) bit_clk = ~bit_clk;
  end

  initial begin
    foreach (regs[i]) regs[i] = 16'h0;
    regs[7'h7C >> 1] = 16'h4144;
    regs[7'h7E >> 1] = 16'h5374;
    regs[7'h2C >> 1] = 16'd48000;
    frames = 0; reg_writes = 0; reg_reads = 0; errors = 0; requests = 0;
    rate_acc = 0;
    sync_q = 1'b0; rx_pos = 300; rx_frame = '0; tx_frame = '0; tx_shift = '0;
    req_now = 1'b0; req_prev = 1'b0; rd_pending = 1'b0; rd_addr = '0;
    tx_pos = 300;
    sdata_in = 1'b0;
  end

  function automatic logic [255:0] build_frame();
    logic [15:0] tag;
    logic [19:0] s1, s2;
    tag = '0; s1 = '0; s2 = '0;
    tag[15] = (frames >= READY_FRAMES);
    if (rd_pending) begin
      tag[14] = 1'b1;
      tag[13] = 1'b1;
      s1[18:12] = rd_addr;
      s2 = {regs[rd_addr >> 1], 4'h0};
    end
    // sample request for the next frame, active low
    s1[11] = !req_now;
    s1[10] = !req_now;
    return {tag, s1, s2, 200'h0};
  endfunction

  task automatic process_rx(input logic [255:0] f);
    logic [19:0] s1, s2, s3, s4;
    s1 = f[239:220]; s2 = f[219:200]; s3 = f[199:180]; s4 = f[179:160];
    if (f[255] && f[254]) begin
      if (s1[19]) begin
        rd_pending <= 1'b1;
        rd_addr    <= s1[18:12];
        reg_reads++;
      end else if (f[253]) begin
        regs[s1[18:12] >> 1] = s2[19:4];
        reg_writes++;
      end
    end
    if (f[255] && f[252]) begin
      if (!req_prev) errors++;
      samples.push_back({s3[19:4], s4[19:4]});
    end
  endtask

  // falling edge: sample SYNC and SDATA_OUT.  The controller's last bit of
  // a frame coincides with the rise of SYNC, so capture comes first.
  always @(negedge bit_clk) begin
    sync_q <= sync;
    if (rx_pos < 256) begin
      rx_frame <= {rx_frame[254:0], sdata_out};
      if (rx_pos == 255) begin
        process_rx({rx_frame[254:0], sdata_out});
        frames++;
      end
    end
    if (sync && !sync_q) begin
      rx_pos <= 0;
      // frame boundary: decide the request carried in the frame we now send
      req_prev <= req_now;
      rate_acc += int'(regs[7'h2C >> 1]);
      if (frames >= READY_FRAMES && rate_acc >= 48000) begin
        rate_acc -= 48000;
        req_now  <= 1'b1;
        requests++;
      end else begin
        if (rate_acc >= 48000) rate_acc -= 48000;
        req_now <= 1'b0;
      end
      tx_pos <= 0;
    end else if (rx_pos < 256) begin
      rx_pos <= rx_pos + 1;
    end
  end

  // rising edge: drive SDATA_IN
  always @(posedge bit_clk) begin
    if (tx_pos == 0) begin
      tx_frame = build_frame();
      if (rd_pending) rd_pending <= 1'b0;
      sdata_in <= tx_frame[255];
      tx_shift <= {tx_frame[254:0], 1'b0};
      tx_pos   <= 1;
    end else if (tx_pos < 256) begin
      sdata_in <= tx_shift[255];
      tx_shift <= {tx_shift[254:0], 1'b0};
      tx_pos   <= tx_pos + 1;
    end else begin
      sdata_in <= 1'b0;
    end
  end

endmodule
