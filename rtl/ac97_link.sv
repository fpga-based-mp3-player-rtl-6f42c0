// ac97_link: AC-link frame engine of the AC97 controller.
//
// The AD1981B codec supplies BIT_CLK (12.288 MHz) and exchanges one 256-bit
// frame per 48 kHz period with the controller: a 16-bit tag slot followed by
// twelve 20-bit slots, most significant bit first.  The controller drives
// SYNC and SDATA_OUT on BIT_CLK rising edges and samples SDATA_IN on falling
// edges.  Only the tag and slots 1-4 are used: slot 1/2 carry the codec
// register command address/data, slots 3/4 the left/right PCM sample.  The
// AC-link framing follows the AC'97 specification; nothing of it is printed
// in the source material, which only names the four link pins.
//
// How it works: BIT_CLK is not used as a clock.  It is brought into the bus
// clock domain (125 MHz, about ten samples per BIT_CLK period) through a
// two-flop synchroniser, and its rising and falling edges become enables.  A
// bit counter gives the position in the frame.  At the start of every frame
// the outgoing frame is assembled into a shift register from the pending
// register command and, if the codec asked for a sample in the previous input
// frame (input slot 1 bit 11 low), the sample at the head of the FIFO.
// SYNC is high for 16 bit times, starting one bit before the tag, so that the
// codec sees it on a falling edge before the first tag bit.  When the last
// bit of an input frame has been sampled the input tag and slots 1/2 are
// decoded: codec-ready, register read data, and the next sample request.
//
// Interface (all in the clk domain except the four link pins):
//   cmd_valid/cmd_read/cmd_addr/cmd_data  register command, held until cmd_taken
//   cmd_taken   one-cycle pulse when a frame carrying the command starts
//   pcm_valid/pcm_data  head of the sample FIFO (left in [31:16], right in [15:0])
//   pcm_pop     one-cycle pulse: the head sample was put into a frame
//   pcm_underrun  one-cycle pulse: a sample was requested but none was ready
//   rd_valid/rd_addr/rd_data  register read data returned by the codec
//   codec_ready  tag bit 15 of the last input frame
//   frame_start  one-cycle pulse at the first bit of each output frame
module ac97_link
  import mp3_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // AC-link pins
  input  logic        bit_clk,
  output logic        sync,
  output logic        sdata_out,
  input  logic        sdata_in,
  // register command
  input  logic        cmd_valid,
  input  logic        cmd_read,
  input  logic [6:0]  cmd_addr,
  input  logic [15:0] cmd_data,
  output logic        cmd_taken,
  // playback samples
  input  logic        pcm_valid,
  input  logic [31:0] pcm_data,
  output logic        pcm_pop,
  output logic        pcm_underrun,
  // codec status
  output logic        rd_valid,
  output logic [6:0]  rd_addr,
  output logic [15:0] rd_data,
  output logic        codec_ready,
  output logic        frame_start
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned LAST_BIT = AC_FRAME_BITS - 1;

  // ---- BIT_CLK edge detection --------------------------------------------
  logic [2:0] bc_sync;
  logic       bc_rise, bc_fall;
  always_ff @(posedge clk) begin
    if (rst) bc_sync <= '0;
    else     bc_sync <= {bc_sync[1:0], bit_clk};
  end
  assign bc_rise =  bc_sync[1] && !bc_sync[2];
  assign bc_fall = !bc_sync[1] &&  bc_sync[2];

  // ---- output frame ---------------------------------------------------------
  logic [7:0]   bitcnt;       // position of the bit now on SDATA_OUT
  logic [7:0]   next_bit;
  logic [255:0] tx_shift;
  logic [255:0] tx_frame;
  logic         sample_req;   // codec asked for a sample in the last input frame
  logic         send_pcm;

  assign next_bit = bitcnt + 8'd1;    // wraps 255 -> 0
  assign send_pcm = sample_req;

  always_comb begin
    logic [15:0] tag;
    logic [19:0] slot1, slot2, slot3, slot4;
    tag   = '0;
    tag[15] = 1'b1;                            // frame valid
    tag[14] = cmd_valid;                       // slot 1 (command address) valid
    tag[13] = cmd_valid && !cmd_read;          // slot 2 (command data) valid
    tag[12] = send_pcm;                        // slot 3 (PCM left) valid
    tag[11] = send_pcm;                        // slot 4 (PCM right) valid
    slot1 = cmd_valid ? {cmd_read, cmd_addr, 12'h000} : 20'h0;
    slot2 = (cmd_valid && !cmd_read) ? {cmd_data, 4'h0} : 20'h0;
    slot3 = (send_pcm && pcm_valid) ? {pcm_data[31:16], 4'h0} : 20'h0;
    slot4 = (send_pcm && pcm_valid) ? {pcm_data[15:0],  4'h0} : 20'h0;
    tx_frame = {tag, slot1, slot2, slot3, slot4, 160'h0};
  end

  logic frame_go;
  assign frame_go = bc_rise && (next_bit == 8'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      bitcnt    <= 8'(LAST_BIT - 1);
      tx_shift  <= '0;
      sync      <= 1'b0;
      sdata_out <= 1'b0;
    end else if (bc_rise) begin
      bitcnt <= next_bit;
      // SYNC covers bit 255 of the previous frame and bits 0..14 of this one
      sync   <= (next_bit == 8'(LAST_BIT)) || (next_bit < 8'd15);
      if (next_bit == 8'd0) begin
        tx_shift  <= {tx_frame[254:0], 1'b0};
        sdata_out <= tx_frame[255];
      end else begin
        tx_shift  <= {tx_shift[254:0], 1'b0};
        sdata_out <= tx_shift[255];
      end
    end
  end

  assign frame_start  = frame_go;
  assign cmd_taken    = frame_go && cmd_valid;
  assign pcm_pop      = frame_go && send_pcm && pcm_valid;
  assign pcm_underrun = frame_go && send_pcm && !pcm_valid;

  // ---- input frame ----------------------------------------------------------
  logic [254:0] rx_shift;
  logic [255:0] rx_frame;
  logic         rx_done;
  logic [1:0]   sd_sync;      // SDATA_IN delayed like BIT_CLK, so both line up
  assign rx_frame = {rx_shift, sd_sync[1]};
  assign rx_done  = bc_fall && (bitcnt == 8'(LAST_BIT));

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_shift    <= '0;
      sd_sync     <= '0;
      codec_ready <= 1'b0;
      sample_req  <= 1'b0;
      rd_valid    <= 1'b0;
      rd_addr     <= '0;
      rd_data     <= '0;
    end else begin
      rd_valid <= 1'b0;
      sd_sync  <= {sd_sync[0], sdata_in};
      if (bc_fall) rx_shift <= rx_frame[254:0];
      if (rx_done) begin
        codec_ready <= rx_frame[255];
        // slot 1 bit 11 is the slot-3 request, active low; valid only in a
        // frame the codec marks ready
        sample_req  <= rx_frame[255] && !rx_frame[239 - 8];
        if (rx_frame[255] && rx_frame[254] && rx_frame[253]) begin
          rd_valid <= 1'b1;
          rd_addr  <= rx_frame[238:232];
          rd_data  <= rx_frame[219:204];
        end
      end
    end
  end

endmodule
