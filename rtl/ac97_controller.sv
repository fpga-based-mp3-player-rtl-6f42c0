// ac97_controller: memory-mapped AC97 audio controller for the AD1981B codec.
//
// The processor plays audio by writing stereo PCM words into the playback
// FIFO (In_FIFO, 16 deep) after checking that the FIFO is not full, and it
// sets up the codec (reset, DAC sample rate, volumes) through codec register
// writes.  The register map, the status and control bit assignments and the
// FIFO depth follow the driver of the original player; the bus protocol, the
// AC-link engine and the bits the driver names but never defines (FIFO empty,
// underrun, level) are this design's own.  The record path is not built: the
// player configures the controller without recording, so Out_FIFO reads as 0
// and its status reads empty.
//
// Registers (byte offsets from the base address 0xFFFF_8000):
//   0x00 In_FIFO    W  push one sample: left in [31:16], right in [15:0]
//   0x04 Out_FIFO   R  record data (always 0, no record path)
//   0x08 Status     R  0 InFIFO full, 1 InFIFO half full, 2 OutFIFO full (0),
//                      3 OutFIFO empty (1), 4 register access finished,
//                      5 codec ready, 6 register access busy, 7 InFIFO empty,
//                      8 InFIFO underrun (sticky), [20:16] InFIFO level
//   0x0C Control    W  0 clear InFIFO (and underrun), 1 clear OutFIFO,
//                      2 InFIFO interrupt enable, 3 OutFIFO interrupt enable,
//                      4 hold the AC-link in reset
//   0x10 RegAddr    W  [6:0] codec register, [7] 1 = read; starts the access
//   0x14 RegRead    R  [15:0] data of the last codec register read
//   0x18 RegWrite   W  [15:0] data for the next codec register write
//
// How it works: a write to RegAddr raises the busy bit and offers the command
// to the AC-link engine, which puts it into the next output frame.  A write
// is finished once that frame has been sent; a read is finished when the codec
// returns the same register index in an input frame, and the data is then in
// RegRead.  The engine pops one sample for every frame in which the codec
// requested one, so the FIFO drains at the codec's DAC rate (44.1 kHz for
// typical MP3 files) while the processor refills it.  A write into a full
// FIFO is acknowledged and dropped, never stalled: the driver's FIFO clear
// writes 512 zeros without polling the full bit.
//
// Registers are decoded by word: address bits [1:0] are ignored, so the
// driver's control writes at offsets 0xC, 0xE or 0xF all reach Control.
//
// Timing: bus accesses are acknowledged one clock after the request; the
// interrupt (if enabled) is high while the FIFO is less than half full.
module ac97_controller
  import mp3_pkg::*;
#(
  parameter int unsigned IN_FIFO_DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst,
  // processor bus
  input  logic     sel,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output logic     irq,
  // AC-link pins
  input  logic     bit_clk,
  output logic     sync,
  output logic     sdata_out,
  input  logic     sdata_in
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned LW = $clog2(IN_FIFO_DEPTH) + 1;

  // ---- bus access ------------------------------------------------------------
  logic       access, do_wr;
  logic [7:0] ofs;
  assign access = sel && (req.wr || req.rd) && !rsp.ack;
  assign do_wr  = access && req.wr;
  assign ofs    = {req.addr[7:2], 2'b00};   // word registers: byte lanes ignored

  // ---- registers ---------------------------------------------------------------
  logic        in_intr_en, out_intr_en, link_hold;
  logic [15:0] reg_wdata, reg_rdata;
  logic        cmd_pending, cmd_read, cmd_sent, reg_done;
  logic [6:0]  cmd_addr;
  logic        underrun;

  // ---- playback FIFO -----------------------------------------------------------
  logic          fifo_clear, fifo_full, fifo_half, fifo_empty, fifo_pop;
  logic [31:0]   fifo_rdata;
  logic [LW-1:0] fifo_level;
  assign fifo_clear = do_wr && (ofs == AC97_OFS_CONTROL) && req.wdata[CT_CLEAR_IN];

  sample_fifo #(.WIDTH(32), .DEPTH(IN_FIFO_DEPTH)) u_in_fifo (
    .clk, .rst,
    .clear     (fifo_clear),
    .push      (do_wr && (ofs == AC97_OFS_IN_FIFO)),
    .wdata     (req.wdata),
    .pop       (fifo_pop),
    .rdata     (fifo_rdata),
    .full      (fifo_full),
    .half_full (fifo_half),
    .empty     (fifo_empty),
    .level     (fifo_level)
  );

  // ---- AC-link engine ------------------------------------------------------------
  logic        cmd_taken, underrun_p, rd_valid, codec_ready, frame_start;
  logic [6:0]  rd_addr;
  logic [15:0] rd_data;

  ac97_link u_link (
    .clk,
    .rst          (rst || link_hold),
    .bit_clk, .sync, .sdata_out, .sdata_in,
    .cmd_valid    (cmd_pending && !cmd_sent),
    .cmd_read,
    .cmd_addr,
    .cmd_data     (reg_wdata),
    .cmd_taken,
    .pcm_valid    (!fifo_empty),
    .pcm_data     (fifo_rdata),
    .pcm_pop      (fifo_pop),
    .pcm_underrun (underrun_p),
    .rd_valid, .rd_addr, .rd_data,
    .codec_ready,
    .frame_start
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      in_intr_en  <= 1'b0;
      out_intr_en <= 1'b0;
      link_hold   <= 1'b0;
      reg_wdata   <= '0;
      reg_rdata   <= '0;
      cmd_pending <= 1'b0;
      cmd_read    <= 1'b0;
      cmd_sent    <= 1'b0;
      cmd_addr    <= '0;
      reg_done    <= 1'b0;
      underrun    <= 1'b0;
    end else begin
      if (underrun_p) underrun <= 1'b1;
      // register command progress
      if (cmd_pending && !cmd_sent && cmd_taken) cmd_sent <= 1'b1;
      // a write is finished once the frame carrying it has been shifted out
      if (cmd_pending && !cmd_read && cmd_sent && frame_start) begin
        cmd_pending <= 1'b0;
        reg_done    <= 1'b1;
      end
      if (cmd_pending && cmd_read && cmd_sent && rd_valid && rd_addr == cmd_addr) begin
        reg_rdata   <= rd_data;
        cmd_pending <= 1'b0;
        reg_done    <= 1'b1;
      end
      if (do_wr) begin
        unique case (ofs)
          AC97_OFS_CONTROL: begin
            in_intr_en  <= req.wdata[CT_IN_INTR_EN];
            out_intr_en <= req.wdata[CT_OUT_INTR_EN];
            link_hold   <= req.wdata[CT_RESET_LINK];
            if (req.wdata[CT_CLEAR_IN]) underrun <= 1'b0;
            if (req.wdata[CT_RESET_LINK]) begin
              cmd_pending <= 1'b0;
              cmd_sent    <= 1'b0;
            end
          end
          AC97_OFS_REG_ADDR: begin
            cmd_pending <= 1'b1;
            cmd_sent    <= 1'b0;
            cmd_read    <= req.wdata[7];
            cmd_addr    <= req.wdata[6:0];
            reg_done    <= 1'b0;
          end
          AC97_OFS_REG_WRITE: reg_wdata <= req.wdata[15:0];
          default: ;
        endcase
      end
    end
  end

  // ---- read data and acknowledge -------------------------------------------------
  logic [31:0] status;
  always_comb begin
    status = '0;
    status[ST_IN_FULL]      = fifo_full;
    status[ST_IN_HALF_FULL] = fifo_half;
    status[ST_OUT_FULL]     = 1'b0;
    status[ST_OUT_EMPTY]    = 1'b1;
    status[ST_REG_DONE]     = reg_done;
    status[ST_CODEC_RDY]    = codec_ready;
    status[ST_REG_BUSY]     = cmd_pending;
    status[ST_IN_EMPTY]     = fifo_empty;
    status[ST_IN_UNDERRUN]  = underrun;
    status[ST_IN_LEVEL_LSB +: LW] = fifo_level;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rsp <= BUS_RSP_IDLE;
    end else begin
      rsp.ack   <= access;
      rsp.err   <= 1'b0;
      rsp.rdata <= '0;
      if (access && req.rd) begin
        unique case (ofs)
          AC97_OFS_STATUS:   rsp.rdata <= status;
          AC97_OFS_REG_READ: rsp.rdata <= {16'h0, reg_rdata};
          default:           rsp.rdata <= '0;
        endcase
      end
    end
  end

  // playback interrupt: room for at least half a FIFO of samples
  assign irq = in_intr_en && !fifo_half;

  // out_intr_en has no source without a record path
  logic unused;
  assign unused = out_intr_en;

endmodule
