// mp3_pkg: types and constants shared by the MP3 player hardware platform.
//
// The platform connects a 32-bit processor (not part of this RTL) to its
// peripherals through one simple memory-mapped bus.  A transfer is a request
// (bus_req_t) that the master holds stable until the addressed slave returns
// a one-cycle acknowledge (bus_rsp_t.ack).  The bus protocol itself is this
// design's own simplification of the processor local bus; the peripheral
// base addresses are those of the board's address map.
package mp3_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // ---- processor bus ------------------------------------------------------
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [3:0]  be;     // byte enables, bit i covers wdata[8i+7:8i]
    logic        wr;     // write request
    logic        rd;     // read request
  } bus_req_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        ack;    // one-cycle acknowledge, rdata valid with it
    logic        err;    // address decoded to no slave
  } bus_rsp_t;

  localparam bus_rsp_t BUS_RSP_IDLE = '{rdata: 32'h0, ack: 1'b0, err: 1'b0};

  // ---- address map (peripherals on the processor local bus) ---------------
  typedef enum logic [3:0] {
    SEL_TIMER     = 4'd0,   // xps_timer_0           0x2000_0000, 64K
    SEL_SRAM      = 4'd1,   // SRAM (EMC)            0x2010_0000, 1M
    SEL_VOL_DIAL  = 4'd2,   // Volume_Dial GPIO      0x4000_0000, 64K
    SEL_BUTTONS   = 4'd3,   // Push_Buttons_5Bit     0x8140_0000, 64K
    SEL_LED_POS   = 4'd4,   // LEDs_Positions        0x8142_0000, 64K
    SEL_LEDS      = 4'd5,   // LEDs_8Bit             0x8144_0000, 64K
    SEL_DIP       = 4'd6,   // DIP_Switches_8Bit     0x8146_0000, 64K
    SEL_INTC      = 4'd7,   // xps_intc_0            0x8180_0000, 64K
    SEL_SYSACE    = 4'd8,   // SysACE_CompactFlash   0x8360_0000, 64K
    SEL_DEBUG     = 4'd9,   // debug_module          0x8440_0000, 64K
    SEL_LCD       = 4'd10,  // lcd_ip_0              0xCF40_0000, 64K
    SEL_AC97      = 4'd11,  // AC97 via OPB bridge   0xFFFF_8000, 256
    SEL_NONE      = 4'd15   // unmapped
  } periph_sel_e;

  localparam int unsigned NUM_PERIPH = 12;

  // ---- AC97 controller register offsets and bits --------------------------
  localparam logic [7:0] AC97_OFS_IN_FIFO   = 8'h00;
  localparam logic [7:0] AC97_OFS_OUT_FIFO  = 8'h04;
  localparam logic [7:0] AC97_OFS_STATUS    = 8'h08;
  localparam logic [7:0] AC97_OFS_CONTROL   = 8'h0C;
  localparam logic [7:0] AC97_OFS_REG_ADDR  = 8'h10;
  localparam logic [7:0] AC97_OFS_REG_READ  = 8'h14;
  localparam logic [7:0] AC97_OFS_REG_WRITE = 8'h18;

  // status register bit positions
  localparam int ST_IN_FULL       = 0;
  localparam int ST_IN_HALF_FULL  = 1;
  localparam int ST_OUT_FULL      = 2;
  localparam int ST_OUT_EMPTY     = 3;
  localparam int ST_REG_DONE      = 4;
  localparam int ST_CODEC_RDY     = 5;
  localparam int ST_REG_BUSY      = 6;
  localparam int ST_IN_EMPTY      = 7;
  localparam int ST_IN_UNDERRUN   = 8;
  localparam int ST_IN_LEVEL_LSB  = 16;

  // control register bit positions
  localparam int CT_CLEAR_IN      = 0;
  localparam int CT_CLEAR_OUT     = 1;
  localparam int CT_IN_INTR_EN    = 2;
  localparam int CT_OUT_INTR_EN   = 3;
  localparam int CT_RESET_LINK    = 4;

  // ---- AC-link frame layout ----------------------------------------------
  localparam int unsigned AC_FRAME_BITS = 256;  // 16-bit tag + 12 slots of 20 bits

endpackage
