// mp3_player_top: hardware platform of the FPGA MP3 player.
//
// The player decodes MP3 files in software on a 32-bit soft processor; the
// hardware around it reads the user's buttons, switches and volume dial,
// shows the song on a 2x16 LCD and plays the decoded 16-bit PCM samples
// through the AC97 codec.  This top module holds everything of that platform
// that is logic designed for it: the clock generator (a simulation model of
// the PLL), the reset sequencer, the 64 KB local-memory BRAM, the peripheral
// bus address decoder, five GPIO ports, the LCD controller and the AC97
// controller with its 16-sample playback FIFO.  The processor, the DDR2 and
// SRAM memory controllers, the CompactFlash controller, the UART, the debug
// module, the timer and the interrupt controller are library cores; their
// connections are brought out as ports: the processor drives plb_req and
// the local-memory ports, and the other bus slaves answer on ext_rsp when
// their bit of ext_sel is set.
//
// Clocks: sys_clk (100 MHz) feeds the PLL; clk_sys (125 MHz) clocks the bus
// and every block here; clk_sys_90, clk_200 and clk_62_5 go to the memory
// controller.  The AC-link BIT_CLK from the codec is sampled in the clk_sys
// domain.  Resets: sys_rst_n (active low), the debug reset and PLL lock feed
// the reset sequencer; its inverted peripheral reset drives the codec's
// reset pin (audio_reset_n).
//
// Bus timing: a request on plb_req is held until plb_rsp.ack; the built
// slaves acknowledge one cycle after the request, an unmapped address gets
// ack with err one cycle after the request, and external slaves acknowledge
// whenever they are ready.
module mp3_player_top
  import mp3_pkg::*;
(
  // board clock and reset
  input  logic                  sys_clk,
  input  logic                  sys_rst_n,
  input  logic                  mb_debug_sys_rst,
  // generated clocks and resets for the processor and memory controller
  output logic                  clk_sys,
  output logic                  clk_sys_90,
  output logic                  clk_200,
  output logic                  clk_62_5,
  output logic                  pll_locked,
  output logic                  mb_reset,
  output logic                  bus_struct_reset,
  // processor peripheral bus
  input  bus_req_t              plb_req,
  output bus_rsp_t              plb_rsp,
  // bus slaves outside this RTL (timer, SRAM, intc, SysACE, debug)
  output logic [NUM_PERIPH-1:0] ext_sel,
  input  bus_rsp_t              ext_rsp,
  // processor local memory buses
  input  logic                  ilmb_en,
  input  logic [3:0]            ilmb_we,
  input  logic [31:0]           ilmb_addr,
  input  logic [31:0]           ilmb_wdata,
  output logic [31:0]           ilmb_rdata,
  input  logic                  dlmb_en,
  input  logic [3:0]            dlmb_we,
  input  logic [31:0]           dlmb_addr,
  input  logic [31:0]           dlmb_wdata,
  output logic [31:0]           dlmb_rdata,
  // GPIO pads (o drives the pad where t is 0)
  input  logic [7:0]            leds_i,
  output logic [7:0]            leds_o,
  output logic [7:0]            leds_t,
  input  logic [4:0]            led_pos_i,
  output logic [4:0]            led_pos_o,
  output logic [4:0]            led_pos_t,
  input  logic [4:0]            buttons_i,
  input  logic [7:0]            dip_i,
  input  logic [2:0]            vol_dial_i,
  output logic [2:0]            vol_dial_o,
  output logic [2:0]            vol_dial_t,
  // interrupt requests, for an interrupt controller
  output logic                  vol_dial_irq,
  output logic                  ac97_irq,
  // character LCD
  output logic [6:0]            lcd,
  // AC97 codec
  input  logic                  ac97_bit_clk,
  output logic                  ac97_sync,
  output logic                  ac97_sdata_out,
  input  logic                  ac97_sdata_in,
  output logic                  audio_reset_n
);
  timeunit 1ns;
  timeprecision 1ps;

  // ---- clocks and resets -----------------------------------------------------
  logic periph_rst, periph_rst_n;

  clock_generator u_clkgen (
    .clkin   (sys_clk),
    .rst     (1'b0),
    .clkout0 (clk_sys_90),
    .clkout1 (clk_sys),
    .clkout2 (clk_200),
    .clkout3 (clk_62_5),
    .locked  (pll_locked)
  );

  proc_sys_reset u_reset (
    .slowest_sync_clk   (clk_sys),
    .ext_reset_in       (sys_rst_n),
    .mb_debug_sys_rst,
    .dcm_locked         (pll_locked),
    .mb_reset,
    .bus_struct_reset,
    .peripheral_reset   (periph_rst),
    .peripheral_reset_n (periph_rst_n)
  );
  assign audio_reset_n = periph_rst_n;

  // ---- local memory --------------------------------------------------------------
  lmb_bram u_lmb_bram (
    .clk     (clk_sys),
    .a_en    (ilmb_en),   .a_we (ilmb_we), .a_addr (ilmb_addr),
    .a_wdata (ilmb_wdata), .a_rdata (ilmb_rdata),
    .b_en    (dlmb_en),   .b_we (dlmb_we), .b_addr (dlmb_addr),
    .b_wdata (dlmb_wdata), .b_rdata (dlmb_rdata)
  );

  // ---- address decode -------------------------------------------------------------
  periph_sel_e           sel;
  logic [NUM_PERIPH-1:0] sel_vec;
  logic                  hit;

  plb_addr_decoder u_dec (
    .addr    (plb_req.addr),
    .sel,
    .sel_vec,
    .hit
  );

  // slaves built here; the rest are external
  localparam logic [NUM_PERIPH-1:0] INTERNAL =
      (NUM_PERIPH'(1) << SEL_VOL_DIAL) | (NUM_PERIPH'(1) << SEL_BUTTONS) |
      (NUM_PERIPH'(1) << SEL_LED_POS)  | (NUM_PERIPH'(1) << SEL_LEDS)    |
      (NUM_PERIPH'(1) << SEL_DIP)      | (NUM_PERIPH'(1) << SEL_LCD)     |
      (NUM_PERIPH'(1) << SEL_AC97);

  logic bus_req_active;
  assign bus_req_active = plb_req.wr || plb_req.rd;
  assign ext_sel = (bus_req_active ? sel_vec : '0) & ~INTERNAL;

  // ---- peripherals --------------------------------------------------------------------
  bus_rsp_t rsp_leds, rsp_led_pos, rsp_buttons, rsp_dip, rsp_vol, rsp_lcd, rsp_ac97;
  logic     unused_irq_leds, unused_irq_pos, unused_irq_btn, unused_irq_dip;
  logic [4:0] unused_btn_o, unused_btn_t;
  logic [7:0] unused_dip_o, unused_dip_t;

  gpio #(.WIDTH(8), .ALL_INPUTS(1'b0), .INTERRUPT_PRESENT(1'b0)) u_leds (
    .clk (clk_sys), .rst (periph_rst), .sel (sel == SEL_LEDS), .req (plb_req),
    .rsp (rsp_leds), .irq (unused_irq_leds),
    .gpio_i (leds_i), .gpio_o (leds_o), .gpio_t (leds_t)
  );

  gpio #(.WIDTH(5), .ALL_INPUTS(1'b0), .INTERRUPT_PRESENT(1'b0)) u_led_pos (
    .clk (clk_sys), .rst (periph_rst), .sel (sel == SEL_LED_POS), .req (plb_req),
    .rsp (rsp_led_pos), .irq (unused_irq_pos),
    .gpio_i (led_pos_i), .gpio_o (led_pos_o), .gpio_t (led_pos_t)
  );

  gpio #(.WIDTH(5), .ALL_INPUTS(1'b1), .INTERRUPT_PRESENT(1'b0)) u_buttons (
    .clk (clk_sys), .rst (periph_rst), .sel (sel == SEL_BUTTONS), .req (plb_req),
    .rsp (rsp_buttons), .irq (unused_irq_btn),
    .gpio_i (buttons_i), .gpio_o (unused_btn_o), .gpio_t (unused_btn_t)
  );

  gpio #(.WIDTH(8), .ALL_INPUTS(1'b1), .INTERRUPT_PRESENT(1'b0)) u_dip (
    .clk (clk_sys), .rst (periph_rst), .sel (sel == SEL_DIP), .req (plb_req),
    .rsp (rsp_dip), .irq (unused_irq_dip),
    .gpio_i (dip_i), .gpio_o (unused_dip_o), .gpio_t (unused_dip_t)
  );

  gpio #(.WIDTH(3), .ALL_INPUTS(1'b0), .INTERRUPT_PRESENT(1'b1)) u_vol_dial (
    .clk (clk_sys), .rst (periph_rst), .sel (sel == SEL_VOL_DIAL), .req (plb_req),
    .rsp (rsp_vol), .irq (vol_dial_irq),
    .gpio_i (vol_dial_i), .gpio_o (vol_dial_o), .gpio_t (vol_dial_t)
  );

  lcd_controller u_lcd (
    .clk (clk_sys), .rst (periph_rst), .sel (sel == SEL_LCD), .req (plb_req),
    .rsp (rsp_lcd), .lcd
  );

  ac97_controller u_ac97 (
    .clk (clk_sys), .rst (periph_rst), .sel (sel == SEL_AC97), .req (plb_req),
    .rsp (rsp_ac97), .irq (ac97_irq),
    .bit_clk   (ac97_bit_clk),
    .sync      (ac97_sync),
    .sdata_out (ac97_sdata_out),
    .sdata_in  (ac97_sdata_in)
  );

  // ---- unmapped addresses: answer with an error ----------------------------------
  bus_rsp_t rsp_err;
  always_ff @(posedge clk_sys) begin
    if (bus_struct_reset) rsp_err <= BUS_RSP_IDLE;
    else begin
      rsp_err.ack   <= bus_req_active && !hit && !rsp_err.ack;
      rsp_err.err   <= bus_req_active && !hit && !rsp_err.ack;
      rsp_err.rdata <= '0;
    end
  end

  // ---- response merge: only the addressed slave answers ---------------------------
  bus_rsp_t rsp_ext;
  assign rsp_ext = (ext_sel != '0) ? ext_rsp : BUS_RSP_IDLE;
  assign plb_rsp = rsp_leds | rsp_led_pos | rsp_buttons | rsp_dip | rsp_vol |
                   rsp_lcd | rsp_ac97 | rsp_err | rsp_ext;

  // at most one slave may acknowledge in a cycle
  a_one_ack: assert property (@(posedge clk_sys) disable iff (bus_struct_reset)
    $onehot0({rsp_leds.ack, rsp_led_pos.ack, rsp_buttons.ack, rsp_dip.ack, rsp_vol.ack,
              rsp_lcd.ack, rsp_ac97.ack, rsp_err.ack, rsp_ext.ack}));

  // the master holds its request stable until acknowledged
  a_req_stable: assert property (@(posedge clk_sys) disable iff (bus_struct_reset)
    (bus_req_active && !plb_rsp.ack) |=> (plb_req == $past(plb_req)));

  logic unused;
  assign unused = ^{unused_irq_leds, unused_irq_pos, unused_irq_btn, unused_irq_dip,
                    unused_btn_o, unused_btn_t, unused_dip_o, unused_dip_t};

endmodule
