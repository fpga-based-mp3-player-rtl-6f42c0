// plb_addr_decoder: address decoder of the processor's peripheral bus.
//
// Maps a 32-bit bus address onto the peripheral it falls in, following the
// platform's address map: every peripheral occupies an aligned window
// (64 KB for most, 1 MB for the SRAM, 256 bytes for the AC97 controller,
// which the original system reaches through a bus bridge).  The processor's
// local-memory BRAM and the DDR2 memory are on buses of their own and are
// not decoded here.  A purely combinational compare of the address against
// each base address under a mask; the windows do not overlap, so at most one
// matches.  Unmapped addresses give SEL_NONE and `hit` low, so the bus can
// answer them with an error instead of hanging.
//
// Interface: addr in, sel (periph_sel_e) and one-hot sel_vec out, same cycle.
module plb_addr_decoder
  import mp3_pkg::*;
(
  input  logic [31:0]           addr,
  output periph_sel_e           sel,
  output logic [NUM_PERIPH-1:0] sel_vec,
  output logic                  hit
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef struct packed {
    logic [31:0] base;
    logic [31:0] mask;   // address bits that must equal base
  } window_t;

  localparam window_t MAP [NUM_PERIPH] = '{
    '{base: 32'h2000_0000, mask: 32'hFFFF_0000},   // xps_timer_0
    '{base: 32'h2010_0000, mask: 32'hFFF0_0000},   // SRAM
    '{base: 32'h4000_0000, mask: 32'hFFFF_0000},   // Volume_Dial
    '{base: 32'h8140_0000, mask: 32'hFFFF_0000},   // Push_Buttons_5Bit
    '{base: 32'h8142_0000, mask: 32'hFFFF_0000},   // LEDs_Positions
    '{base: 32'h8144_0000, mask: 32'hFFFF_0000},   // LEDs_8Bit
    '{base: 32'h8146_0000, mask: 32'hFFFF_0000},   // DIP_Switches_8Bit
    '{base: 32'h8180_0000, mask: 32'hFFFF_0000},   // xps_intc_0
    '{base: 32'h8360_0000, mask: 32'hFFFF_0000},   // SysACE_CompactFlash
    '{base: 32'h8440_0000, mask: 32'hFFFF_0000},   // debug_module
    '{base: 32'hCF40_0000, mask: 32'hFFFF_0000},   // lcd_ip_0
    '{base: 32'hFFFF_8000, mask: 32'hFFFF_FF00}    // AC97 controller
  };

  always_comb begin
    sel     = SEL_NONE;
    sel_vec = '0;
    for (int i = 0; i < NUM_PERIPH; i++) begin
      if ((addr & MAP[i].mask) == MAP[i].base) begin
        sel_vec[i] = 1'b1;
        sel        = periph_sel_e'(i);
      end
    end
  end

  assign hit = (sel != SEL_NONE);

endmodule
