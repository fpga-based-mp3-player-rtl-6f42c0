// proc_sys_reset: system reset sequencer of the MP3 player platform.
//
// Collects the reset sources (the board's reset button, active low; a reset
// requested by the debug module; the clock generator not yet locked) and,
// once all are gone, releases the resets in order: bus structures first,
// peripherals T_PERIPH cycles after the start, the processor T_MB cycles
// after the start.  It also provides the inverted peripheral reset, which
// the platform sends off-chip as the active-low reset of the AC97 codec.
// Source names, the active-low external reset and the codec reset wiring
// are the platform's; the release order and the cycle counts are this
// design's choice, modelled on the usual processor-system reset cores.
//
// The flops power up in reset through declaration initialisers (the FPGA
// loads them as configuration values), so the outputs are asserted from
// time zero, before the first clock edge; lint notes these initialisers on
// clocked variables, which is intended here.
//
// How it works: the combined request passes a two-flop synchroniser into the
// slowest-clock domain and clears a saturating counter; the three outputs are
// compares of that counter.  All outputs are registered and active high
// except peripheral_reset_n.  They assert one to three cycles after a source
// appears and release T_BUS, T_PERIPH and T_MB cycles after the last source
// is gone (plus the two synchroniser cycles).
module proc_sys_reset #(
  parameter bit          EXT_RESET_HIGH = 1'b0,
  parameter int unsigned T_BUS          = 16,
  parameter int unsigned T_PERIPH       = 32,
  parameter int unsigned T_MB           = 48
) (
  input  logic slowest_sync_clk,
  input  logic ext_reset_in,
  input  logic mb_debug_sys_rst,
  input  logic dcm_locked,
  output logic mb_reset = 1'b1,
  output logic bus_struct_reset = 1'b1,
  output logic peripheral_reset = 1'b1,
  output logic peripheral_reset_n
);
  timeunit 1ns;
  timeprecision 1ps;

  // power-up state, as the FPGA's configuration loads it: everything in reset
  logic       req;
  logic       req_s1 = 1'b1, req_s2 = 1'b1;
  logic [7:0] count  = '0;

  assign req = (ext_reset_in == EXT_RESET_HIGH) || mb_debug_sys_rst || !dcm_locked;

  // the synchroniser flops have no reset: a request itself drives them to 1
  always_ff @(posedge slowest_sync_clk) begin
    req_s1 <= req;
    req_s2 <= req_s1;
  end

  always_ff @(posedge slowest_sync_clk) begin
    if (req_s2) begin
      count            <= '0;
      bus_struct_reset <= 1'b1;
      peripheral_reset <= 1'b1;
      mb_reset         <= 1'b1;
    end else begin
      if (count != 8'hFF) count <= count + 1'b1;
      bus_struct_reset <= (count < 8'(T_BUS));
      peripheral_reset <= (count < 8'(T_PERIPH));
      mb_reset         <= (count < 8'(T_MB));
    end
  end

  // util_vector_logic (C_OPERATION = not): codec reset pin
  assign peripheral_reset_n = !peripheral_reset;

endmodule
