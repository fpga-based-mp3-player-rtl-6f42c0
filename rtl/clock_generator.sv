// clock_generator: behavioural model of the platform's PLL clock generator.
// Not synthesizable: an FPGA PLL primitive is an analog/mixed-signal macro,
// and this file only models its outputs for simulation.
//
// From the 100 MHz board clock the PLL makes the 125 MHz system clock (bus,
// processor, peripherals), a 125 MHz clock shifted by 90 degrees and a
// 62.5 MHz clock for the DDR2 controller, and a 200 MHz reference clock for
// the FPGA input-delay calibration.  The output frequencies and phases are
// the platform's.  The model runs the outputs from their own delays, as a
// locked PLL would, and raises locked after LOCK_CYCLES rising edges of clkin
// with rst low; rst drops locked again.  CLKIN_FREQ must be the board's
// 100 MHz; elaboration stops on any other value.  The zero-phase outputs
// start high at time zero, so their rising edges line up as a PLL's do;
// clkout0 starts low and first rises at phase/360 of its period.
// A synthesis run that drops the delays keeps the one-bit first0 flag, set
// once and then held, as a latch; that bit belongs to the model only and is
// the only latch of the design, seen in the top as well.
module clock_generator #(
  parameter longint unsigned CLKIN_FREQ    = 100_000_000,
  parameter longint unsigned CLKOUT0_FREQ  = 125_000_000,
  parameter int unsigned     CLKOUT0_PHASE = 90,
  parameter longint unsigned CLKOUT1_FREQ  = 125_000_000,
  parameter longint unsigned CLKOUT2_FREQ  = 200_000_000,
  parameter longint unsigned CLKOUT3_FREQ  = 62_500_000,
  parameter int unsigned     LOCK_CYCLES   = 32
) (
  input  logic clkin,
  input  logic rst,
  output logic clkout0,   // 125 MHz, 90 degrees
  output logic clkout1,   // 125 MHz, 0 degrees (system clock)
  output logic clkout2,   // 200 MHz
  output logic clkout3,   // 62.5 MHz
  output logic locked
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam real HALF0 = 500_000_000.0 / real'(CLKOUT0_FREQ);  // ns
  localparam real HALF1 = 500_000_000.0 / real'(CLKOUT1_FREQ);  // ns
  localparam real HALF2 = 500_000_000.0 / real'(CLKOUT2_FREQ);  // ns
  localparam real HALF3 = 500_000_000.0 / real'(CLKOUT3_FREQ);  // ns
  localparam real SHIFT0 = 2.0 * HALF0 * real'(CLKOUT0_PHASE) / 360.0;

  // each output is a free-running toggle; clkout0 holds low for SHIFT0
  // before its first rising edge to carry the phase offset
  logic first0;
  initial begin
    clkout0 = 1'b0;
    clkout1 = 1'b1;
    clkout2 = 1'b1;
    clkout3 = 1'b1;
    first0  = 1'b1;
  end
  always begin
    if (first0) begin
      #(SHIFT0);
      first0  = 1'b0;
      clkout0 = 1'b1;
    end
    #(HALF0) clkout0 = ~clkout0;
  end
  always begin
    #(HALF1) clkout1 = ~clkout1;
  end
  always begin
    #(HALF2) clkout2 = ~clkout2;
  end
  always begin
    #(HALF3) clkout3 = ~clkout3;
  end

  int unsigned lock_count;
  initial begin
    lock_count = 0;
    locked     = 1'b0;
  end
  always @(posedge clkin or posedge rst) begin
    if (rst) begin
      lock_count <= 0;
      locked     <= 1'b0;
    end else if (lock_count < LOCK_CYCLES) begin
      lock_count <= lock_count + 1;
      locked     <= (lock_count + 1 == LOCK_CYCLES);
    end
  end

  // the outputs run from their own delays, so the model only stands for
  // the platform's 100 MHz reference; any other value is refused
  if (CLKIN_FREQ != 100_000_000) begin : g_bad_clkin
    $error("clock_generator models a 100 MHz reference only");
  end

endmodule
