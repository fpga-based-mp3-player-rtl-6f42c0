// sample_fifo: synchronous first-in first-out buffer for PCM samples.
//
// This is the playback FIFO (In_FIFO) of the AC97 controller.  The processor
// writes one stereo sample word per bus write; the AC-link side pops one word
// each time the codec asks for a sample.  Depth 16 is the default the
// controller was used with: 16 samples can wait before the writer must stall
// on the full flag.  A circular buffer with read and write pointers and an
// occupancy counter; full, half-full and empty are registered-state decodes.
//
// Interface: push/wdata write when not full (a push while full is ignored);
// pop/rdata: rdata is the oldest entry, valid whenever empty is low (show-ahead),
// and pop removes it.  clear empties the buffer in one cycle.  Timing: a pushed
// word is visible on rdata the cycle after the push.
module sample_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     full,
  output logic                     half_full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   level
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;

  logic do_push, do_pop;
  assign do_push = push && (count != DEPTH[AW:0]);
  assign do_pop  = pop  && (count != '0);

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  assign rdata     = mem[rptr];
  assign full      = (count == DEPTH[AW:0]);
  assign half_full = (count >= (AW+1)'(DEPTH / 2));
  assign empty     = (count == '0);
  assign level     = count;

endmodule
