// gpio: memory-mapped general-purpose I/O port.
//
// The player has five of these: 8 LEDs, 5 position LEDs, 5 push buttons
// (scan, select, play, pause, stop), 8 DIP switches (switch 8 enables the
// caches) and the 3-bit volume dial (rotary encoder A/B and its push switch),
// which is the only one with its interrupt enabled.  Widths, input-only
// settings and interrupt settings come from the platform description; the
// register layout is that of the common processor-bus GPIO core these
// instances were taken from, reduced to one channel.
//
// How it works: each pin has an output register bit and a direction bit
// (1 = input, the reset value).  Inputs pass a two-flop synchroniser.  With
// the interrupt present, any change of the synchronised input sets the
// interrupt status bit, and irq is high while status, the interrupt enable
// and the global enable are all set.  With ALL_INPUTS the direction register
// is fixed to inputs and the outputs stay low.
//
// Registers (byte offsets):
//   0x000 DATA   R: pin value (inputs) or output register (outputs); W: outputs
//   0x004 TRI    direction, 1 = input
//   0x11C GIER   [31] global interrupt enable
//   0x120 ISR    [0] input changed; write 1 to clear
//   0x128 IER    [0] interrupt enable
// The three pin vectors replace one bidirectional pad per bit: gpio_o is
// driven onto the pad where gpio_t is 0.  Bus accesses are acknowledged one
// clock after the request.
module gpio
  import mp3_pkg::*;
#(
  parameter int unsigned WIDTH             = 8,
  parameter bit          ALL_INPUTS        = 1'b0,
  parameter bit          INTERRUPT_PRESENT = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sel,
  input  bus_req_t         req,
  output bus_rsp_t         rsp,
  output logic             irq,
  input  logic [WIDTH-1:0] gpio_i,
  output logic [WIDTH-1:0] gpio_o,
  output logic [WIDTH-1:0] gpio_t
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [WIDTH-1:0] data_q, tri_q, in_s1, in_s2, in_prev;
  logic             gier, ier, isr;

  logic access, do_wr;
  logic [8:0] ofs;
  assign access = sel && (req.wr || req.rd) && !rsp.ack;
  assign do_wr  = access && req.wr;
  assign ofs    = req.addr[8:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      data_q  <= '0;
      tri_q   <= '1;
      in_s1   <= '0;
      in_s2   <= '0;
      in_prev <= '0;
      gier    <= 1'b0;
      ier     <= 1'b0;
      isr     <= 1'b0;
    end else begin
      in_s1   <= gpio_i;
      in_s2   <= in_s1;
      in_prev <= in_s2;
      if (INTERRUPT_PRESENT && (in_s2 != in_prev)) isr <= 1'b1;
      if (do_wr) begin
        unique case (ofs)
          9'h000: if (!ALL_INPUTS) data_q <= req.wdata[WIDTH-1:0];
          9'h004: if (!ALL_INPUTS) tri_q  <= req.wdata[WIDTH-1:0];
          9'h11C: gier <= req.wdata[31];
          9'h120: if (req.wdata[0]) isr <= 1'b0;
          9'h128: ier  <= req.wdata[0];
          default: ;
        endcase
      end
    end
  end

  logic [WIDTH-1:0] pin_value;
  assign pin_value = (tri_q & in_s2) | (~tri_q & data_q);

  always_ff @(posedge clk) begin
    if (rst) begin
      rsp <= BUS_RSP_IDLE;
    end else begin
      rsp.ack   <= access;
      rsp.err   <= 1'b0;
      rsp.rdata <= '0;
      if (access && req.rd) begin
        unique case (ofs)
          9'h000: rsp.rdata <= 32'(pin_value);
          9'h004: rsp.rdata <= 32'(tri_q);
          9'h11C: rsp.rdata <= {gier, 31'h0};
          9'h120: rsp.rdata <= {31'h0, isr};
          9'h128: rsp.rdata <= {31'h0, ier};
          default: rsp.rdata <= '0;
        endcase
      end
    end
  end

  assign irq    = INTERRUPT_PRESENT && gier && ier && isr;
  assign gpio_o = ALL_INPUTS ? '0 : data_q;
  assign gpio_t = ALL_INPUTS ? '1 : tri_q;

endmodule
