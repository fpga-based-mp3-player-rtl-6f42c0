// lcd_controller: memory-mapped driver for the board's 2x16 character LCD.
//
// The player shows the song title and author on a 2-line, 16-character
// HD44780-style display wired with a 4-bit data bus.  The processor writes
// one byte per bus write, either an instruction (clear, cursor home, set
// line, ...) or a character; this block splits it into two nibbles, upper
// first, and produces the RS, RW and E strobes with the display's setup,
// pulse-width and execution times counted in clock cycles.  A third kind of
// write sends a single upper nibble, needed for the 4-bit power-up sequence.
// The seven-pin interface and its pin order are those of the board; the
// register layout, the write-only use of the display (RW is held low and the
// busy flag is never read) and the timing defaults are this design's own
// (HD44780 data-sheet minimums at a 125 MHz clock, rounded up).
//
// Registers (byte offsets from base 0xCF40_0000):
//   0x0 W  [7:0] byte, [8] RS (1 = character data, 0 = instruction),
//          [9] send only the upper nibble (initialisation)
//   0x0 R  [0] busy, [1] overrun: a write arrived while busy and was dropped
//          (sticky, cleared by reading)
// Pins lcd[6:0]: 0 E, 1 RS, 2 RW, 3 DB7, 4 DB6, 5 DB5, 6 DB4.
//
// Timing: per nibble T_SETUP cycles with E low, T_PULSE with E high, T_HOLD
// with E low; T_GAP between the two nibbles of a byte; then the display's
// execution time: T_EXEC, T_EXEC_LONG after clear/home, T_EXEC_INIT after an
// initialisation nibble.  busy covers all of it.
module lcd_controller
  import mp3_pkg::*;
#(
  parameter int unsigned T_SETUP     = 8,       // >= 40 ns address setup
  parameter int unsigned T_PULSE     = 32,      // >= 230 ns enable pulse
  parameter int unsigned T_HOLD      = 8,       // >= 10 ns hold
  parameter int unsigned T_GAP       = 125,     // 1 us between nibbles
  parameter int unsigned T_EXEC      = 5000,    // 40 us typical instruction
  parameter int unsigned T_EXEC_LONG = 205000,  // 1.64 ms clear / home
  parameter int unsigned T_EXEC_INIT = 512500   // 4.1 ms after an init nibble
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       sel,
  input  bus_req_t   req,
  output bus_rsp_t   rsp,
  output logic [6:0] lcd
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [2:0] {IDLE, SETUP, PULSE, HOLD, GAP, EXEC} state_e;

  state_e      state;
  logic [19:0] timer;
  logic [7:0]  byte_q;
  logic        rs_q, second, one_nibble, overrun;
  logic [3:0]  nibble;
  logic [19:0] exec_time;

  logic access, do_wr, do_rd;
  assign access = sel && (req.wr || req.rd) && !rsp.ack;
  assign do_wr  = access && req.wr;
  assign do_rd  = access && req.rd;

  assign nibble = second ? byte_q[3:0] : byte_q[7:4];

  always_comb begin
    if (one_nibble)                              exec_time = 20'(T_EXEC_INIT);
    else if (!rs_q && byte_q[7:2] == 6'b000000)  exec_time = 20'(T_EXEC_LONG);  // clear, home
    else                                         exec_time = 20'(T_EXEC);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      timer      <= '0;
      byte_q     <= '0;
      rs_q       <= 1'b0;
      second     <= 1'b0;
      one_nibble <= 1'b0;
      overrun    <= 1'b0;
    end else begin
      if (do_rd) overrun <= 1'b0;
      if (timer != '0) timer <= timer - 1'b1;
      unique case (state)
        IDLE: if (do_wr) begin
          byte_q     <= req.wdata[7:0];
          rs_q       <= req.wdata[8];
          one_nibble <= req.wdata[9];
          second     <= 1'b0;
          timer      <= 20'(T_SETUP - 1);
          state      <= SETUP;
        end
        SETUP: if (timer == '0) begin timer <= 20'(T_PULSE - 1); state <= PULSE; end
        PULSE: if (timer == '0) begin timer <= 20'(T_HOLD - 1);  state <= HOLD;  end
        HOLD:  if (timer == '0) begin
          if (!second && !one_nibble) begin
            timer <= 20'(T_GAP - 1);
            state <= GAP;
          end else begin
            timer <= exec_time - 1'b1;
            state <= EXEC;
          end
        end
        GAP:   if (timer == '0) begin
          second <= 1'b1;
          timer  <= 20'(T_SETUP - 1);
          state  <= SETUP;
        end
        EXEC:  if (timer == '0) state <= IDLE;
        default: state <= IDLE;
      endcase
      if (do_wr && state != IDLE) overrun <= 1'b1;
    end
  end

  // pins: E, RS, RW, DB7..DB4
  logic lcd_e;
  assign lcd_e = (state == PULSE);
  assign lcd   = {nibble[0], nibble[1], nibble[2], nibble[3], 1'b0, rs_q, lcd_e};

  always_ff @(posedge clk) begin
    if (rst) begin
      rsp <= BUS_RSP_IDLE;
    end else begin
      rsp.ack   <= access;
      rsp.err   <= 1'b0;
      rsp.rdata <= do_rd ? {30'h0, overrun, state != IDLE} : 32'h0;
    end
  end

endmodule
