// lmb_bram: 64 KB dual-port block RAM on the processor's local memory buses.
//
// Port A serves the instruction bus and port B the data bus; both see the
// same memory at address 0x0000_0000-0x0000_FFFF, which holds the reset,
// exception and interrupt vectors and the boot code (the program itself runs
// from DDR2).  Each port is a 32-bit word port with byte write enables and a
// registered read: data for an address presented with en high appears on
// rdata one clock later (read-first: a write returns the old word).  Writes
// from both ports to one word in the same cycle are not arbitrated; port B
// wins.  The size is the platform's; the port style is that of an FPGA block
// RAM.
module lmb_bram #(
  parameter int unsigned SIZE_BYTES = 65536
) (
  input  logic        clk,
  // port A (instruction side)
  input  logic        a_en,
  input  logic [3:0]  a_we,
  input  logic [31:0] a_addr,     // byte address, bits [1:0] ignored
  input  logic [31:0] a_wdata,
  output logic [31:0] a_rdata,
  // port B (data side)
  input  logic        b_en,
  input  logic [3:0]  b_we,
  input  logic [31:0] b_addr,
  input  logic [31:0] b_wdata,
  output logic [31:0] b_rdata
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned WORDS = SIZE_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] a_idx, b_idx;
  assign a_idx = a_addr[AW+1:2];
  assign b_idx = b_addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_idx];
      for (int i = 0; i < 4; i++)
        if (a_we[i]) mem[a_idx][8*i +: 8] <= a_wdata[8*i +: 8];
    end
    if (b_en) begin
      b_rdata <= mem[b_idx];
      for (int i = 0; i < 4; i++)
        if (b_we[i]) mem[b_idx][8*i +: 8] <= b_wdata[8*i +: 8];
    end
  end

  // address bits above the memory are not decoded
  logic unused;
  assign unused = ^{a_addr[31:AW+2], a_addr[1:0], b_addr[31:AW+2], b_addr[1:0]};

endmodule
