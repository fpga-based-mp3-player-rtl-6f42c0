// tb_plb_addr_decoder: self-checking test of the peripheral address decoder.
// For every window of the address map it checks the first, last and a
// random address inside, and addresses just outside; plus random addresses
// against a reference decoder written from the same table.
module tb_plb_addr_decoder;
  timeunit 1ns;
  timeprecision 1ps;
  import mp3_pkg::*;

  logic [31:0] addr;
  periph_sel_e sel;
  logic [NUM_PERIPH-1:0] sel_vec;
  logic hit;
  int checks = 0, failures = 0;

  plb_addr_decoder dut (.*);

  longint unsigned lo [NUM_PERIPH] = '{64'h2000_0000, 64'h2010_0000, 64'h4000_0000,
    64'h8140_0000, 64'h8142_0000, 64'h8144_0000, 64'h8146_0000, 64'h8180_0000,
    64'h8360_0000, 64'h8440_0000, 64'hCF40_0000, 64'hFFFF_8000};
  longint unsigned size [NUM_PERIPH] = '{64'h1_0000, 64'h10_0000, 64'h1_0000,
    64'h1_0000, 64'h1_0000, 64'h1_0000, 64'h1_0000, 64'h1_0000,
    64'h1_0000, 64'h1_0000, 64'h1_0000, 64'h100};

  function automatic int ref_sel(input longint unsigned a);
    for (int i = 0; i < NUM_PERIPH; i++)
      if (a >= lo[i] && a < lo[i] + size[i]) return i;
    return 15;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr %h", what, addr);
    end
  endtask

  task automatic probe(input longint unsigned a);
    int r;
    addr = 32'(a);
    #1;
    r = ref_sel(a);
    check(int'(sel) == r, "select");
    check(hit == (r != 15), "hit");
    check(sel_vec == ((r == 15) ? '0 : (NUM_PERIPH'(1) << r)), "one-hot select");
  endtask

  initial begin
    for (int i = 0; i < NUM_PERIPH; i++) begin
      probe(lo[i]);
      probe(lo[i] + size[i] - 1);
      probe(lo[i] + {$urandom} % size[i]);
      probe(lo[i] - 1);
      if (lo[i] + size[i] <= 64'hFFFF_FFFF) probe(lo[i] + size[i]);
    end
    probe(64'h0000_1000);     // local memory, not on this bus
    probe(64'hB000_0000);     // DDR2, not on this bus
    for (int k = 0; k < 2000; k++) probe({32'h0, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
