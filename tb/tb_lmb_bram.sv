// tb_lmb_bram: self-checking test of the dual-port local-memory block RAM.
// Fills the memory through port B with a pattern, reads it back through
// both ports, checks the one-clock registered read latency, byte-enable
// writes, read-first behaviour (a write returns the old word) and that the
// two ports see one shared memory, with random traffic checked against a
// reference model.
module tb_lmb_bram;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned SIZE  = 65536;
  localparam int unsigned WORDS = SIZE / 4;

  logic        clk = 1'b0;
  logic        a_en = 1'b0, b_en = 1'b0;
  logic [3:0]  a_we = '0, b_we = '0;
  logic [31:0] a_addr = '0, b_addr = '0, a_wdata = '0, b_wdata = '0;
  logic [31:0] a_rdata, b_rdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  lmb_bram #(.SIZE_BYTES(SIZE)) dut (
    .clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [31:0] pat(input int unsigned i);
    return (i * 32'h9E37_79B9) ^ 32'hA5A5_0000 ^ i;
  endfunction

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] we);
    logic [31:0] r;
    r = old;
    for (int i = 0; i < 4; i++) if (we[i]) r[8*i +: 8] = d[8*i +: 8];
    return r;
  endfunction

  logic [31:0] exp_a, exp_b;

  initial begin
    // fill through port B, one word per clock
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      b_en = 1'b1; b_we = 4'hF; b_addr = 32'(i * 4); b_wdata = pat(i);
      model[i] = pat(i);
    end
    @(negedge clk);
    b_en = 1'b0; b_we = '0;

    // read back through port A: data one clock after the address
    for (int i = 0; i < WORDS; i += 37) begin
      @(negedge clk);
      a_en = 1'b1; a_addr = 32'(i * 4);
      @(posedge clk);
      #1 check(a_rdata == pat(i), "port A read-back one clock after address");
    end
    @(negedge clk);
    a_en = 1'b0;

    // latency: the output holds while en is low, changes one edge after en
    @(negedge clk);
    a_en = 1'b1; a_addr = 32'h0000_0100;
    @(posedge clk); #1;
    exp_a = a_rdata;
    check(exp_a == pat(64), "registered read");
    @(negedge clk);
    a_en = 1'b0; a_addr = 32'h0000_0200;
    @(posedge clk); #1;
    check(a_rdata == exp_a, "rdata holds while en is low");
    @(negedge clk);
    a_en = 1'b1;
    check(a_rdata == exp_a, "rdata does not change before the clock edge");
    @(posedge clk); #1;
    check(a_rdata == pat(128), "rdata changes on the edge after en");

    // byte enables and read-first on port A
    @(negedge clk);
    a_en = 1'b1; a_we = 4'b0101; a_addr = 32'h0000_0010; a_wdata = 32'h1122_3344;
    @(posedge clk); #1;
    check(a_rdata == pat(4), "read-first: a write returns the old word");
    model[4] = merge(model[4], 32'h1122_3344, 4'b0101);
    @(negedge clk);
    a_we = '0;
    @(posedge clk); #1;
    check(a_rdata == model[4], "byte-enable write merges bytes");

    // shared memory: written on A, read on B in the next cycle
    @(negedge clk);
    a_we = 4'hF; a_addr = 32'h0000_FFFC; a_wdata = 32'hDEAD_BEEF;
    model[WORDS-1] = 32'hDEAD_BEEF;
    @(negedge clk);
    a_we = '0; a_en = 1'b0;
    b_en = 1'b1; b_addr = 32'h0000_FFFC;
    @(posedge clk); #1;
    check(b_rdata == 32'hDEAD_BEEF, "port B sees port A's write");

    // address bits above 64 KB and below the word are ignored
    @(negedge clk);
    b_addr = 32'h0001_FFFE;
    @(posedge clk); #1;
    check(b_rdata == 32'hDEAD_BEEF, "upper and byte address bits ignored");

    // random traffic on both ports against the model (distinct words)
    for (int n = 0; n < 4000; n++) begin
      int unsigned ia, ib;
      logic [3:0] wa, wb;
      logic [31:0] da, db;
      ia = $urandom_range(0, WORDS - 1);
      ib = $urandom_range(0, WORDS - 1);
      if (ib == ia) ib = (ia + 1) % WORDS;
      wa = 4'($urandom); wb = 4'($urandom);
      da = $urandom; db = $urandom;
      @(negedge clk);
      a_en = 1'b1; a_we = wa; a_addr = 32'(ia * 4); a_wdata = da;
      b_en = 1'b1; b_we = wb; b_addr = 32'(ib * 4); b_wdata = db;
      exp_a = model[ia];
      exp_b = model[ib];
      model[ia] = merge(model[ia], da, wa);
      model[ib] = merge(model[ib], db, wb);
      @(posedge clk); #1;
      check(a_rdata == exp_a, "random: port A old word");
      check(b_rdata == exp_b, "random: port B old word");
    end
    @(negedge clk);
    a_en = 1'b0; b_en = 1'b0; a_we = '0; b_we = '0;

    // final sweep of the whole memory through port A
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      a_en = 1'b1; a_addr = 32'(i * 4);
      @(posedge clk); #1;
      check(a_rdata == model[i], "final sweep");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
