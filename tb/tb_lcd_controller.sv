// tb_lcd_controller: self-checking test of the character-LCD controller.
// A display model captures {RS, DB7..DB4} on every falling edge of E and
// rebuilds bytes.  The test sends the 4-bit initialisation nibbles, the
// set-up instructions, a clear, and a 16-character line, as the player does
// when it shows a song title.  Checks: every nibble and byte in order with
// the right RS, RW held low, E pulse width, setup time before E, the busy
// time of each kind of write in cycles, busy and overrun status bits.
// Timing parameters are shortened to keep the run short.
module tb_lcd_controller;
  timeunit 1ns;
  timeprecision 1ps;
  import mp3_pkg::*;

  localparam int S = 3, P = 5, H = 2, G = 7, EX = 20, EXL = 50, EXI = 80;

  logic clk = 1'b0, rst = 1'b1;
  bus_req_t req = '0;
  bus_rsp_t rsp;
  logic [6:0] lcd;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  lcd_controller #(.T_SETUP(S), .T_PULSE(P), .T_HOLD(H), .T_GAP(G),
                   .T_EXEC(EX), .T_EXEC_LONG(EXL), .T_EXEC_INIT(EXI))
    dut (.clk, .rst, .sel(req.addr[31:16] == 16'hCF40), .req, .rsp, .lcd);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic bus_write(input logic [31:0] d);
    @(posedge clk);
    req <= '{addr: 32'hCF40_0000, wdata: d, be: 4'hF, wr: 1'b1, rd: 1'b0};
    do @(posedge clk); while (!rsp.ack);
    req.wr <= 1'b0;
  endtask

  task automatic bus_read(output logic [31:0] d);
    @(posedge clk);
    req <= '{addr: 32'hCF40_0000, wdata: '0, be: 4'hF, wr: 1'b0, rd: 1'b1};
    do @(posedge clk); while (!rsp.ack);
    d = rsp.rdata;
    req.rd <= 1'b0;
  endtask

  // ---- display model ----
  logic e, rs, rw;
  logic [3:0] db;
  assign e  = lcd[0];
  assign rs = lcd[1];
  assign rw = lcd[2];
  assign db = {lcd[3], lcd[4], lcd[5], lcd[6]};
  logic [4:0] nibbles [$];    // {rs, db}
  int e_width = 0, setup_cnt = 0, bad_width = 0, bad_setup = 0, rw_high = 0;
  logic [4:0] last_pins;
  always @(posedge clk) if (!rst) begin
    if (rw) rw_high++;
    if (e) e_width++;
    else begin
      if (e_width != 0) begin
        if (e_width != P) bad_width++;
        nibbles.push_back({rs, db});
      end
      e_width = 0;
    end
    // RS and data must be stable for S cycles before E rises
    if ({rs, db} != last_pins) setup_cnt = 0; else if (!e) setup_cnt++;
    if (e && e_width == 1 && setup_cnt < S - 1) bad_setup++;
    last_pins = {rs, db};
  end

  // busy time of the last write
  int busy_cycles = 0;
  always @(posedge clk) if (int'(dut.state) != 0) busy_cycles++;

  task automatic send(input logic [9:0] w, input int expect_busy);
    logic [31:0] st;
    busy_cycles = 0;
    bus_write(32'(w));
    do bus_read(st); while (st[0]);
    check(busy_cycles == expect_busy, $sformatf("busy time %0d expected %0d", busy_cycles, expect_busy));
  endtask

  localparam int BYTE_T = 2 * (S + P + H) + G;
  string title = "FPGA MP3 PLAYER!";

  initial begin
    logic [31:0] st;
    int n;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    // 4-bit initialisation: single nibbles 3, 3, 3, 2
    send(10'h230, S + P + H + EXI);
    send(10'h230, S + P + H + EXI);
    send(10'h230, S + P + H + EXI);
    send(10'h220, S + P + H + EXI);
    send(10'h028, BYTE_T + EX);      // function set: 4 bit, 2 lines
    send(10'h00C, BYTE_T + EX);      // display on
    send(10'h006, BYTE_T + EX);      // entry mode
    send(10'h001, BYTE_T + EXL);     // clear
    send(10'h080, BYTE_T + EX);      // line 1
    for (int i = 0; i < 16; i++) send({2'b01, title[i]}, BYTE_T + EX);
    // write while busy: dropped, overrun flagged
    bus_write(32'h002);
    bus_write(32'h141);
    bus_read(st);
    check(st[0] == 1'b1 && st[1] == 1'b1, "busy and overrun");
    do bus_read(st); while (st[0]);
    check(st[1] == 1'b0, "overrun cleared by read");
    // compare the nibbles the display saw
    check(nibbles.size() == 4 + 2 * 5 + 2 * 16 + 2, "nibble count");
    for (int i = 0; i < 3; i++) check(nibbles[i] == 5'h03, "init nibble 3");
    check(nibbles[3] == 5'h02, "init nibble 2");
    n = 4;
    begin
      logic [7:0] instr [5] = '{8'h28, 8'h0C, 8'h06, 8'h01, 8'h80};
      for (int k = 0; k < 5; k++) begin
        check(nibbles[n] == {1'b0, instr[k][7:4]} && nibbles[n+1] == {1'b0, instr[k][3:0]}, "instruction nibbles");
        n += 2;
      end
    end
    for (int i = 0; i < 16; i++) begin
      check(nibbles[n] == {1'b1, title[i][7:4]} && nibbles[n+1] == {1'b1, title[i][3:0]}, "character nibbles");
      n += 2;
    end
    check(nibbles[n] == 5'h00 && nibbles[n+1] == 5'h02, "home after overrun test");
    check(bad_width == 0, "E pulse width");
    check(bad_setup == 0, "setup before E");
    check(rw_high == 0, "RW held low");
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
