// tb_gpio: self-checking test of the GPIO port in the three settings the
// player uses: an output port (LEDs), an input-only port (push buttons) and
// a bidirectional port with the change interrupt (volume dial).  Checks the
// direction and data registers, the pad enables, synchronised input reads
// with their two-cycle latency, and the interrupt's set, enable and clear.
module tb_gpio;
  timeunit 1ns;
  timeprecision 1ps;
  import mp3_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  bus_req_t req = '0;
  bus_rsp_t rsp_led, rsp_btn, rsp_dial;
  logic irq_led, irq_btn, irq_dial;
  logic [7:0] led_i = '0, led_o, led_t;
  logic [4:0] btn_i = '0, btn_o, btn_t;
  logic [2:0] dial_i = '0, dial_o, dial_t;
  int checks = 0, failures = 0;
  bus_rsp_t rsp;

  always #4 clk = ~clk;

  gpio #(.WIDTH(8), .ALL_INPUTS(1'b0), .INTERRUPT_PRESENT(1'b0)) u_led (
    .clk, .rst, .sel(req.addr[31:16] == 16'h8144), .req, .rsp(rsp_led), .irq(irq_led),
    .gpio_i(led_i), .gpio_o(led_o), .gpio_t(led_t));
  gpio #(.WIDTH(5), .ALL_INPUTS(1'b1), .INTERRUPT_PRESENT(1'b0)) u_btn (
    .clk, .rst, .sel(req.addr[31:16] == 16'h8140), .req, .rsp(rsp_btn), .irq(irq_btn),
    .gpio_i(btn_i), .gpio_o(btn_o), .gpio_t(btn_t));
  gpio #(.WIDTH(3), .ALL_INPUTS(1'b0), .INTERRUPT_PRESENT(1'b1)) u_dial (
    .clk, .rst, .sel(req.addr[31:16] == 16'h4000), .req, .rsp(rsp_dial), .irq(irq_dial),
    .gpio_i(dial_i), .gpio_o(dial_o), .gpio_t(dial_t));

  assign rsp = rsp_led | rsp_btn | rsp_dial;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    @(posedge clk);
    req <= '{addr: a, wdata: d, be: 4'hF, wr: 1'b1, rd: 1'b0};
    do @(posedge clk); while (!rsp.ack);
    req.wr <= 1'b0;
  endtask

  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    @(posedge clk);
    req <= '{addr: a, wdata: '0, be: 4'hF, wr: 1'b0, rd: 1'b1};
    do @(posedge clk); while (!rsp.ack);
    d = rsp.rdata;
    req.rd <= 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(led_t == 8'hFF && dial_t == 3'b111 && btn_t == 5'h1F, "all inputs after reset");
    // LEDs as outputs
    bus_write(32'h8144_0004, 32'h0);
    bus_write(32'h8144_0000, 32'hA5);
    @(posedge clk);
    check(led_t == 8'h00 && led_o == 8'hA5, "LED outputs driven");
    bus_read(32'h8144_0000, d);
    check(d == 32'hA5, "LED data read back");
    bus_write(32'h8144_0004, 32'hF0);           // upper four back to inputs
    led_i = 8'h3C;
    repeat (3) @(posedge clk);
    bus_read(32'h8144_0000, d);
    check(d == 32'h35, "mixed pin/register read");
    // buttons: input only
    bus_write(32'h8140_0004, 32'h0);
    bus_write(32'h8140_0000, 32'h1F);
    check(btn_t == 5'h1F && btn_o == 5'h0, "input-only port never drives");
    for (int v = 0; v < 32; v += 5) begin
      btn_i = 5'(v);
      @(posedge clk);
      bus_read(32'h8140_0000, d);
      check(d == 32'(v), "button value after two clocks");
    end
    @(negedge clk);
    btn_i = 5'h04;
    @(posedge clk);
    #1 check(u_btn.in_s2 != 5'h04, "two-flop synchroniser: not after one clock");
    @(posedge clk);
    #1 check(u_btn.in_s2 == 5'h04, "two-flop synchroniser: after two clocks");
    // volume dial interrupt
    check(irq_dial == 1'b0, "no dial interrupt at start");
    dial_i = 3'b010;
    repeat (4) @(posedge clk);
    bus_read(32'h4000_0120, d);
    check(d[0] == 1'b1, "change sets status");
    check(irq_dial == 1'b0, "interrupt masked");
    bus_write(32'h4000_0128, 32'h1);
    bus_write(32'h4000_011C, 32'h8000_0000);
    @(posedge clk);
    check(irq_dial == 1'b1, "interrupt enabled");
    bus_write(32'h4000_0120, 32'h1);
    @(posedge clk);
    check(irq_dial == 1'b0, "interrupt cleared");
    dial_i = 3'b011;
    repeat (4) @(posedge clk);
    check(irq_dial == 1'b1, "second change raises interrupt");
    bus_read(32'h4000_0000, d);
    check(d == 32'h3, "dial value");
    check(irq_led == 1'b0 && irq_btn == 1'b0, "no interrupt on ports without one");
    led_i = 8'h00;
    repeat (4) @(posedge clk);
    check(irq_led == 1'b0, "LED port change gives no interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
