// tb_clock_generator: self-checking test of the clock generator model.
// Measures the period and duty cycle of every output (8, 8, 5 and 16 ns for
// 125, 125, 200 and 62.5 MHz), the 2 ns lag of the 90-degree output behind
// the system clock, that locked rises on the 32nd reference edge after
// reset is released, and that reset drops it.
module tb_clock_generator;
  timeunit 1ns;
  timeprecision 1ps;

  logic clkin = 1'b0, rst = 1'b1;
  logic c0, c1, c2, c3, locked;
  int checks = 0, failures = 0;

  always #5 clkin = ~clkin;   // 100 MHz board clock

  clock_generator dut (
    .clkin, .rst, .clkout0(c0), .clkout1(c1), .clkout2(c2), .clkout3(c3), .locked);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.002) && (b - a < 0.002);
  endfunction

  // period and high time of one output, averaged over n cycles
  task automatic measure(ref logic c, input int n, input realtime per, input string name);
    realtime t0, t1, th;
    @(posedge c); t0 = $realtime;
    for (int i = 0; i < n; i++) begin
      @(negedge c); th = $realtime;
      check(near(th - t0 - per * real'(i), per / 2.0), {name, " high time"});
      @(posedge c);
      t1 = $realtime;
      check(near(t1 - th, per / 2.0), {name, " low time"});
      th = t1;
    end
    check(near(t1 - t0, per * real'(n)), {name, " period"});
  endtask

  int edges;
  realtime r1, r0;

  initial begin
    // lock: counts reference edges after reset is released
    repeat (3) @(posedge clkin);
    #1 check(!locked, "not locked in reset");
    @(negedge clkin); rst = 1'b0;
    edges = 0;
    while (!locked && edges < 100) begin
      @(posedge clkin); #0.1; edges++;
    end
    check(edges == 32, $sformatf("locked after %0d reference edges", edges));

    fork
      measure(c0, 50, 8.0,  "clkout0");
      measure(c1, 50, 8.0,  "clkout1");
      measure(c2, 50, 5.0,  "clkout2");
      measure(c3, 50, 16.0, "clkout3");
    join

    // 90 degrees at 125 MHz: clkout0 rises 2 ns after clkout1
    for (int i = 0; i < 20; i++) begin
      @(posedge c1); r1 = $realtime;
      @(posedge c0); r0 = $realtime;
      check(near(r0 - r1, 2.0), "clkout0 lags clkout1 by 90 degrees");
    end
    // 62.5 MHz rises with every other 125 MHz rise
    for (int i = 0; i < 10; i++) begin
      @(posedge c3); r0 = $realtime;
      #0.001 check(c1 && near(r0 - r1, 8.0 * real'($rtoi((r0 - r1) / 8.0 + 0.5))), "clkout3 aligned to clkout1");
    end

    @(negedge clkin); rst = 1'b1;
    @(posedge clkin); #1;
    check(!locked, "reset drops locked");

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
