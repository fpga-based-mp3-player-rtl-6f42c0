// tb_proc_sys_reset: self-checking test of the reset sequencer.  Checks
// that each source (active-low board reset, debug reset, clock generator
// not locked) asserts all outputs within three clocks, that the outputs
// release in the order bus, peripherals, processor at exactly T+3 clocks
// after the last source goes away (two synchroniser stages plus the
// registered compare), that the codec reset is the inverse of the
// peripheral reset, and that a glitch during the sequence restarts it.
module tb_proc_sys_reset;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned T_BUS = 16, T_PERIPH = 32, T_MB = 48;

  logic clk = 1'b0;
  logic ext_n = 1'b0, dbg = 1'b0, locked = 1'b0;
  logic mb_reset, bus_reset, per_reset, per_reset_n;
  int checks = 0, failures = 0;

  always #8 clk = ~clk;   // 62.5 MHz

  proc_sys_reset #(.EXT_RESET_HIGH(1'b0), .T_BUS(T_BUS), .T_PERIPH(T_PERIPH), .T_MB(T_MB)) dut (
    .slowest_sync_clk(clk), .ext_reset_in(ext_n), .mb_debug_sys_rst(dbg),
    .dcm_locked(locked), .mb_reset, .bus_struct_reset(bus_reset),
    .peripheral_reset(per_reset), .peripheral_reset_n(per_reset_n));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // codec reset is always the inverse of the peripheral reset
  always @(negedge clk) if (!$isunknown(per_reset)) check(per_reset_n == !per_reset, "codec reset inverse");

  // count edges from the release of the last source to each output release
  task automatic measure_release(output int t_bus, output int t_per, output int t_mb);
    int n;
    t_bus = -1; t_per = -1; t_mb = -1;
    n = 0;
    while (t_mb < 0 && n < 200) begin
      @(posedge clk); #1;
      n++;
      if (t_bus < 0 && !bus_reset) t_bus = n;
      if (t_per < 0 && !per_reset) t_per = n;
      if (t_mb  < 0 && !mb_reset)  t_mb  = n;
      if (t_bus < 0) check(per_reset && mb_reset, "peripherals and processor held while bus held");
      if (t_per < 0) check(mb_reset, "processor held while peripherals held");
    end
  endtask

  task automatic all_asserted_within(input int lim, input string what);
    int n;
    n = 0;
    while (!(mb_reset && bus_reset && per_reset) && n < 10) begin
      @(posedge clk); #1; n++;
    end
    check(n <= lim, what);
  endtask

  int tb, tp, tm;

  initial begin
    repeat (5) @(posedge clk);
    #1 check(mb_reset && bus_reset && per_reset, "all asserted at power-up");
    // board reset released first, lock arrives later: lock is the last source
    @(negedge clk); ext_n = 1'b1;
    repeat (10) @(posedge clk);
    #1 check(mb_reset && bus_reset && per_reset, "held while not locked");
    @(negedge clk); locked = 1'b1;
    measure_release(tb, tp, tm);
    check(tb == T_BUS + 3,    $sformatf("bus release after %0d clocks", tb));
    check(tp == T_PERIPH + 3, $sformatf("peripheral release after %0d clocks", tp));
    check(tm == T_MB + 3,     $sformatf("processor release after %0d clocks", tm));
    repeat (20) @(posedge clk);
    #1 check(!mb_reset && !bus_reset && !per_reset, "all stay released");

    // each source alone asserts all outputs within three clocks
    @(negedge clk); ext_n = 1'b0;
    all_asserted_within(3, "board reset (active low) asserts");
    @(negedge clk); ext_n = 1'b1;
    measure_release(tb, tp, tm);
    check(tb == T_BUS + 3 && tp == T_PERIPH + 3 && tm == T_MB + 3, "release after board reset");

    @(negedge clk); dbg = 1'b1;
    all_asserted_within(3, "debug reset asserts");
    @(negedge clk); dbg = 1'b0;
    measure_release(tb, tp, tm);
    check(tb == T_BUS + 3 && tp == T_PERIPH + 3 && tm == T_MB + 3, "release after debug reset");

    @(negedge clk); locked = 1'b0;
    all_asserted_within(3, "loss of lock asserts");
    @(negedge clk); locked = 1'b1;
    measure_release(tb, tp, tm);
    check(tb == T_BUS + 3 && tp == T_PERIPH + 3 && tm == T_MB + 3, "release after relock");

    // a one-clock request halfway through the sequence restarts it
    @(negedge clk); dbg = 1'b1;
    @(negedge clk); dbg = 1'b0;
    repeat (25) @(posedge clk);
    #1 check(!bus_reset && per_reset && mb_reset, "mid-sequence state");
    @(negedge clk); dbg = 1'b1;
    @(negedge clk); dbg = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(bus_reset && per_reset && mb_reset, "glitch re-asserts all");
    repeat (T_MB + 10) @(posedge clk);
    #1 check(!mb_reset && !bus_reset && !per_reset, "released after restart");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
