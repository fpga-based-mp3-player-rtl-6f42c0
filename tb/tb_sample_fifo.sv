// tb_sample_fifo: self-checking test of the playback sample FIFO.
// Random pushes and pops (including pushes when full, pops when empty and
// clears) are mirrored in a reference queue; every cycle the flags, the
// level and the head word are compared with the reference.
module tb_sample_fifo;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int DEPTH = 16;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, push = 1'b0, pop = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic full, half_full, empty;
  logic [4:0] level;
  int checks = 0, failures = 0;
  int fulls = 0, empties = 0;
  logic [31:0] ref_q [$];

  sample_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #4 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // compare state with the reference
      check(level == 5'(ref_q.size()), "level");
      check(full == (ref_q.size() == DEPTH), "full");
      check(empty == (ref_q.size() == 0), "empty");
      check(half_full == (ref_q.size() >= DEPTH / 2), "half_full");
      if (ref_q.size() > 0) check(rdata == ref_q[0], "head data");
      if (full) fulls++;
      if (empty) empties++;
      // choose the next operation; bias towards filling in the first half
      clear = ($urandom_range(0, 199) == 0);
      push  = ($urandom_range(0, 99) < ((cyc / 500) % 2 == 0 ? 70 : 30));
      pop   = ($urandom_range(0, 99) < ((cyc / 500) % 2 == 0 ? 30 : 70));
      wdata = $urandom;
      @(posedge clk);
      #1;
      if (clear) ref_q.delete();
      else begin
        // a push is refused when the FIFO was full before this edge
        bit was_full;
        was_full = (ref_q.size() == DEPTH);
        if (pop && ref_q.size() > 0) void'(ref_q.pop_front());
        if (push && !was_full) ref_q.push_back(wdata);
      end
    end
    check(fulls > 0, "full reached");
    check(empties > 0, "empty reached");
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
