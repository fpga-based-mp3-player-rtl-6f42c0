// tb_mp3_player_top: end-to-end test of the MP3 player platform at its
// default parameters.  A bus-master model stands in for the processor and
// runs what the player software does: boot from the local memory, set up
// the LEDs, read the buttons and DIP switches, take a volume-dial
// interrupt, initialise the codec (including the driver's FIFO clear of 512
// unpolled zero writes) and read its vendor ID, initialise the
// LCD and show a title and author, and play one MP3 frame (1152 stereo
// samples at 44.1 kHz) through the 16-sample FIFO, polling the full bit
// before each write and writing the LCD while the FIFO is full.  In the
// middle of the frame it waits for the FIFO interrupt (as a decoder that
// sleeps until the FIFO needs data would), and later stalls long enough to
// starve the codec.  Around the DUT sit a behavioural AC97 codec, an LCD
// that records every nibble, and an external-slave model with wait states
// for the library cores (timer, SRAM).
//
// Checks: PLL lock and reset release order, BRAM through both local buses,
// unmapped-address errors, external-slave select and wait states, GPIO
// pins and interrupt, codec register writes and read, sample order and
// value, the 44.1 kHz sample rate against 48 kHz frames, the underrun flag,
// the FIFO interrupt, the exact LCD nibble sequence, LCD busy and overrun.
// Each mechanism is counted, and the test fails if any never happened.
module tb_mp3_player_top;
  timeunit 1ns;
  timeprecision 1ps;
  import mp3_pkg::*;

  // ---- DUT and surroundings ----
  logic sys_clk = 1'b0, sys_rst_n = 1'b0, mb_debug_sys_rst = 1'b0;
  logic clk_sys, clk_sys_90, clk_200, clk_62_5, pll_locked, mb_reset, bus_struct_reset;
  bus_req_t plb_req = '0;
  bus_rsp_t plb_rsp, ext_rsp;
  logic [NUM_PERIPH-1:0] ext_sel;
  logic        ilmb_en = 1'b0, dlmb_en = 1'b0;
  logic [3:0]  ilmb_we = '0, dlmb_we = '0;
  logic [31:0] ilmb_addr = '0, dlmb_addr = '0, ilmb_wdata = '0, dlmb_wdata = '0;
  logic [31:0] ilmb_rdata, dlmb_rdata;
  logic [7:0]  leds_i = '0, leds_o, leds_t;
  logic [4:0]  led_pos_i = '0, led_pos_o, led_pos_t;
  logic [4:0]  buttons_i = '0;
  logic [7:0]  dip_i = '0;
  logic [2:0]  vol_dial_i = '0, vol_dial_o, vol_dial_t;
  logic        vol_dial_irq, ac97_irq;
  logic [6:0]  lcd;
  logic        ac97_bit_clk, ac97_sync, ac97_sdata_out, ac97_sdata_in, audio_reset_n;

  always #5 sys_clk = ~sys_clk;   // 100 MHz board clock

  mp3_player_top dut (.*);
  ac97_codec_model codec (.bit_clk(ac97_bit_clk), .sync(ac97_sync),
                          .sdata_out(ac97_sdata_out), .sdata_in(ac97_sdata_in));

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- mechanism counters ----
  int n_bram = 0, n_bus_err = 0, n_ext = 0, n_ext_wait = 0, n_gpio_out = 0;
  int n_button = 0, n_dial_irq = 0, n_reg_wr = 0, n_reg_rd = 0, n_reg_busy = 0;
  int n_underrun = 0, n_ac97_irq = 0, n_fifo_stall = 0, n_lcd_busy = 0;
  int n_lcd_overrun = 0, n_lcd_bytes = 0, n_full_drop = 0;

  // ---- external slaves (timer, SRAM, ...): answer after EXT_WAIT cycles ----
  localparam int EXT_WAIT = 3;
  int ext_cnt = 0;
  int ext_last_sel = -1;
  logic [31:0] sram [logic [31:0]];
  always @(posedge clk_sys) begin
    ext_rsp <= BUS_RSP_IDLE;
    if (ext_sel != '0 && !ext_rsp.ack) begin
      if (ext_cnt < EXT_WAIT) begin
        ext_cnt <= ext_cnt + 1;
        n_ext_wait++;
      end else begin
        ext_cnt <= 0;
        ext_rsp.ack <= 1'b1;
        for (int i = 0; i < NUM_PERIPH; i++) if (ext_sel[i]) ext_last_sel = i;
        if (plb_req.wr) sram[plb_req.addr] = plb_req.wdata;
        ext_rsp.rdata <= sram.exists(plb_req.addr) ? sram[plb_req.addr] : plb_req.addr ^ 32'h5A5A_0000;
      end
    end
  end

  // ---- display model: one nibble per falling edge of E (out of reset) ----
  logic [4:0] nibbles [$];    // {rs, db7..db4}
  logic lcd_e_q = 1'b0;
  int lcd_rw_high = 0;
  always @(posedge clk_sys) if (audio_reset_n) begin
    lcd_e_q <= lcd[0];
    if (lcd[2]) lcd_rw_high++;
    if (lcd_e_q && !lcd[0]) nibbles.push_back({lcd[1], lcd[3], lcd[4], lcd[5], lcd[6]});
  end

  // ---- FIFO interrupt edges ----
  logic irq_q = 1'b0;
  always @(posedge clk_sys) if (audio_reset_n) begin
    irq_q <= ac97_irq;
    if (ac97_irq && !irq_q) n_ac97_irq++;
  end

  // ---- processor bus master ----
  task automatic bus_access(input logic [31:0] a, input logic wr, input logic [31:0] d,
                            output logic [31:0] q, output logic err);
    @(posedge clk_sys);
    plb_req <= '{addr: a, wdata: d, be: 4'hF, wr: wr, rd: !wr};
    do @(posedge clk_sys); while (!plb_rsp.ack);
    q   = plb_rsp.rdata;
    err = plb_rsp.err;
    plb_req.wr <= 1'b0;
    plb_req.rd <= 1'b0;
  endtask

  task automatic wr32(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] q;
    logic e;
    bus_access(a, 1'b1, d, q, e);
    check(!e, $sformatf("write %h without error", a));
  endtask

  task automatic rd32(input logic [31:0] a, output logic [31:0] q);
    logic e;
    bus_access(a, 1'b0, '0, q, e);
    check(!e, $sformatf("read %h without error", a));
  endtask

  localparam logic [31:0] AC97 = 32'hFFFF_8000;
  localparam logic [31:0] LCD  = 32'hCF40_0000;
  localparam logic [31:0] DIAL = 32'h4000_0000;
  localparam logic [31:0] BTN  = 32'h8140_0000;
  localparam logic [31:0] LPOS = 32'h8142_0000;
  localparam logic [31:0] LEDS = 32'h8144_0000;
  localparam logic [31:0] DIP  = 32'h8146_0000;

  task automatic codec_write(input logic [6:0] r, input logic [15:0] v);
    logic [31:0] st;
    wr32(AC97 + AC97_OFS_REG_WRITE, 32'(v));
    wr32(AC97 + AC97_OFS_REG_ADDR, 32'(r));
    do begin
      rd32(AC97 + AC97_OFS_STATUS, st);
      if (st[ST_REG_BUSY]) n_reg_busy++;
    end while (st[ST_REG_BUSY]);
    check(st[ST_REG_DONE], "codec access finished");
    n_reg_wr++;
  endtask

  // ---- LCD work list: 4-bit init, setup, title on line 1, author on line 2 ----
  logic [9:0] lcd_cmds [$];
  string title  = "Tom's Diner";
  string author = "Suzanne Vega";

  task automatic build_lcd_cmds();
    lcd_cmds.push_back(10'h230);
    lcd_cmds.push_back(10'h230);
    lcd_cmds.push_back(10'h230);
    lcd_cmds.push_back(10'h220);
    lcd_cmds.push_back(10'h028);   // function set: 4-bit, 2 lines
    lcd_cmds.push_back(10'h00C);   // display on
    lcd_cmds.push_back(10'h006);   // entry mode
    lcd_cmds.push_back(10'h001);   // clear
    lcd_cmds.push_back(10'h080);   // line 1
    for (int i = 0; i < title.len(); i++) lcd_cmds.push_back({2'b01, title[i]});
    lcd_cmds.push_back(10'h0C0);   // line 2
    for (int i = 0; i < author.len(); i++) lcd_cmds.push_back({2'b01, author[i]});
  endtask

  int lcd_next = 0;
  bit lcd_overrun_tried = 1'b0;

  // one step of LCD work: send the next byte if the display is free
  task automatic lcd_step();
    logic [31:0] st;
    if (lcd_next >= lcd_cmds.size()) return;
    rd32(LCD, st);
    if (st[0]) begin
      n_lcd_busy++;
      // once, write while busy: the byte must be dropped and flagged
      if (!lcd_overrun_tried && lcd_next > 8) begin
        lcd_overrun_tried = 1'b1;
        wr32(LCD, 32'h141);
        rd32(LCD, st);
        check(st[1], "LCD overrun flagged");
        if (st[1]) n_lcd_overrun++;
      end
    end else begin
      wr32(LCD, 32'(lcd_cmds[lcd_next]));
      lcd_next++;
      n_lcd_bytes++;
    end
  endtask

  function automatic logic [31:0] sample(input int i);
    return {16'(i * 7 + 3), 16'(16'h8000 ^ i)};
  endfunction

  // ---- main sequence ----
  localparam int FRAME_SAMPLES = 1152;

  initial begin
    logic [31:0] st, d;
    logic err;
    realtime t_lock, t_rel, t_a, t_b;
    int f_a, f_b, s_a, s_b, nz;
    int lock_edges;

    // reset and clock start-up
    repeat (20) @(posedge sys_clk);
    #1 check(!pll_locked && mb_reset && bus_struct_reset && !audio_reset_n,
             "all in reset while board reset held");
    sys_rst_n = 1'b1;
    lock_edges = 0;
    while (!pll_locked) begin
      @(posedge sys_clk); #0.1; lock_edges++;
    end
    t_lock = $realtime;
    check(lock_edges <= 32, "PLL locks within 32 reference edges");
    @(negedge bus_struct_reset);
    check(mb_reset && !audio_reset_n, "bus released before peripherals and processor");
    @(negedge mb_reset);
    t_rel = $realtime;
    check(!bus_struct_reset && audio_reset_n, "processor released last, codec out of reset");
    // lock, 2 synchroniser clocks, 48 counter clocks, 1 register: 51 cycles of 8 ns
    check(t_rel - t_lock > 8.0 * 50 && t_rel - t_lock < 8.0 * 53, "processor reset release time");

    // boot: vectors written over the data bus, fetched on the instruction bus
    for (int i = 0; i < 8; i++) begin
      @(negedge clk_sys);
      dlmb_en = 1'b1; dlmb_we = 4'hF; dlmb_addr = 32'(i * 4); dlmb_wdata = 32'hB000_0000 | 32'(i);
    end
    @(negedge clk_sys);
    dlmb_en = 1'b0; dlmb_we = '0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk_sys);
      ilmb_en = 1'b1; ilmb_addr = 32'(i * 4);
      @(posedge clk_sys); #1;
      check(ilmb_rdata == (32'hB000_0000 | 32'(i)), "instruction fetch of boot vector");
      n_bram++;
    end
    @(negedge clk_sys);
    ilmb_en = 1'b0;

    // unmapped addresses answer with an error
    bus_access(32'h6000_0000, 1'b0, '0, d, err);
    check(err && d == '0, "unmapped read errors");
    if (err) n_bus_err++;
    bus_access(32'hFFFF_8100, 1'b1, 32'h1, d, err);
    check(err, "write just past the AC97 window errors");
    if (err) n_bus_err++;

    // external slaves: SRAM write/read and a timer read, with wait states
    wr32(32'h2010_0040, 32'hCAFE_F00D);
    check(ext_last_sel == SEL_SRAM, "SRAM selected");
    rd32(32'h2010_0040, d);
    check(d == 32'hCAFE_F00D, "SRAM read back");
    n_ext += 2;
    rd32(32'h2000_0004, d);
    check(ext_last_sel == SEL_TIMER && d == (32'h2000_0004 ^ 32'h5A5A_0000), "timer read");
    n_ext++;
    rd32(32'h8180_0000, d);
    check(ext_last_sel == SEL_INTC, "interrupt controller selected");
    n_ext++;

    // LEDs: outputs
    wr32(LEDS + 32'h4, 32'h00);
    wr32(LEDS, 32'hA5);
    check(leds_o == 8'hA5 && leds_t == 8'h00, "LED pins driven");
    wr32(LPOS + 32'h4, 32'h00);
    wr32(LPOS, 32'h11);
    check(led_pos_o == 5'h11 && led_pos_t == 5'h00, "LED position pins driven");
    n_gpio_out += 2;
    // buttons and DIP switches: inputs
    @(negedge clk_sys);
    buttons_i = 5'b00100;            // play
    dip_i     = 8'h80;               // switch 8: caches on
    repeat (3) @(posedge clk_sys);
    rd32(BTN, d);
    check(d[4:0] == 5'b00100, "play button read");
    rd32(DIP, d);
    check(d[7:0] == 8'h80, "DIP switch 8 read");
    n_button++;
    // volume dial: inputs with the change interrupt
    wr32(DIAL + 32'h4, 32'h7);
    wr32(DIAL + 32'h128, 32'h1);
    wr32(DIAL + 32'h11C, 32'h8000_0000);
    check(!vol_dial_irq, "no dial interrupt before a change");
    @(negedge clk_sys);
    vol_dial_i = 3'b001;             // encoder A moves
    repeat (5) @(posedge clk_sys);
    check(vol_dial_irq, "dial interrupt on a change");
    if (vol_dial_irq) n_dial_irq++;
    rd32(DIAL, d);
    check(d[2:0] == 3'b001, "dial pins read");
    wr32(DIAL + 32'h120, 32'h1);
    repeat (2) @(posedge clk_sys);
    check(!vol_dial_irq, "dial interrupt cleared");

    // codec setup as the player does it
    rd32(AC97 + AC97_OFS_STATUS, st);
    check(st[ST_IN_EMPTY] && !st[ST_IN_FULL], "FIFO empty after reset");
    codec_write(7'h00, 16'h0000);
    do rd32(AC97 + AC97_OFS_STATUS, st); while (!st[ST_CODEC_RDY]);
    wr32(AC97 + AC97_OFS_CONTROL, 32'h3);
    // the driver's FIFO clear: 512 zero writes without polling; writes into
    // a full FIFO are dropped and acknowledged, so the bus never stalls
    begin
      realtime t0;
      t0 = $realtime;
      for (int i = 0; i < 512; i++) wr32(AC97 + AC97_OFS_IN_FIFO, 32'h0);
      // each write is 3 clocks of this master (issue, ack, release), full or not
      check($realtime - t0 <= 512.0 * 3.0 * 8.0 + 16.0,
            $sformatf("zero writes never wait on a full FIFO (%.0f ns)", $realtime - t0));
      rd32(AC97 + AC97_OFS_STATUS, st);
      check(st[ST_IN_FULL] && st[ST_IN_LEVEL_LSB +: 5] == 5'd16, "FIFO holds 16 after 512 writes");
      if (st[ST_IN_FULL]) n_full_drop++;
    end
    codec_write(7'h2C, 16'd44100);
    codec_write(7'h02, 16'h0000);
    codec_write(7'h04, 16'h0000);
    codec_write(7'h18, 16'h0000);
    codec_write(7'h0A, 16'h8000);
    check(codec.regs[7'h2C >> 1] == 16'd44100, "DAC rate reached the codec");
    check(codec.reg_writes == 6, "six codec register writes");
    wr32(AC97 + AC97_OFS_REG_ADDR, 32'h80 | 32'h7C);
    do begin
      rd32(AC97 + AC97_OFS_STATUS, st);
      if (st[ST_REG_BUSY]) n_reg_busy++;
    end while (st[ST_REG_BUSY]);
    rd32(AC97 + AC97_OFS_REG_READ, d);
    check(d[15:0] == 16'h4144, "codec vendor ID read");
    n_reg_rd++;

    // the zeros play out, then the codec's requests find an empty FIFO
    do rd32(AC97 + AC97_OFS_STATUS, st); while (!st[ST_IN_EMPTY]);
    repeat (3000) @(posedge clk_sys);
    rd32(AC97 + AC97_OFS_STATUS, st);
    check(st[ST_IN_UNDERRUN], "underrun before playback");
    if (st[ST_IN_UNDERRUN]) n_underrun++;
    wr32(AC97 + AC97_OFS_CONTROL, 32'h1 | 32'h4);   // clear, enable FIFO interrupt
    repeat (6000) @(posedge clk_sys);               // let silent frames pass
    codec.samples.delete();
    codec.errors = 0;

    // one MP3 frame, LCD written while the FIFO is full
    build_lcd_cmds();
    f_a = 0; s_a = 0; t_a = 0.0;
    for (int i = 0; i < FRAME_SAMPLES; i++) begin
      if (i == 576) begin
        // a decoder sleeping until the FIFO asks for data
        check(!ac97_irq, "no FIFO interrupt while the FIFO is well filled");
        wait (ac97_irq);
        rd32(AC97 + AC97_OFS_STATUS, st);
        check(!st[ST_IN_HALF_FULL] && !st[ST_IN_EMPTY], "interrupt below half full, before empty");
      end
      if (i == 864) begin
        // a long stall: the codec runs dry
        repeat (80000) @(posedge clk_sys);
        rd32(AC97 + AC97_OFS_STATUS, st);
        check(st[ST_IN_UNDERRUN] && st[ST_IN_EMPTY], "underrun during playback");
        if (st[ST_IN_UNDERRUN]) n_underrun++;
        wr32(AC97 + AC97_OFS_CONTROL, 32'h4);
      end
      do begin
        rd32(AC97 + AC97_OFS_STATUS, st);
        if (st[ST_IN_FULL]) begin
          n_fifo_stall++;
          lcd_step();
        end
      end while (st[ST_IN_FULL]);
      wr32(AC97 + AC97_OFS_IN_FIFO, sample(i));
      // sample-rate window: the FIFO is kept full from sample 100 to 500
      if (i == 100) begin
        t_a = $realtime; f_a = codec.frames; s_a = codec.samples.size();
      end
      if (i == 500) begin
        t_b = $realtime; f_b = codec.frames; s_b = codec.samples.size();
      end
    end
    do rd32(AC97 + AC97_OFS_STATUS, st); while (!st[ST_IN_EMPTY]);
    while (lcd_next < lcd_cmds.size()) lcd_step();
    do rd32(LCD, st); while (st[0]);
    repeat (6000) @(posedge clk_sys);

    // audio: every sample once, in order (silence from the underruns removed)
    nz = 0;
    for (int k = 0; k < codec.samples.size(); k++)
      if (codec.samples[k] != 32'h0) begin
        if (nz < FRAME_SAMPLES) check(codec.samples[k] == sample(nz), "sample order and value");
        nz++;
      end
    check(nz == FRAME_SAMPLES, $sformatf("%0d of %0d samples played", nz, FRAME_SAMPLES));
    check(codec.errors == 0, "samples only in requested frames");
    // 48 kHz frames, 44.1 kHz samples
    check((t_b - t_a) / real'(f_b - f_a) > 20_800.0 && (t_b - t_a) / real'(f_b - f_a) < 20_870.0,
          "AC-link frame period 20.83 us");
    check(real'(s_b - s_a) / real'(f_b - f_a) > 0.910 && real'(s_b - s_a) / real'(f_b - f_a) < 0.927,
          "44.1 kHz samples per 48 kHz frame");
    $display("rate window: %0d samples in %0d frames, %.1f ns per frame",
             s_b - s_a, f_b - f_a, (t_b - t_a) / real'(f_b - f_a));

    // display: exact nibble sequence, write-only
    begin
      int n;
      n = 0;
      check(nibbles.size() == 4 + 2 * (lcd_cmds.size() - 4), "LCD nibble count");
      for (int k = 0; k < lcd_cmds.size() && n + 1 < nibbles.size(); k++) begin
        if (lcd_cmds[k][9]) begin
          check(nibbles[n] == {1'b0, lcd_cmds[k][7:4]}, "LCD init nibble");
          n++;
        end else begin
          check(nibbles[n]   == {lcd_cmds[k][8], lcd_cmds[k][7:4]} &&
                nibbles[n+1] == {lcd_cmds[k][8], lcd_cmds[k][3:0]}, "LCD byte nibbles");
          n += 2;
        end
      end
    end
    check(lcd_rw_high == 0, "LCD RW held low");

    // every mechanism must have happened
    check(n_bram > 0,        "mechanism: local-memory boot fetch");
    check(n_bus_err > 0,     "mechanism: bus error");
    check(n_ext > 0,         "mechanism: external slave access");
    check(n_ext_wait > 0,    "mechanism: external wait states");
    check(n_gpio_out > 0,    "mechanism: GPIO outputs");
    check(n_button > 0,      "mechanism: GPIO inputs");
    check(n_dial_irq > 0,    "mechanism: volume-dial interrupt");
    check(n_reg_wr > 0,      "mechanism: codec register write");
    check(n_reg_rd > 0,      "mechanism: codec register read");
    check(n_reg_busy > 0,    "mechanism: register access busy");
    check(n_underrun >= 2,   "mechanism: FIFO underrun");
    check(n_ac97_irq > 0,    "mechanism: FIFO interrupt");
    check(n_fifo_stall > 0,  "mechanism: full-FIFO stall");
    check(n_lcd_busy > 0,    "mechanism: LCD busy");
    check(n_lcd_overrun > 0, "mechanism: LCD overrun");
    check(n_lcd_bytes > 0,   "mechanism: LCD writes");
    check(n_full_drop > 0,   "mechanism: write into a full FIFO dropped");
    $display("mechanisms: bram %0d buserr %0d ext %0d extwait %0d gpio_out %0d button %0d dial_irq %0d",
             n_bram, n_bus_err, n_ext, n_ext_wait, n_gpio_out, n_button, n_dial_irq);
    $display("mechanisms: reg_wr %0d reg_rd %0d reg_busy %0d underrun %0d ac97_irq %0d stall %0d",
             n_reg_wr, n_reg_rd, n_reg_busy, n_underrun, n_ac97_irq, n_fifo_stall);
    $display("mechanisms: lcd_busy %0d lcd_overrun %0d lcd_bytes %0d full_drop %0d",
             n_lcd_busy, n_lcd_overrun, n_lcd_bytes, n_full_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #80ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
