// tb_trigger_channel - self-checking test of one monitoring channel.
//
// A reference model in the testbench tracks, edge by edge, when the last accepted trigger was
// sampled and computes the expected line level from delay, width, pulse count and polarity;
// retriggers inside a running train must be ignored. Random settings and random event streams
// are checked cycle by cycle, then a 65535-pulse train is counted, then DBUS mode (line equals
// the selected DBUS bit one edge after the frame) and input mode (one strobe per active edge,
// three edges after the line changes) are checked.
`timescale 1ns/1ps
module tb_trigger_channel;
  import afc_timing_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  chan_cfg_t  cfg;
  evt_frame_t frame;
  logic line_in, line_out, line_oe, in_evt;
  int checks = 0, failures = 0;
  longint edge_n = 0;

  trigger_channel dut (.clk, .rst, .cfg, .frame, .line_in, .line_out, .line_oe, .in_evt);

  always #4 clk = ~clk;
  always @(posedge clk) edge_n <= edge_n + 1;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at edge %0d", what, edge_n);
    end
  endtask

  // reference model state
  longint s0 = -1000000, s_last = -1000000;
  function automatic logic exp_active(input longint s);
    longint off, w, k, r;
    w   = (cfg.width == 0) ? 1 : longint'(cfg.width);
    off = s - s0 - longint'(cfg.delay);
    if (off < 0) return 1'b0;
    k = off / (2 * w);
    r = off % (2 * w);
    return (k < ((cfg.n_pulses == 0) ? 1 : longint'(cfg.n_pulses))) && (r < w);
  endfunction

  task automatic set_random_cfg();
    cfg          = '0;
    cfg.enable   = 1'b1;
    cfg.mode     = MODE_EVENT;
    cfg.polarity = 1'($urandom);
    cfg.evt_code = 8'($urandom_range(1, 255));
    cfg.delay    = 32'($urandom_range(0, 20));
    cfg.width    = 32'($urandom_range(0, 5));
    cfg.n_pulses = 16'($urandom_range(0, 4));
  endtask

  initial begin
    cfg = '0; frame = '0; line_in = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // ---- random event mode ----
    for (int run = 0; run < 40; run++) begin
      @(negedge clk);
      set_random_cfg();
      s0 = -1000000; s_last = -1000000;
      repeat (3) @(negedge clk);   // let the new settings settle (train of old cfg aborted? no: idle)
      for (int c = 0; c < 300; c++) begin
        longint s;
        frame.dbus = 8'($urandom);
        if ($urandom_range(0, 15) == 0) frame.code = cfg.evt_code;
        else                            frame.code = 8'($urandom);
        @(posedge clk);
        s = edge_n + 1;            // number of this edge
        if (frame.code == cfg.evt_code && frame.code != 0 && s > s_last + 1) begin
          longint w, np;
          w  = (cfg.width == 0) ? 1 : longint'(cfg.width);
          np = (cfg.n_pulses == 0) ? 1 : longint'(cfg.n_pulses);
          s0 = s;
          s_last = s + longint'(cfg.delay) + (2 * np - 1) * w - 1;
        end
        @(negedge clk);
        check(line_out == (cfg.polarity ^ exp_active(s)), "event-mode level");
        check(line_oe == 1'b1, "output enable");
      end
      // drain the train before changing settings
      frame = '0;
      repeat (250) @(negedge clk);
    end
    // ---- long train: 65535 pulses of width 1 after delay 1000 ----
    @(negedge clk);
    cfg = '0; cfg.enable = 1; cfg.mode = MODE_EVENT; cfg.evt_code = 8'h2A;
    cfg.delay = 1000; cfg.width = 1; cfg.n_pulses = 16'd65535;
    frame.code = 8'h2A;
    @(negedge clk); frame.code = 8'h00;
    begin
      int rises = 0, first = -1, cyc = 0; logic prev = 1'b0;
      while (cyc < 140000) begin
        @(negedge clk); cyc++;
        if (line_out && !prev) begin rises++; if (first < 0) first = cyc; end
        prev = line_out;
      end
      check(rises == 65535, "65535 pulses");
      check(first == 1000, "delay of 1000 event clocks");
      if (rises != 65535 || first != 1000) $display("rises=%0d first=%0d", rises, first);
    end
    // ---- DBUS mode ----
    @(negedge clk);
    cfg = '0; cfg.enable = 1; cfg.mode = MODE_DBUS;
    for (int c = 0; c < 400; c++) begin
      logic exp;
      if (c % 50 == 0) begin cfg.dbus_sel = 3'($urandom); cfg.polarity = 1'($urandom); end
      frame.dbus = 8'($urandom); frame.code = 8'($urandom);
      exp = cfg.polarity ^ frame.dbus[cfg.dbus_sel];
      @(negedge clk);
      check(line_out == exp, "DBUS mode level");
    end
    // ---- input mode ----
    cfg = '0; cfg.enable = 1; cfg.dir_in = 1; cfg.polarity = 1'b0;
    line_in = 1'b0;
    repeat (5) @(negedge clk);
    check(line_oe == 1'b0, "input releases the line");
    begin
      int strobes = 0, edges = 0; logic [5:0] hist = '0;
      for (int c = 0; c < 2000; c++) begin
        logic nl;
        nl = (c % 7 == 0) ? ~line_in : line_in;
        if (nl && !line_in) edges++;
        hist = {hist[4:0], nl && !line_in};
        line_in = nl;
        @(negedge clk);
        if (in_evt) strobes++;
        check(in_evt == hist[2], "input strobe timing");
      end
      repeat (5) @(negedge clk);
      check(strobes == edges, "one strobe per input edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
