// tb_event_receiver - self-checking test of the event receiver with all 18 channels.
//
// Every channel gets its own event code, delay, width, pulse count and polarity (AMC channels
// 14..17 are inputs). Isolated events are sent; for every edge the testbench predicts each
// output line from the edge at which the frame entered rx_frame (line active from two edges
// later plus the delay) and compares all ten POF and the active AMC outputs. Frames with rx_valid
// low must fire nothing. Then several AMC inputs fire together and the upstream codes must come
// out one per edge, lowest channel first, starting five edges after the inputs changed.
`timescale 1ns/1ps
module tb_event_receiver;
  import afc_timing_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  evt_frame_t rx_frame;
  logic rx_valid;
  chan_cfg_t cfg [N_CHAN];
  logic pof_out [N_POF];
  logic amc_out [N_AMC];
  logic amc_oe  [N_AMC];
  logic amc_in  [N_AMC];
  evt_code_t tx_code;
  int checks = 0, failures = 0;
  longint edge_n = 0;
  longint fire_at [N_CHAN];

  event_receiver dut (.clk, .rst, .rx_frame, .rx_valid, .cfg, .pof_out, .amc_out, .amc_oe,
                      .amc_in, .tx_code);

  always #4 clk = ~clk;
  always @(posedge clk) edge_n <= edge_n + 1;

  initial begin
    #2_000_000;
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

  function automatic logic exp_line(input int ch, input longint s);
    longint off, w;
    w   = longint'(cfg[ch].width);
    off = s - fire_at[ch] - longint'(cfg[ch].delay);
    if (off < 0) return cfg[ch].polarity;
    return cfg[ch].polarity ^ ((off / (2 * w) < longint'(cfg[ch].n_pulses)) && (off % (2 * w) < w));
  endfunction

  function automatic logic line(input int ch);
    return (ch < N_POF) ? pof_out[ch] : amc_out[ch - N_POF];
  endfunction

  initial begin
    rx_frame = '0; rx_valid = 1'b1;
    foreach (amc_in[k]) amc_in[k] = 1'b0;
    for (int ch = 0; ch < N_CHAN; ch++) begin
      cfg[ch]          = '0;
      cfg[ch].enable   = 1'b1;
      cfg[ch].mode     = MODE_EVENT;
      cfg[ch].dir_in   = (ch >= 14);
      cfg[ch].polarity = ch[0];
      cfg[ch].evt_code = 8'(10 + ch % 6);       // codes 10..15, shared by several channels
      cfg[ch].delay    = 32'(ch * 3);
      cfg[ch].width    = 32'(1 + ch % 4);
      cfg[ch].n_pulses = 16'(1 + ch % 3);
      cfg[ch].in_code  = 8'(100 + ch);
      fire_at[ch]      = -1000000;
    end
    foreach (amc_in[k]) amc_in[k] = cfg[N_POF+k].polarity;   // inputs idle at their inactive level
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int ev = 0; ev < 30; ev++) begin
      longint s;
      logic valid;
      @(negedge clk);
      valid      = (ev % 5 != 4);
      rx_valid   = valid;
      rx_frame.code = 8'(10 + $urandom_range(0, 5));
      rx_frame.dbus = 8'($urandom);
      @(posedge clk);
      s = edge_n + 1;
      for (int ch = 0; ch < N_CHAN; ch++)
        if (valid && cfg[ch].evt_code == rx_frame.code && !cfg[ch].dir_in) fire_at[ch] = s + 1;
      @(negedge clk);
      rx_frame = '0; rx_valid = 1'b1;
      for (int c = 0; c < 110; c++) begin
        s = edge_n;
        for (int ch = 0; ch < 14; ch++) check(line(ch) == exp_line(ch, s), "output line");
        for (int k = 0; k < N_AMC; k++) check(amc_oe[k] == (k < 4), "AMC output enable");
        @(negedge clk);
      end
    end
    // upstream events from AMC inputs 14, 16, 17 at once, then 15 alone
    @(negedge clk);
    amc_in[6] = ~amc_in[6]; amc_in[4] = ~amc_in[4]; amc_in[7] = ~amc_in[7];  // 17 is active low
    begin
      evt_code_t seen [$];
      int first = -1;
      for (int c = 0; c < 12; c++) begin
        @(negedge clk);
        if (tx_code != EVT_NULL) begin seen.push_back(tx_code); if (first < 0) first = c + 1; end
      end
      check(seen.size() == 3, "three upstream codes");
      if (seen.size() == 3) begin
        check(seen[0] == 8'd114 && seen[1] == 8'd116 && seen[2] == 8'd117, "upstream order");
      end
      check(first == 5, "upstream latency 5 edges");
      amc_in[5] = ~amc_in[5];
      seen.delete();
      for (int c = 0; c < 12; c++) begin
        @(negedge clk);
        if (tx_code != EVT_NULL) seen.push_back(tx_code);
      end
      check(seen.size() == 1 && seen[0] == 8'd115, "single upstream code, held level sends once");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
