// tb_freq_detector - self-checking test of the frequency detector.
//
// Three free-running clocks: the system clock at f_dmtd (68.918 MHz), clk_ref at f_ref
// (69.397 MHz) and clk_out at a frequency changed from step to step. With a short window the
// detector must report (f_ref - f_out) * WINDOW / f_dmtd to within two counts (each of the two
// edge counts is quantised), its results must come exactly WINDOW system clocks apart, and the
// first window after reset must give no result.
`timescale 1ns/1fs
module tb_freq_detector;
  localparam int unsigned WINDOW = 20000;
  localparam real T_DMTD = 1.0e3 / 68.918344828;   // ns
  localparam real T_REF  = 1.0e3 / 69.396944444;

  logic clk = 1'b0, clk_ref = 1'b0, clk_out = 1'b0, rst = 1'b1;
  real  t_out = T_REF;
  logic signed [23:0] diff;
  logic diff_valid;
  int checks = 0, failures = 0;
  longint cyc = 0, last_valid = -1;
  int n_valid = 0;

  freq_detector #(.WINDOW(WINDOW)) dut (.clk, .rst, .clk_ref, .clk_out, .diff, .diff_valid);

  always #(T_DMTD / 2) clk = ~clk;
  always #(T_REF / 2) clk_ref = ~clk_ref;
  initial forever #(t_out / 2) clk_out = ~clk_out;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (diff_valid && !rst) begin
      n_valid <= n_valid + 1;
      if (last_valid >= 0) check(cyc - last_valid == WINDOW, "window period");
      last_valid <= cyc;
    end
  end

  real offsets_ppm [6] = '{0.0, 100.0, -250.0, 3000.0, -3500.0, 12.5};

  initial begin
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (WINDOW) @(posedge clk);
    check(n_valid == 0, "no result from the first window");
    foreach (offsets_ppm[i]) begin
      real f_out, f_ref, expd;
      f_ref = 1.0e3 / T_REF;
      f_out = f_ref * (1.0 + offsets_ppm[i] * 1.0e-6);
      t_out = 1.0e3 / f_out;
      // skip two results so that a whole window runs at the new frequency
      repeat (2) @(posedge clk iff diff_valid);
      @(posedge clk iff diff_valid);
      #1;
      expd = (f_ref - f_out) * real'(WINDOW) * T_DMTD / 1.0e3;
      check(real'(diff) > expd - 2.0 && real'(diff) < expd + 2.0, "difference value");
      $display("offset %0.1f ppm: diff=%0d expected %0.2f", offsets_ppm[i], diff, expd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
