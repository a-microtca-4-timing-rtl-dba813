// tb_dmtd_phase_detector - self-checking test of the digital DMTD phase detector.
//
// clk_ref runs at f_ref = 69.397 MHz, clk_dmtd at f_ref*144/145 and clk_out at f_ref but
// delayed by tau. For each tau the detector must give n = tau * N * f_ref (mod N) to within one
// count (about 100 ps), and results must arrive once per beat period, N clk_dmtd cycles apart
// (one cycle of slack for where the sampling edges fall).
`timescale 1ns/1fs
module tb_dmtd_phase_detector;
  localparam int unsigned N  = 144;
  localparam int unsigned NW = $clog2(2 * N);
  localparam real T_REF  = 1.0e3 / 69.396944444;
  localparam real T_DMTD = T_REF * real'(N + 1) / real'(N);

  logic clk_dmtd = 1'b0, clk_ref = 1'b0, clk_out = 1'b0, rst = 1'b1;
  real  tau = 0.0;
  logic [NW-1:0] n;
  logic n_valid;
  int checks = 0, failures = 0;
  longint cyc = 0;

  dmtd_phase_detector #(.N(N)) dut (.clk_dmtd, .rst, .clk_ref, .clk_out, .n, .n_valid);

  always #(T_DMTD / 2) clk_dmtd = ~clk_dmtd;
  always #(T_REF / 2) clk_ref = ~clk_ref;
  // clk_out: same period as clk_ref; a change of tau stretches one half period once
  real extra = 0.0;
  always begin
    real e;
    e = extra;
    extra = 0.0;
    #(T_REF / 2 + e);
    clk_out = ~clk_out;
  end

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
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  always @(posedge clk_dmtd) cyc <= cyc + 1;

  initial begin
    repeat (5) @(posedge clk_dmtd);
    rst <= 1'b0;
    for (int i = 0; i < 40; i++) begin
      real expn; int d;
      real new_tau;
      longint t0;
      new_tau = (i < 8) ? real'(i) * T_REF / 8.0 : T_REF * real'($urandom_range(0, 9999)) / 10000.0;
      extra = (new_tau >= tau) ? new_tau - tau : new_tau - tau + T_REF;
      tau = new_tau;
      repeat (2) @(posedge clk_dmtd iff n_valid);
      t0 = cyc;
      @(posedge clk_dmtd iff n_valid);
      check(cyc - t0 >= N - 1 && cyc - t0 <= N + 1, "one result per beat period");
      #1;
      expn = tau * real'(N) / T_REF;
      d = int'(n) - int'(expn + 0.5);
      if (d > int'(N) / 2)  d -= N;
      if (d < -int'(N) / 2) d += N;
      check(d >= -1 && d <= 1, "phase count");
      if (i < 8 || d < -1 || d > 1)
        $display("tau=%0.4f ns n=%0d expected %0.2f", tau, n, expn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
