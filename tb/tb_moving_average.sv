// tb_moving_average - self-checking test of the moving average filter.
//
// Random signed samples arrive at random intervals. The testbench keeps the full sample history
// and computes the sum of the last 2^L samples (missing ones counting as zero) directly, then
// avg = floor(sum / 2^L); the filter output must equal it one cycle after each in_valid.
// A constant input must come out unchanged once the window is full.
`timescale 1ns/1ps
module tb_moving_average;
  localparam int unsigned W = 10, L = 4;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [W-1:0] in = '0, avg;
  logic avg_valid;
  int checks = 0, failures = 0;
  int hist [$];

  moving_average #(.W(W), .L(L)) dut (.clk, .rst, .in_valid, .in, .avg, .avg_valid);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s: avg=%0d", what, avg);
    end
  endtask

  task automatic push(input int v);
    longint sum; int n; longint expv;
    in = W'(v); in_valid = 1'b1;
    hist.push_back(v);
    sum = 0;
    n = hist.size();
    for (int k = (n > (1 << L)) ? n - (1 << L) : 0; k < n; k++) sum += hist[k];
    // floor division by 2^L
    expv = (sum >= 0) ? sum / (1 << L) : -((-sum + (1 << L) - 1) / (1 << L));
    @(posedge clk); #1;
    in_valid = 1'b0;
    check(avg_valid == 1'b1, "valid follows input");
    check(longint'(avg) == expv, "average value");
    repeat ($urandom_range(0, 2)) begin
      @(posedge clk); #1;
      check(avg_valid == 1'b0, "no valid without input");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 500; i++) push(int'($urandom_range(0, 1000)) - 500);
    for (int i = 0; i < 40; i++) push(-77);
    check(avg == -77, "constant input passes unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
