// tb_p_controller - self-checking test of the phase-loop proportional controller.
//
// Every signed error value is applied; the DAC code must be 32768 + KP*err, clipped to
// 0..65535, one cycle after in_valid. Disabling the controller must return the code to
// mid-scale with one dac_valid strobe. A second instance with a gain large enough to clip
// checks both saturation limits.
`timescale 1ns/1ps
module tb_p_controller;
  localparam int unsigned W = 10;

  logic clk = 1'b0, rst = 1'b1, en = 1'b1, in_valid = 1'b0;
  logic signed [W-1:0] err = '0;
  logic [15:0] dac, dac_big;
  logic dac_valid, dac_valid_big;
  int checks = 0, failures = 0;

  p_controller #(.W(W), .KP(64))  dut  (.clk, .rst, .en, .in_valid, .err, .dac, .dac_valid);
  p_controller #(.W(W), .KP(300)) dutb (.clk, .rst, .en, .in_valid, .err, .dac(dac_big),
                                        .dac_valid(dac_valid_big));

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
      if (failures < 20) $display("FAIL %s: err=%0d dac=%0d big=%0d", what, err, dac, dac_big);
    end
  endtask

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 65535) ? 65535 : v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(dac == 16'd32768, "mid-scale after reset");
    for (int v = -512; v < 512; v++) begin
      err = W'(v); in_valid = 1'b1;
      @(posedge clk); #1;
      in_valid = 1'b0;
      check(dac_valid, "valid");
      check(int'(dac) == clip(32768 + 64 * v), "code");
      check(int'(dac_big) == clip(32768 + 300 * v), "clipped code");
    end
    en = 1'b0;
    @(posedge clk); #1;
    check(dac == 16'd32768 && dac_valid, "back to mid-scale when disabled");
    @(posedge clk); #1;
    check(!dac_valid, "single update when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
