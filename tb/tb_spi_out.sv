// tb_spi_out - self-checking test of the DAC SPI master.
//
// A model of the DAC's serial input in the testbench shifts din in on every falling sclk edge
// while sync_n is low and checks each frame at the rising edge of sync_n: 24 bits, the top eight
// (six don't-care and two power-down bits) zero, the low 16 equal to the code sent. Frames must
// take at least 2*HALF*24 + HALF + 1 clock cycles from one sync_n fall to the next (99 at
// HALF = 2, shorter than the 144-cycle beat period). Codes written during a frame: only the last
// one is sent, right after the frame.
`timescale 1ns/1ps
module tb_spi_out;
  localparam int unsigned HALF = 2;

  logic clk = 1'b0, rst = 1'b1, code_valid = 1'b0;
  logic [15:0] code = '0;
  logic sclk, sync_n, din, busy;
  int checks = 0, failures = 0;
  logic [23:0] sh;
  int nbits = 0, frames = 0;
  logic [15:0] got [$];
  longint cyc = 0, t_fall = 0, t_prev_fall = -1;

  spi_out #(.HALF(HALF)) dut (.clk, .rst, .code_valid, .code, .sclk, .sync_n, .din, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // DAC input model
  always @(negedge sclk) if (!sync_n && !rst) begin sh <= {sh[22:0], din}; nbits <= nbits + 1; end
  always @(negedge sync_n) if (!rst) begin
    nbits <= 0;
    check(sclk == 1'b1, "sclk high when sync_n falls");
    t_prev_fall = t_fall; t_fall = cyc;
    if (frames > 0) check(t_fall - t_prev_fall >= 2 * HALF * 24 + HALF, "frame spacing");
  end
  always @(posedge sync_n) if (!rst) begin
    check(nbits == 24, "24 bits per frame");
    check(sh[23:16] == 8'h00, "control bits zero");
    got.push_back(sh[15:0]);
    frames++;
  end

  initial begin
    logic [15:0] sent [$];
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // single codes, each waiting for the frame to finish
    for (int i = 0; i < 30; i++) begin
      longint t0;
      code = 16'($urandom); code_valid = 1'b1; sent.push_back(code);
      @(posedge clk); #1 code_valid = 1'b0;
      t0 = cyc;
      @(posedge sync_n);
      @(posedge clk iff !busy);
      #1;
      check(cyc - t0 <= 2 * HALF * 25 + 3, "frame fits the beat period");
      check(cyc - t0 <= 144, "frame shorter than 144 cycles");
    end
    // codes arriving during a frame: only the newest survives
    code = 16'h1234; code_valid = 1'b1; sent.push_back(code);
    @(posedge clk); #1 code_valid = 1'b0;
    repeat (10) @(posedge clk);
    #1 code = 16'hAAAA; code_valid = 1'b1;
    @(posedge clk); #1 code = 16'h5A5A;
    @(posedge clk); #1 code_valid = 1'b0; sent.push_back(16'h5A5A);
    repeat (400) @(posedge clk);
    check(got.size() == sent.size(), "frame count");
    foreach (sent[i]) if (i < got.size()) check(got[i] == sent[i], "code in frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
