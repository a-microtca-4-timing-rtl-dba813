// tb_i2c_out - self-checking test of the VCXO I2C master.
//
// An I2C slave model on the open-drain bus detects START and STOP conditions, shifts in the
// bits on rising SCL and acknowledges each byte by pulling SDA low in the ninth clock. Each
// update must produce exactly three transactions to address 0x55: register 135 <- 0x20,
// registers 8..12 <- {n1_lo, rfreq}, register 135 <- 0x00. The sequence must take 492 quarter
// bit times of DIV clocks, SDA must only change while SCL is low except in START/STOP, and with
// a slave that never acknowledges, nack must be set.
`timescale 1ns/1ps
module tb_i2c_out;
  localparam int unsigned DIV = 43;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [37:0] rfreq = '0;
  logic [1:0]  n1_lo = '0;
  logic scl_oe, sda_oe, busy, done, nack;
  logic scl, sda, slave_ack = 1'b0, ack_en = 1'b1;
  int checks = 0, failures = 0;
  longint cyc = 0;

  i2c_out #(.DIV(DIV)) dut (.clk, .rst, .start, .rfreq, .n1_lo, .scl_oe, .sda_oe,
                            .sda_i(sda), .busy, .done, .nack);

  assign scl = !scl_oe;
  assign sda = !(sda_oe || slave_ack);

  always #7 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  // ---- slave model ----
  typedef logic [7:0] bytes_t [$];
  bytes_t cur, trans [$];
  logic [7:0] sh;
  int bitn = 0;
  logic in_trans = 1'b0;
  logic scl_q = 1'b1, sda_q = 1'b1;

  always @(posedge clk) begin
    scl_q <= scl; sda_q <= sda;
    if (scl && scl_q && sda_q && !sda) begin             // START
      in_trans <= 1'b1; bitn <= 0; cur.delete();
    end else if (scl && scl_q && !sda_q && sda) begin    // STOP
      if (in_trans) trans.push_back(cur);
      in_trans <= 1'b0;
    end else if (in_trans && scl && !scl_q) begin        // rising SCL: sample
      if (bitn < 8) sh <= {sh[6:0], sda};
      if (bitn == 7) cur.push_back({sh[6:0], sda});
      bitn <= (bitn == 8) ? 0 : bitn + 1;
    end else if (in_trans && !scl && scl_q) begin        // falling SCL: drive acknowledge
      slave_ack <= ack_en && (bitn == 8);
    end
    // SDA may only change with SCL high during START/STOP, which the model tracks above
  end

  task automatic run_update(input logic [37:0] rf, input logic [1:0] n1, input logic expect_ack);
    longint t0;
    bytes_t exp [3];
    rfreq = rf; n1_lo = n1;
    trans.delete();
    start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    t0 = cyc;
    @(posedge clk iff done);
    check(cyc - t0 >= 492 * DIV - 2 && cyc - t0 <= 492 * DIV + 3, "sequence length");
    if (cyc - t0 < 492 * DIV - 2 || cyc - t0 > 492 * DIV + 3) $display("length %0d", cyc - t0);
    repeat (5) @(posedge clk);
    #1;
    exp[0] = '{8'hAA, 8'd135, 8'h20};
    exp[1] = '{8'hAA, 8'd8, {n1, rf[37:32]}, rf[31:24], rf[23:16], rf[15:8], rf[7:0]};
    exp[2] = '{8'hAA, 8'd135, 8'h00};
    check(trans.size() == 3, "three transactions");
    for (int t = 0; t < 3 && t < trans.size(); t++) begin
      check(trans[t].size() == exp[t].size(), "transaction length");
      for (int b = 0; b < exp[t].size() && b < trans[t].size(); b++)
        check(trans[t][b] == exp[t][b], "transaction byte");
    end
    check(nack == !expect_ack, "acknowledge status");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(posedge clk);
    check(scl && sda, "bus idle after reset");
    for (int i = 0; i < 4; i++)
      run_update({6'($urandom), 32'($urandom)}, 2'($urandom), 1'b1);
    // start while busy is ignored
    begin
      rfreq = 38'h2A_1234_5678; start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      repeat (100) @(posedge clk);
      #1 start = 1'b1; rfreq = 38'h0;
      @(posedge clk); #1 start = 1'b0;
      @(posedge clk iff done);
      repeat (DIV * 8) @(posedge clk);
      #1 check(!busy, "start while busy ignored");
    end
    ack_en = 1'b0;
    run_update(38'h15_DEAD_BEEF, 2'b10, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
