// tb_pi_controller - self-checking test of the frequency-loop PI controller.
//
// Random errors (small ones inside the dead band, medium ones, and large ones that drive the
// output into its +-LIMIT bound) are applied at random intervals. A model in the testbench keeps
// its own integrator and output with 64-bit arithmetic and the same saturation; u must match it
// one cycle after each e_valid, u_valid must pulse exactly when u changed, and disabling the
// controller must clear it.
`timescale 1ns/1ps
module tb_pi_controller;
  localparam int KP = 1024, KI = 1024, LIMIT = 40_000_000, DB = 1;

  logic clk = 1'b0, rst = 1'b1, en = 1'b1, e_valid = 1'b0;
  logic signed [23:0] e = '0;
  logic signed [31:0] u;
  logic u_valid;
  int checks = 0, failures = 0;
  longint m_acc = 0, m_u = 0;

  pi_controller dut (.clk, .rst, .en, .e_valid, .e, .u, .u_valid);

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
      if (failures < 20) $display("FAIL %s: u=%0d model=%0d", what, u, m_u);
    end
  endtask

  function automatic longint sat(input longint x);
    if (x > LIMIT) return LIMIT;
    if (x < -LIMIT) return -LIMIT;
    return x;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      longint ev, nu; logic changed; int kind;
      kind = int'($urandom_range(0, 3));
      case (kind)
        0: ev = longint'($urandom_range(0, 2 * DB)) - DB;
        1: ev = longint'($urandom_range(0, 2000)) - 1000;
        2: ev = longint'($urandom_range(0, 200000)) - 100000;
        default: ev = longint'($urandom_range(0, 20)) - 10;
      endcase
      if (i == 1000) begin          // disable for a while: state must clear
        en = 1'b0;
        repeat (3) @(posedge clk);
        #1 en = 1'b1;
        m_acc = 0; m_u = 0;
        check(u == 0, "cleared when disabled");
      end
      e = 24'(ev); e_valid = 1'b1;
      changed = 1'b0;
      if (ev > DB || ev < -DB) begin
        m_acc = sat(m_acc + KI * ev);
        nu    = sat(KP * ev + m_acc);
        changed = (nu != m_u);
        m_u   = nu;
      end
      @(posedge clk); #1;
      e_valid = 1'b0;
      check(longint'(u) == m_u, "output value");
      check(u_valid == changed, "update strobe");
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        check(u_valid == 1'b0, "no strobe without e_valid");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
