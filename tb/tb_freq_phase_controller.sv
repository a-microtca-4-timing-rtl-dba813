// tb_freq_phase_controller - closed-loop test of the frequency and phase feedback controller.
//
// The controller drives a behavioural VCXO (tb/vcxo_model.sv) over I2C and SPI; the VCXO clock
// comes back as clk_out. The VCXO starts 300 ppm above f_ref, outside the +-192 ppm the DAC
// alone can reach, so the frequency loop has to pull it in before the phase loop can lock.
// To keep the run short the frequency window is 1/100 of the full one (resolution 1.8 kHz
// instead of 18 Hz) with PI gains scaled to match, and the phase loop uses an 8-sample average
// and a higher gain. Checked: the frequency loop writes the VCXO and then goes quiet, one DAC
// frame per phase measurement, the phase settles and stays constant (with a proportional phase
// controller the phase settles at a fixed offset from the setpoint that depends on the residual
// frequency error), and after a setpoint change it moves by the same amount.
`timescale 1ns/1fs
module tb_freq_phase_controller;
  localparam int unsigned N  = 144;
  localparam int unsigned NW = $clog2(2 * N);
  localparam real T_REF  = 1.0e3 / 69.396944444;
  localparam real T_DMTD = T_REF * real'(N + 1) / real'(N);

  logic clk = 1'b0, clk_ref = 1'b0, rst = 1'b1;
  logic clk_out, scl_oe, sda_oe, sda_pull, dac_sclk, dac_sync_n, dac_din, i2c_nack;
  logic freq_en = 1'b1, phase_en = 1'b1;
  logic [NW-1:0] phase_setpoint = NW'(40);
  logic signed [23:0] fd_diff;
  logic [NW-1:0] phase_n;
  logic [15:0] dac_code;
  logic [37:0] rfreq_word;
  logic scl, sda;
  int checks = 0, failures = 0;

  assign scl = !scl_oe;
  assign sda = !(sda_oe || sda_pull);

  always #(T_DMTD / 2) clk = ~clk;
  always #(T_REF / 2) clk_ref = ~clk_ref;

  freq_phase_controller #(.N(N), .WINDOW(38288), .KP_F(60000), .KI_F(120000),
                          .MA_L(3), .KP_P(256)) dut (
    .clk, .rst, .clk_ref, .clk_out, .freq_en, .phase_en, .phase_setpoint,
    .rfreq_center(38'd11381663334), .n1_lo(2'b00),
    .scl_oe, .sda_oe, .sda_i(sda), .dac_sclk, .dac_sync_n, .dac_din,
    .fd_diff, .phase_n, .dac_code, .rfreq_word, .i2c_nack);

  vcxo_model #(.OFFSET_PPM(300.0)) u_vcxo (
    .scl, .sda, .sda_pull, .dac_sclk, .dac_sync_n, .dac_din, .clk_out);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  function automatic int pdist(input int a, input int b);
    int d;
    d = a - b;
    if (d > int'(N) / 2) d -= N;
    if (d < -int'(N) / 2) d += N;
    return (d < 0) ? -d : d;
  endfunction

  int n_meas = 0;
  always @(posedge clk) if (dut.n_valid && !rst) n_meas++;

  // wait until the measured phase has stayed within +-3 counts of one value for 200
  // measurements; that value is returned in n_lock
  task automatic wait_lock(input int max_meas, output int took, output int n_lock);
    int good;
    good = 0; took = 0; n_lock = -100;
    while (good < 200 && took < max_meas) begin
      @(posedge clk iff dut.n_valid);
      took++;
      if (pdist(int'(dut.n), n_lock) <= 3) good++;
      else begin good = 0; n_lock = int'(dut.n); end
    end
  endtask

  initial begin
    int took, i2c0, dac0, meas0, worst, n1, n2;
    repeat (10) @(posedge clk);
    rst <= 1'b0;
    // frequency loop: wait for three windows in a row inside the dead band
    begin
      int quiet, windows;
      quiet = 0; windows = 0;
      while (quiet < 3 && windows < 60) begin
        @(posedge clk iff dut.u_fd.diff_valid);
        windows++;
        #1;
        if (fd_diff >= -1 && fd_diff <= 1) quiet++; else quiet = 0;
      end
      $display("frequency settled after %0d windows", windows);
      check(quiet == 3, "frequency loop settles");
    end
    wait_lock(20000, took, n1);                      // up to about 42 ms
    $display("locked after %0d measurements at n=%0d (setpoint %0d), %0d VCXO writes, fd_diff=%0d dac=%0d",
             took, n1, phase_setpoint, u_vcxo.n_i2c_updates, fd_diff, dac_code);
    check(took < 20000, "phase lock reached");
    check(u_vcxo.n_i2c_updates >= 1, "frequency loop wrote the VCXO");
    check(!i2c_nack, "VCXO acknowledged");
    // hold: phase stays, frequency loop stays quiet, DAC follows every measurement
    i2c0 = u_vcxo.n_i2c_updates; dac0 = u_vcxo.n_dac_frames; meas0 = n_meas; worst = 0;
    repeat (2000) begin
      @(posedge clk iff dut.n_valid);
      if (pdist(int'(dut.n), n1) > worst) worst = pdist(int'(dut.n), n1);
    end
    $display("hold: worst phase error %0d counts, %0d writes, %0d DAC frames for %0d measurements",
             worst, u_vcxo.n_i2c_updates - i2c0, u_vcxo.n_dac_frames - dac0, n_meas - meas0);
    check(worst <= 3, "phase held within 3 counts (300 ps)");
    check(u_vcxo.n_i2c_updates == i2c0, "frequency loop quiet once locked");
    check(u_vcxo.n_dac_frames - dac0 >= n_meas - meas0 - 1, "one DAC frame per measurement");
    // move the setpoint by a quarter turn and lock again
    phase_setpoint = NW'(40 + 36);
    wait_lock(20000, took, n2);
    $display("re-locked after %0d measurements, phase %0d -> %0d", took, n1, n2);
    check(took < 20000, "lock at new setpoint");
    check(pdist(n2, (n1 + 36) % int'(N)) <= 3, "phase moved with the setpoint");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
