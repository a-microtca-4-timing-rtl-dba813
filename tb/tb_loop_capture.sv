// tb_loop_capture - capture range of the reference clock loop near the ends of its tuning range.
//
// Two copies of the frequency and phase feedback controller each drive their own behavioural
// VCXO; one VCXO starts 3000 ppm above f_ref, the other 3000 ppm below (the digital tuning range
// is +-3500 ppm). Both use the short frequency window (1/100 of the full one) with PI gains
// scaled to match. Each must bring its frequency detector into the dead band, reach a constant
// phase, and end with a frequency word offset that cancels its VCXO's error: the word offset
// must equal -offset * RFREQ_c to within the +-192 ppm the DAC can still correct.
`timescale 1ns/1fs
module tb_loop_capture;
  localparam int unsigned N  = 144;
  localparam int unsigned NW = $clog2(2 * N);
  localparam real T_REF  = 1.0e3 / 69.396944444;
  localparam real T_DMTD = T_REF * real'(N + 1) / real'(N);
  localparam logic [37:0] RFREQ_C = 38'd11381663334;
  localparam real OFFS [2] = '{3000.0, -3000.0};

  logic clk = 1'b0, clk_ref = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;

  always #(T_DMTD / 2) clk = ~clk;
  always #(T_REF / 2) clk_ref = ~clk_ref;

  initial begin
    #150_000_000;
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

  logic done [2];

  for (genvar g = 0; g < 2; g++) begin : g_loop
    logic clk_out, scl_oe, sda_oe, sda_pull, dac_sclk, dac_sync_n, dac_din, i2c_nack;
    logic signed [23:0] fd_diff;
    logic [NW-1:0] phase_n;
    logic [15:0] dac_code;
    logic [37:0] rfreq_word;
    logic scl, sda;
    assign scl = !scl_oe;
    assign sda = !(sda_oe || sda_pull);

    freq_phase_controller #(.N(N), .WINDOW(38288), .KP_F(60000), .KI_F(120000),
                            .MA_L(3), .KP_P(256)) dut (
      .clk, .rst, .clk_ref, .clk_out, .freq_en(1'b1), .phase_en(1'b1),
      .phase_setpoint(NW'(50)), .rfreq_center(RFREQ_C), .n1_lo(2'b00),
      .scl_oe, .sda_oe, .sda_i(sda), .dac_sclk, .dac_sync_n, .dac_din,
      .fd_diff, .phase_n, .dac_code, .rfreq_word, .i2c_nack);

    vcxo_model #(.OFFSET_PPM(OFFS[g]), .RFREQ_C(RFREQ_C)) u_vcxo (
      .scl, .sda, .sda_pull, .dac_sclk, .dac_sync_n, .dac_din, .clk_out);

    initial begin
      int quiet, windows, good, took, n0;
      real got_ppm;
      done[g] = 1'b0;
      @(negedge rst);
      quiet = 0; windows = 0;
      while (quiet < 3 && windows < 150) begin
        @(posedge clk iff dut.u_fd.diff_valid);
        windows++;
        #1;
        if (fd_diff >= -1 && fd_diff <= 1) quiet++; else quiet = 0;
      end
      check(quiet == 3, "frequency captured");
      good = 0; took = 0; n0 = -100;
      while (good < 300 && took < 20000) begin
        @(posedge clk iff dut.n_valid);
        took++;
        if (pdist(int'(dut.n), n0) <= 3) good++; else begin good = 0; n0 = int'(dut.n); end
      end
      check(good == 300, "phase constant");
      got_ppm = (real'(rfreq_word) - real'(RFREQ_C)) / real'(RFREQ_C) * 1.0e6;
      $display("VCXO %0.0f ppm: captured after %0d windows, %0d VCXO writes, word offset %0.1f ppm, DAC %0d",
               OFFS[g], windows, u_vcxo.n_i2c_updates, got_ppm, dac_code);
      // (1 + off)(1 + word) must be within the DAC's reach of 1
      check((1.0 + OFFS[g] * 1.0e-6) * (1.0 + got_ppm * 1.0e-6) > 1.0 - 192.0e-6 &&
            (1.0 + OFFS[g] * 1.0e-6) * (1.0 + got_ppm * 1.0e-6) < 1.0 + 192.0e-6,
            "frequency word cancels the VCXO error");
      check(!i2c_nack, "VCXO acknowledged");
      done[g] = 1'b1;
    end
  end

  initial begin
    repeat (10) @(posedge clk);
    rst <= 1'b0;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
