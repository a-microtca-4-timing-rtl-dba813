// freq_phase_controller - frequency and phase feedback controller of the reference clock loop.
//
// Two loops act on the same VCXO at the same time, both clocked by the DMTD clock (clk):
//  * Frequency loop: freq_detector compares edge counts of clk_ref and clk_out over an 18 Hz
//    window; pi_controller turns the count difference into an offset of the VCXO frequency word,
//    and i2c_out writes rfreq_center + offset into the Si571 (slow digital tune). A new word is
//    written whenever the offset changes; one that changes during a write is sent right after.
//  * Phase loop: dmtd_phase_detector measures n in [0, N) once per beat period (478.6 kHz); the
//    error n - phase_setpoint is wrapped into [-N/2, N/2) so that the loop takes the short way
//    round, filtered by moving_average, scaled by p_controller into a DAC code, and spi_out
//    loads it into the AD5662 that sets the VCXO control voltage (fast analog tune).
// While the frequencies are far apart the phase samples sweep all values and average to
// little, so the frequency loop does the pulling; near lock the frequency detector reads about
// zero, falls inside the PI dead band and stops updating, and the phase loop holds the phase.
//
// Timing: phase path n_valid -> dac_valid in 3 clk cycles, then a 99-cycle SPI frame; frequency
// path one I2C sequence (about 0.31 ms) per changed window result.
// From the design description: the loop structure of FD + PI over I2C and DMTD PD + moving
// average + P over SPI, N = 144, 18 Hz FD resolution. The phase wrap, the setpoint input, the
// loop enables, gains, filter length and the re-send rule are this design's own choices.
module freq_phase_controller #(
  parameter int unsigned N        = 144,
  parameter int unsigned WINDOW   = 3828797,
  parameter int unsigned FD_W     = 24,
  parameter int          KP_F     = 1024,
  parameter int          KI_F     = 1024,
  parameter int          F_LIMIT  = 40_000_000,
  parameter int          F_DEADBAND = 1,
  parameter int unsigned MA_L     = 8,
  parameter int          KP_P     = 21,
  parameter int unsigned P_SHIFT  = 0,
  parameter int unsigned I2C_DIV  = 43,
  parameter int unsigned SPI_HALF = 2,
  localparam int unsigned NW      = $clog2(2*N)
) (
  input  logic                   clk,            // f_dmtd
  input  logic                   rst,
  input  logic                   clk_ref,        // f_ref from the clock manager
  input  logic                   clk_out,        // f_out, the VCXO clock back into the FPGA
  input  logic                   freq_en,
  input  logic                   phase_en,
  input  logic [NW-1:0]          phase_setpoint, // wanted n, 0..N-1
  input  logic [37:0]            rfreq_center,   // VCXO frequency word at the centre setting
  input  logic [1:0]             n1_lo,          // VCXO register 8 bits 7:6 (N1 low bits)
  output logic                   scl_oe,
  output logic                   sda_oe,
  input  logic                   sda_i,
  output logic                   dac_sclk,
  output logic                   dac_sync_n,
  output logic                   dac_din,
  output logic signed [FD_W-1:0] fd_diff,        // last frequency detector result
  output logic [NW-1:0]          phase_n,        // last phase detector result
  output logic [15:0]            dac_code,       // last DAC code
  output logic [37:0]            rfreq_word,     // last frequency word sent to the VCXO
  output logic                   i2c_nack
);

  localparam int unsigned EW = NW + 1;

  logic                   fd_valid;
  logic signed [31:0]     u;
  logic                   u_valid, i2c_busy, i2c_done, i2c_pend;
  logic [NW-1:0]          n;
  logic                   n_valid;
  logic signed [EW-1:0]   perr, perr_avg;
  logic                   perr_valid, avg_valid, dac_valid, spi_busy;

  // ---------------- frequency loop ----------------
  freq_detector #(.WINDOW(WINDOW), .CNT_W(FD_W)) u_fd (
    .clk(clk), .rst(rst), .clk_ref(clk_ref), .clk_out(clk_out),
    .diff(fd_diff), .diff_valid(fd_valid));

  pi_controller #(.EW(FD_W), .UW(32), .KP(KP_F), .KI(KI_F), .LIMIT(F_LIMIT),
                  .DEADBAND(F_DEADBAND)) u_pi (
    .clk(clk), .rst(rst), .en(freq_en), .e_valid(fd_valid), .e(fd_diff),
    .u(u), .u_valid(u_valid));

  always_ff @(posedge clk) begin
    if (rst) begin
      i2c_pend   <= 1'b0;
      rfreq_word <= '0;
    end else begin
      if (u_valid) i2c_pend <= 1'b1;
      else if (i2c_pend && !i2c_busy) i2c_pend <= 1'b0;
      if (!i2c_busy) rfreq_word <= rfreq_center + 38'(u);
    end
  end

  i2c_out #(.DIV(I2C_DIV)) u_i2c (
    .clk(clk), .rst(rst), .start(i2c_pend && !i2c_busy), .rfreq(rfreq_word), .n1_lo(n1_lo),
    .scl_oe(scl_oe), .sda_oe(sda_oe), .sda_i(sda_i),
    .busy(i2c_busy), .done(i2c_done), .nack(i2c_nack));

  // ---------------- phase loop ----------------
  dmtd_phase_detector #(.N(N), .NW(NW)) u_pd (
    .clk_dmtd(clk), .rst(rst), .clk_ref(clk_ref), .clk_out(clk_out),
    .n(n), .n_valid(n_valid));

  always_ff @(posedge clk) begin
    if (rst) begin
      perr       <= '0;
      perr_valid <= 1'b0;
      phase_n    <= '0;
    end else begin
      perr_valid <= n_valid;
      if (n_valid) begin
        logic signed [EW:0] d;
        d = $signed({2'b00, n}) - $signed({2'b00, phase_setpoint});
        if (d >= $signed((EW+1)'(N / 2)))        d = d - $signed((EW+1)'(N));
        else if (d < -$signed((EW+1)'(N / 2)))   d = d + $signed((EW+1)'(N));
        perr    <= EW'(d);
        phase_n <= n;
      end
    end
  end

  moving_average #(.W(EW), .L(MA_L)) u_ma (
    .clk(clk), .rst(rst || !phase_en), .in_valid(perr_valid), .in(perr),
    .avg(perr_avg), .avg_valid(avg_valid));

  p_controller #(.W(EW), .DAC_W(16), .KP(KP_P), .SHIFT(P_SHIFT)) u_p (
    .clk(clk), .rst(rst), .en(phase_en), .in_valid(avg_valid), .err(perr_avg),
    .dac(dac_code), .dac_valid(dac_valid));

  spi_out #(.HALF(SPI_HALF)) u_spi (
    .clk(clk), .rst(rst), .code_valid(dac_valid), .code(dac_code),
    .sclk(dac_sclk), .sync_n(dac_sync_n), .din(dac_din), .busy(spi_busy));

  // i2c_done and spi_busy are only of use to a status register; nothing here needs them.
  logic unused_ok;
  assign unused_ok = i2c_done | spi_busy;

endmodule
