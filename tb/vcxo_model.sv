// vcxo_model - behavioural model (not synthesizable) of the Si571 VCXO with its AD5662 DAC.
//
// Output frequency:
//   f = F_NOM * (1 + OFFSET_PPM*1e-6) * (rfreq / RFREQ_C) * (1 + DAC_PPM*1e-6*(code-32768)/32768)
// rfreq starts at RFREQ_C and is changed over I2C: the model is a slave at address 0x55 that
// acknowledges every byte, stores writes to registers 8..12 and applies the new RFREQ when
// register 135 is written with Freeze M cleared. code is the DAC code, taken from 24-bit SPI
// frames (bit sampled on falling sclk while sync_n is low, code = low 16 bits) and applied at
// the rising edge of sync_n; it starts at mid-scale. The clock is generated with real-valued
// half periods, so it has no jitter. Counters of accepted I2C updates and DAC frames are
// exposed for testbenches.
`timescale 1ns/1fs
module vcxo_model #(
  parameter real         F_NOM      = 69.396944444e6,
  parameter real         OFFSET_PPM = 0.0,
  parameter real         DAC_PPM    = 192.0,
  parameter logic [37:0] RFREQ_C    = 38'd11381663334    // about 42.4 * 2^28
) (
  input  logic scl,
  input  logic sda,
  output logic sda_pull,       // 1 = slave pulls SDA low (acknowledge)
  input  logic dac_sclk,
  input  logic dac_sync_n,
  input  logic dac_din,
  output logic clk_out
);

  real         freq;
  logic [37:0] rfreq = RFREQ_C;
  logic [15:0] code = 16'h8000;
  int          n_i2c_updates = 0;
  int          n_dac_frames = 0;

  function automatic real calc_freq();
    return F_NOM * (1.0 + OFFSET_PPM * 1.0e-6) * (real'(rfreq) / real'(RFREQ_C)) *
           (1.0 + DAC_PPM * 1.0e-6 * (real'(code) - 32768.0) / 32768.0);
  endfunction

  initial begin
    clk_out  = 1'b0;
    sda_pull = 1'b0;
    freq     = calc_freq();
    forever begin
      #(0.5e9 / freq);
      clk_out = ~clk_out;
    end
  end

  // ---- DAC ----
  logic [23:0] dsh = '0;
  always @(negedge dac_sclk) if (!dac_sync_n) dsh <= {dsh[22:0], dac_din};
  always @(posedge dac_sync_n) begin
    code = dsh[15:0];
    n_dac_frames++;
    freq = calc_freq();
  end

  // ---- I2C slave ----
  logic [7:0]  ish = '0;
  int          ibit = 0, ibyte = 0;
  logic        active = 1'b0;
  logic [7:0]  reg_ptr = '0;
  logic [39:0] pend = '0;     // registers 8..12
  always @(negedge sda) if (scl) begin active = 1'b1; ibit = 0; ibyte = 0; end
  always @(posedge sda) if (scl) active = 1'b0;
  always @(posedge scl) if (active) begin
    if (ibit < 8) ish = {ish[6:0], sda};
    if (ibit == 7) begin
      if (ibyte == 1) reg_ptr = ish;
      else if (ibyte >= 2) begin
        if (reg_ptr >= 8 && reg_ptr <= 12) pend[8'd39 - (reg_ptr - 8) * 8 -: 8] = ish;
        if (reg_ptr == 135 && ish[5] == 1'b0 && ibyte == 2) begin   // Freeze M released
          rfreq = pend[37:0];
          n_i2c_updates++;
          freq = calc_freq();
        end
        reg_ptr = reg_ptr + 1;
      end
      ibyte++;
    end
    ibit = (ibit == 8) ? 0 : ibit + 1;
  end
  always @(negedge scl) sda_pull <= active && (ibit == 8);

endmodule
