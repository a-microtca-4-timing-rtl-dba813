// afc_timing_top - FPGA gateware of the AFC timing receiver.
//
// Two independent parts share the board:
//  * Event receiver (event clock domain, RF/4 = 124.9 MHz): the frames the link receiver
//    recovers from the timing fibre (8-bit event code + 8-bit DBUS per event clock) drive 18
//    monitoring channels - 10 POF outputs on two FMC 5 POF mezzanines and 8 AMC backplane lines
//    that are outputs or inputs. Inputs send an event code upstream on tx_code.
//  * Frequency and phase feedback controller (DMTD clock domain, 68.918 MHz): locks the Si571
//    VCXO output f_out to f_ref = 5/36 RF = 69.397 MHz, digitally over I2C (frequency loop) and
//    through the AD5662 DAC over SPI (phase loop). f_ref and f_dmtd = f_ref*144/145 come from
//    the FPGA clock manager, f_out returns through the board's clock switch.
// The transceiver, the clock manager and all board chips are outside this module: their
// signals are ports. Channel settings and loop settings are ports as well, to be driven by the
// control system's register bank.
// From the design description: the split into these parts, the channel count and roles, the
// clock relations and the loop structure. Port-level choices are this design's own.
module afc_timing_top
  import afc_timing_pkg::*;
#(
  parameter int unsigned N      = 144,
  parameter int unsigned WINDOW = 3828797,
  parameter int unsigned MA_L   = 8,
  parameter int          KP_F   = 1024,
  parameter int          KI_F   = 1024,
  parameter int          KP_P   = 21,
  localparam int unsigned NW    = $clog2(2*N)
) (
  // event receiver
  input  logic       evt_clk,
  input  logic       evt_rst,
  input  evt_frame_t rx_frame,
  input  logic       rx_valid,
  input  chan_cfg_t  chan_cfg [N_CHAN],
  output logic       pof_out  [N_POF],
  output logic       amc_out  [N_AMC],
  output logic       amc_oe   [N_AMC],
  input  logic       amc_in   [N_AMC],
  output evt_code_t  tx_code,
  // reference clock loop
  input  logic                 dmtd_clk,
  input  logic                 dmtd_rst,
  input  logic                 ref_clk,
  input  logic                 out_clk,
  input  logic                 freq_en,
  input  logic                 phase_en,
  input  logic [NW-1:0]        phase_setpoint,
  input  logic [37:0]          rfreq_center,
  input  logic [1:0]           n1_lo,
  output logic                 vcxo_scl_oe,
  output logic                 vcxo_sda_oe,
  input  logic                 vcxo_sda_i,
  output logic                 dac_sclk,
  output logic                 dac_sync_n,
  output logic                 dac_din,
  output logic signed [23:0]   fd_diff,
  output logic [NW-1:0]        phase_n,
  output logic [15:0]          dac_code,
  output logic [37:0]          rfreq_word,
  output logic                 i2c_nack
);

  event_receiver #(.NPOF(N_POF), .NAMC(N_AMC)) u_evr (
    .clk(evt_clk), .rst(evt_rst), .rx_frame(rx_frame), .rx_valid(rx_valid),
    .cfg(chan_cfg), .pof_out(pof_out), .amc_out(amc_out), .amc_oe(amc_oe), .amc_in(amc_in),
    .tx_code(tx_code));

  freq_phase_controller #(.N(N), .WINDOW(WINDOW), .FD_W(24), .KP_F(KP_F), .KI_F(KI_F),
                         .MA_L(MA_L), .KP_P(KP_P)) u_fpc (
    .clk(dmtd_clk), .rst(dmtd_rst), .clk_ref(ref_clk), .clk_out(out_clk),
    .freq_en(freq_en), .phase_en(phase_en), .phase_setpoint(phase_setpoint),
    .rfreq_center(rfreq_center), .n1_lo(n1_lo),
    .scl_oe(vcxo_scl_oe), .sda_oe(vcxo_sda_oe), .sda_i(vcxo_sda_i),
    .dac_sclk(dac_sclk), .dac_sync_n(dac_sync_n), .dac_din(dac_din),
    .fd_diff(fd_diff), .phase_n(phase_n), .dac_code(dac_code), .rfreq_word(rfreq_word),
    .i2c_nack(i2c_nack));

endmodule
