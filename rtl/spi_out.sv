// spi_out - SPI master loading the AD5662 DAC that sets the VCXO control voltage.
//
// Each code is sent as one 24-bit frame, MSB first: six zero bits, the two power-down bits
// (00 = normal operation) and the 16-bit code. sync_n goes low for the frame; sclk idles high,
// din changes while sclk is high and the DAC takes it on the falling edge of sclk. One sclk
// half period is HALF clk cycles (HALF = 2 gives f_clk/4, about 17.2 MHz at f_dmtd). After a
// frame sync_n stays high for at least one half period. A code that arrives during a frame is
// kept and sent next; a newer one replaces it.
//
// Timing: one frame with its gap occupies 2*HALF*24 + HALF + 1 clk cycles (99 at HALF = 2), under the 144
// cycles of one beat period, so the DAC can follow every phase measurement (478.6 kHz).
// From the design description: the DAC (AD5662) is driven over SPI at the beat rate. The frame
// format, clock phase and rate come from the DAC's usual interface and are this design's choice.
module spi_out #(
  parameter int unsigned HALF = 2      // clk cycles per sclk half period
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        code_valid,
  input  logic [15:0] code,
  output logic        sclk,
  output logic        sync_n,
  output logic        din,
  output logic        busy
);

  localparam int unsigned HW = $clog2(HALF + 1);

  logic [23:0]   shreg;
  logic [15:0]   pend_code;
  logic          pend;
  logic [4:0]    bitcnt;
  logic [HW-1:0] tick;
  logic          active, gap;

  assign busy = active || gap || pend;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg   <= '0;
      pend    <= 1'b0;
      pend_code <= '0;
      bitcnt  <= '0;
      tick    <= '0;
      active  <= 1'b0;
      gap     <= 1'b0;
      sclk    <= 1'b1;
      sync_n  <= 1'b1;
      din     <= 1'b0;
    end else begin
      if (code_valid) begin
        pend      <= 1'b1;
        pend_code <= code;
      end
      if (active) begin
        if (tick == HW'(HALF - 1)) begin
          tick <= '0;
          if (sclk) begin
            sclk <= 1'b0;                 // falling edge: DAC samples din
          end else if (bitcnt == 5'd23) begin
            sclk   <= 1'b1;
            active <= 1'b0;
            gap    <= 1'b1;
            sync_n <= 1'b1;
          end else begin
            sclk   <= 1'b1;
            bitcnt <= bitcnt + 1'b1;
            din    <= shreg[22];
            shreg  <= {shreg[22:0], 1'b0};
          end
        end else begin
          tick <= tick + 1'b1;
        end
      end else if (gap) begin
        if (tick == HW'(HALF - 1)) begin
          tick <= '0;
          gap  <= 1'b0;
        end else begin
          tick <= tick + 1'b1;
        end
      end else if (pend) begin
        // start a frame: sync_n low with the first bit on din, sclk high
        shreg  <= {6'b0, 2'b00, pend_code};
        din    <= 1'b0;
        sync_n <= 1'b0;
        active <= 1'b1;
        bitcnt <= '0;
        tick   <= '0;
        if (!code_valid) pend <= 1'b0;
      end
    end
  end

endmodule
