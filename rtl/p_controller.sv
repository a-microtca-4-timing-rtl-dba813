// p_controller - proportional controller of the phase feedback loop.
//
// On each in_valid the filtered phase error err is turned into a DAC code
//   dac = sat(DAC_MID + (KP * err) >>> SHIFT, 0, 2^DAC_W - 1)
// and dac_valid pulses one cycle later. With en low the output returns to DAC_MID (VCXO at its
// centre control voltage) and dac_valid pulses once so the DAC is updated.
// From the design description: a proportional controller drives the VCXO control voltage
// through the 16-bit-class DAC (AD5662); the loop cut-off (about 200 Hz) was set with the filter
// and this gain. The gain value, the shift and mid-scale centring are this design's own choices.
module p_controller #(
  parameter int unsigned W      = 10,     // error width (signed)
  parameter int unsigned DAC_W  = 16,
  parameter int          KP     = 21,
  parameter int unsigned SHIFT  = 0,
  parameter int unsigned DAC_MID = 1 << (DAC_W - 1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                in_valid,
  input  logic signed [W-1:0] err,
  output logic [DAC_W-1:0]    dac,
  output logic                dac_valid
);

  localparam int unsigned PW = W + 34;

  logic en_q;
  logic signed [PW-1:0] prod, val;

  assign prod = (PW'(KP) * PW'(err)) >>> SHIFT;
  assign val  = PW'(DAC_MID) + prod;

  always_ff @(posedge clk) begin
    if (rst) begin
      dac       <= DAC_W'(DAC_MID);
      dac_valid <= 1'b0;
      en_q      <= 1'b0;
    end else begin
      en_q      <= en;
      dac_valid <= 1'b0;
      if (!en) begin
        dac       <= DAC_W'(DAC_MID);
        dac_valid <= en_q;
      end else if (in_valid) begin
        if (val < 0)                        dac <= '0;
        else if (val > PW'((1 << DAC_W) - 1)) dac <= '1;
        else                                dac <= DAC_W'(val);
        dac_valid <= 1'b1;
      end
    end
  end

endmodule
