// pi_controller - proportional-integral controller of the frequency feedback loop.
//
// On each e_valid strobe (one per frequency detector window) the error e is taken, and
//   acc <= sat(acc + KI*e)            (integral term, saturated at +-LIMIT: no wind-up)
//   u   <= sat(KP*e + acc_new)        (tuning offset, saturated at +-LIMIT)
// u is an offset of the VCXO frequency word (RFREQ, in LSBs) from the centre setting. An error
// with |e| <= DEADBAND counts as zero: the loop then holds its output and issues no update, so
// the frequency loop goes quiet once the phase loop has pulled the frequencies together.
// u_valid pulses one cycle after e_valid whenever u changed. With en low the controller clears
// its state and holds u at zero.
//
// From the design description: a PI controller closes the frequency loop; the tuning range is
// +-3500 ppm of the centre frequency. This design's own choices: gains, the dead band, and
// LIMIT = 40,000,000 LSB, which is 3500 ppm of a typical Si571 RFREQ (about 42.4 * 2^28).
module pi_controller #(
  parameter int unsigned EW       = 24,          // error width
  parameter int unsigned UW       = 32,          // output width
  parameter int          KP       = 1024,        // proportional gain, LSB per count
  parameter int          KI       = 1024,        // integral gain, LSB per count per window
  parameter int          LIMIT    = 40_000_000,  // output and integrator bound
  parameter int          DEADBAND = 1            // |e| <= DEADBAND is treated as 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic                 e_valid,
  input  logic signed [EW-1:0] e,
  output logic signed [UW-1:0] u,
  output logic                 u_valid
);

  localparam int unsigned AW = UW + 24;   // headroom for products and sums

  logic signed [AW-1:0] acc;

  function automatic logic signed [AW-1:0] sat(input logic signed [AW-1:0] x);
    if (x > AW'(LIMIT))       return AW'(LIMIT);
    else if (x < -AW'(LIMIT)) return -AW'(LIMIT);
    else                      return x;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      acc     <= '0;
      u       <= '0;
      u_valid <= 1'b0;
    end else begin
      u_valid <= 1'b0;
      if (e_valid && (e > EW'(DEADBAND) || e < -EW'(DEADBAND))) begin
        logic signed [AW-1:0] acc_n, u_n;
        acc_n = sat(acc + AW'(KI) * AW'(e));
        u_n   = sat(AW'(KP) * AW'(e) + acc_n);
        acc   <= acc_n;
        u     <= UW'(u_n);
        u_valid <= (UW'(u_n) != u);
      end
    end
  end

endmodule
