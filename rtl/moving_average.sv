// moving_average - moving average filter of the phase feedback loop.
//
// Keeps the last 2^L input samples in a circular buffer and a running sum: on each in_valid the
// newest sample is added and the sample 2^L steps older is subtracted, and avg = sum >>> L
// (arithmetic shift, rounds toward minus infinity). Until 2^L samples have been seen since reset
// the missing older samples count as zero, so the buffer needs no clearing. avg_valid follows
// in_valid by one cycle.
// From the design description: a moving average filter sits between the phase detector and the
// proportional controller, and its parameters set the loop cut-off. The length 2^L and
// L = 8 (256 samples, about 0.53 ms at 478.6 kHz) are this design's own choice.
module moving_average #(
  parameter int unsigned W = 10,   // sample width (signed)
  parameter int unsigned L = 8     // log2 of the number of averaged samples
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in,
  output logic signed [W-1:0] avg,
  output logic                avg_valid
);

  localparam int unsigned DEPTH = 1 << L;

  logic signed [W-1:0]   buf_mem [DEPTH];
  logic [L-1:0]          wptr;
  logic                  full;
  logic signed [W+L-1:0] sum, sum_n;
  logic signed [W-1:0]   oldest;

  assign oldest = full ? buf_mem[wptr] : '0;
  assign sum_n  = sum + (W+L)'(in) - (W+L)'(oldest);

  always_ff @(posedge clk) begin
    if (in_valid) buf_mem[wptr] <= in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr      <= '0;
      full      <= 1'b0;
      sum       <= '0;
      avg       <= '0;
      avg_valid <= 1'b0;
    end else begin
      avg_valid <= in_valid;
      if (in_valid) begin
        sum  <= sum_n;
        avg  <= W'(sum_n >>> L);
        wptr <= wptr + 1'b1;
        if (wptr == '1) full <= 1'b1;
      end
    end
  end

endmodule
