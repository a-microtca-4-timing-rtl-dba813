// gray_count_sync - free-running edge counter of one clock, read safely from another.
//
// A binary counter advances on every rising edge of src_clk. Its Gray-coded copy is registered
// in the src_clk domain, passed through a two-flop synchroniser into the dst_clk domain and
// converted back to binary there. Because only one Gray bit changes per source edge, the value
// seen in dst_clk is always a count the source really held, at most about three dst_clk cycles
// old. The counter wraps modulo 2^W and is not reset: users only take differences of it.
module gray_count_sync #(
  parameter int unsigned W = 24
) (
  input  logic         src_clk,
  input  logic         dst_clk,
  output logic [W-1:0] count      // in the dst_clk domain
);

  logic [W-1:0] bin_src;
  logic [W-1:0] gray_src;
  logic [W-1:0] gray_s1, gray_s2;

  always_ff @(posedge src_clk) begin
    bin_src  <= bin_src + 1'b1;
    gray_src <= bin_src ^ (bin_src >> 1);
  end

  always_ff @(posedge dst_clk) begin
    gray_s1 <= gray_src;
    gray_s2 <= gray_s1;
  end

  always_comb begin
    count[W-1] = gray_s2[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) count[i] = count[i+1] ^ gray_s2[i];
  end

endmodule
