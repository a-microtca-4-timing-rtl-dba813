// freq_detector - frequency detector (FD) of the frequency feedback loop.
//
// The rising edges of clk_ref and clk_out are counted by two free-running counters, each read
// into the clk (system, = DMTD clock) domain through a Gray-code synchroniser. A window timer in
// the clk domain fires every WINDOW cycles; at each firing both counts are sampled and
//   diff = (edges of clk_ref in the window) - (edges of clk_out in the window)
// is output with a one-cycle diff_valid strobe. diff is proportional to f_ref - f_out with a
// resolution of 1/window: WINDOW = round(f_dmtd / 18 Hz) = 3828797 gives the 18 Hz resolution
// and 18 Hz update rate of the design description (f_dmtd = 68.918 MHz). The first window after
// reset has no earlier sample and produces no output.
//
// From the design description: edge counting over a fixed window, difference of the two counts,
// 18 Hz resolution. This design's own choices: Gray-code clock crossing, counting in free-running
// counters instead of clearing them, the 24-bit count width.
module freq_detector #(
  parameter int unsigned WINDOW = 3828797,  // window length in clk cycles
  parameter int unsigned CNT_W  = 24        // must hold the edge count of one window
) (
  input  logic                    clk,      // system clock (f_dmtd)
  input  logic                    rst,      // synchronous to clk
  input  logic                    clk_ref,
  input  logic                    clk_out,
  output logic signed [CNT_W-1:0] diff,
  output logic                    diff_valid
);

  localparam int unsigned TW = $clog2(WINDOW);

  logic [CNT_W-1:0] cnt_ref, cnt_out, prev_ref, prev_out;
  logic [TW-1:0]    timer;
  logic             primed;

  gray_count_sync #(.W(CNT_W)) u_ref (.src_clk(clk_ref), .dst_clk(clk), .count(cnt_ref));
  gray_count_sync #(.W(CNT_W)) u_out (.src_clk(clk_out), .dst_clk(clk), .count(cnt_out));

  always_ff @(posedge clk) begin
    if (rst) begin
      timer      <= '0;
      primed     <= 1'b0;
      prev_ref   <= '0;
      prev_out   <= '0;
      diff       <= '0;
      diff_valid <= 1'b0;
    end else begin
      diff_valid <= 1'b0;
      if (timer == TW'(WINDOW - 1)) begin
        timer    <= '0;
        prev_ref <= cnt_ref;
        prev_out <= cnt_out;
        primed   <= 1'b1;
        if (primed) begin
          diff       <= signed'((cnt_ref - prev_ref) - (cnt_out - prev_out));
          diff_valid <= 1'b1;
        end
      end else begin
        timer <= timer + 1'b1;
      end
    end
  end

endmodule
