// dmtd_phase_detector - digital dual mixer time difference (DMTD) phase detector.
//
// Two flip-flops clocked by clk_dmtd sample clk_ref and clk_out. Since f_dmtd = f_ref*N/(N+1)
// is slightly below both input frequencies, each flip-flop output is a slow "beat" copy of its
// input at f_beat = f_ref - f_dmtd = f_dmtd/N (about 478.6 kHz) that keeps the input's phase,
// stretched in time by N. A time counter running at f_dmtd measures the number of clk_dmtd
// cycles n from a rising edge of the reference beat to the next rising edge of the output beat;
// phi_ref - phi_out = 2*pi*n/N, and one count is 1/(N*f_ref), about 100 ps at N = 144.
// Each beat signal passes one more flip-flop (metastability guard) before its edge detector.
//
// Timing: one n per beat period (N clk_dmtd cycles), n_valid strobes for one cycle; n is
// latched when the output beat edge is seen. The counter saturates if the reference beat stops.
// From the design description: the two sampling flip-flops, the f_dmtd time counter and the
// meaning of n. This design's own choices: the extra synchroniser flop and that no deglitching
// of the beat edges is done (clean clocks are assumed; jittery inputs would need it).
module dmtd_phase_detector #(
  parameter int unsigned N  = 144,
  parameter int unsigned NW = $clog2(2*N)   // counter width, room for up to 2N
) (
  input  logic          clk_dmtd,
  input  logic          rst,        // synchronous to clk_dmtd
  input  logic          clk_ref,    // sampled as data
  input  logic          clk_out,    // sampled as data
  output logic [NW-1:0] n,
  output logic          n_valid
);

  logic [2:0]    ref_s, out_s;      // [0] sampling flop, [1] guard flop, [2] edge history
  logic          ref_edge, out_edge;
  logic [NW-1:0] cnt, since;

  always_ff @(posedge clk_dmtd) begin
    ref_s <= {ref_s[1:0], clk_ref};
    out_s <= {out_s[1:0], clk_out};
  end

  assign ref_edge = ref_s[1] && !ref_s[2];
  assign out_edge = out_s[1] && !out_s[2];
  assign since    = ref_edge ? '0 : ((cnt == '1) ? cnt : cnt + 1'b1);

  always_ff @(posedge clk_dmtd) begin
    if (rst) begin
      cnt     <= '1;
      n       <= '0;
      n_valid <= 1'b0;
    end else begin
      cnt     <= since;
      n_valid <= out_edge && (since != '1);
      if (out_edge) n <= since;
    end
  end

endmodule
