// event_receiver - event frame decoding and the 18 monitoring channels.
//
// Every event clock the link receiver delivers one frame, an 8-bit event code and the 8-bit
// DBUS. The frame is registered once (a frame flagged invalid by the receiver is replaced by a
// null frame) and shown to all channels, each a trigger_channel. Channels 0..N_POF-1 drive the
// POF outputs and are never inputs; channels N_POF..N_POF+N_AMC-1 drive or read the AMC
// backplane lines. When an AMC input fires, its configured in_code is queued and sent upstream
// on tx_code, one code per event clock, lowest channel first; tx_code is EVT_NULL otherwise.
//
// Timing: frame on rx_frame at cycle t -> line active at t+2+delay (one register here, one in
// the channel). AMC input edge -> tx_code on the fifth clock edge after it, when no other input waits.
// From the design description: frame format, 18 channels (10 POF + 8 AMC), AMC inputs that send
// an event. The rx_valid handling and the upstream queue are this design's choices.
module event_receiver
  import afc_timing_pkg::*;
#(
  parameter int unsigned NPOF = N_POF,
  parameter int unsigned NAMC = N_AMC
) (
  input  logic       clk,                  // event clock (recovered by the link receiver)
  input  logic       rst,
  input  evt_frame_t rx_frame,
  input  logic       rx_valid,
  input  chan_cfg_t  cfg     [NPOF+NAMC],
  output logic       pof_out [NPOF],
  output logic       amc_out [NAMC],
  output logic       amc_oe  [NAMC],
  input  logic       amc_in  [NAMC],
  output evt_code_t  tx_code               // upstream event to the event generator
);

  localparam int unsigned NCH = NPOF + NAMC;

  evt_frame_t frame_q;
  logic       line_out [NCH];
  logic       line_oe  [NCH];
  logic       line_in  [NCH];
  logic       in_evt   [NCH];
  chan_cfg_t  cfg_ch   [NCH];
  logic [NAMC-1:0] pend;

  always_ff @(posedge clk) begin
    if (rst)           frame_q <= '0;
    else if (rx_valid) frame_q <= rx_frame;
    else               frame_q <= '0;
  end

  for (genvar i = 0; i < NCH; i++) begin : g_chan
    if (i < NPOF) begin : g_pof
      always_comb begin
        cfg_ch[i]        = cfg[i];
        cfg_ch[i].dir_in = 1'b0;       // POF channels are outputs only
      end
      assign line_in[i] = 1'b0;
      assign pof_out[i] = line_out[i];
    end else begin : g_amc
      assign cfg_ch[i]       = cfg[i];
      assign line_in[i]      = amc_in[i-NPOF];
      assign amc_out[i-NPOF] = line_out[i];
      assign amc_oe[i-NPOF]  = line_oe[i];
    end
    trigger_channel u_chan (
      .clk      (clk),
      .rst      (rst),
      .cfg      (cfg_ch[i]),
      .frame    (frame_q),
      .line_in  (line_in[i]),
      .line_out (line_out[i]),
      .line_oe  (line_oe[i]),
      .in_evt   (in_evt[i])
    );
  end

  // Upstream queue: one pending flag per AMC input, served lowest index first.
  always_ff @(posedge clk) begin
    if (rst) begin
      pend    <= '0;
      tx_code <= EVT_NULL;
    end else begin
      logic [NAMC-1:0] p;
      logic            sent;
      p       = pend;
      sent    = 1'b0;
      tx_code <= EVT_NULL;
      for (int k = 0; k < NAMC; k++) begin
        if (!sent && p[k]) begin
          tx_code <= cfg[NPOF+k].in_code;
          p[k]     = 1'b0;
          sent     = 1'b1;
        end
      end
      for (int k = 0; k < NAMC; k++)
        if (in_evt[NPOF+k]) p[k] = 1'b1;
      pend <= p;
    end
  end

endmodule
