// trigger_channel - one monitoring channel of the event receiver.
//
// Runs in the event clock domain (one cycle = one event clock, about 8 ns). Three uses:
//  * MODE_DBUS: the selected DBUS bit is copied to the line, so the line carries the clock the
//    event generator encodes on that bit.
//  * MODE_EVENT: when the frame's event code equals cfg.evt_code the channel waits cfg.delay
//    event clocks, then emits cfg.n_pulses pulses, each cfg.width clocks active followed by
//    cfg.width clocks inactive (the last pulse has no trailing gap). A code that arrives while a
//    train is in progress is ignored.
//  * cfg.dir_in (AMC lines): the line is an input; each active edge of the synchronised line
//    raises in_evt for one cycle so that an event can be sent upstream.
// cfg.polarity inverts the line: 0 gives idle low / active high, 1 idle high / active low.
//
// Timing: the frame on `frame` at cycle t with a matching code makes the line active from cycle
// t+1+delay (registered output). DBUS bits appear on the line one cycle after the frame. An
// input edge shows on in_evt three cycles after it reaches line_in (two-flop synchroniser,
// then edge detector).
// From the design description: event-code or DBUS-bit monitoring, delay and width in event
// clocks, polarity, 1..65535 pulses, AMC lines as inputs that can send an event. This design's
// own choices: the pulse train shape (equal active and gap time), ignoring retriggers, width 0
// and n_pulses 0 read as 1, and the synchroniser on inputs.
module trigger_channel
  import afc_timing_pkg::*;
(
  input  logic       clk,        // event clock
  input  logic       rst,        // synchronous, active high
  input  chan_cfg_t  cfg,
  input  evt_frame_t frame,      // registered event frame
  input  logic       line_in,    // line level when used as input
  output logic       line_out,   // line level when used as output
  output logic       line_oe,    // 1 = drive the line
  output logic       in_evt      // one-cycle strobe: input edge seen
);

  typedef enum logic [1:0] {S_IDLE, S_DELAY, S_HIGH, S_LOW} state_t;

  state_t               state, state_n;
  logic [DLY_W-1:0]     dcnt, dcnt_n;
  logic [WID_W-1:0]     wcnt, wcnt_n;
  logic [NPULSE_W-1:0]  pleft, pleft_n;
  logic [WID_W-1:0]     wload;
  logic [NPULSE_W-1:0]  npulse;
  logic                 match;
  logic [2:0]           in_sync;

  assign wload  = (cfg.width == '0) ? '0 : cfg.width - 1'b1;
  assign npulse = (cfg.n_pulses == '0) ? NPULSE_W'(1) : cfg.n_pulses;
  assign match  = cfg.enable && !cfg.dir_in && cfg.mode == MODE_EVENT &&
                  frame.code != EVT_NULL && frame.code == cfg.evt_code;

  always_comb begin
    state_n = state;
    dcnt_n  = dcnt;
    wcnt_n  = wcnt;
    pleft_n = pleft;
    unique case (state)
      S_IDLE:
        if (match) begin
          pleft_n = npulse;
          if (cfg.delay == '0) begin
            state_n = S_HIGH;
            wcnt_n  = wload;
          end else begin
            state_n = S_DELAY;
            dcnt_n  = cfg.delay - 1'b1;
          end
        end
      S_DELAY:
        if (dcnt == '0) begin
          state_n = S_HIGH;
          wcnt_n  = wload;
        end else begin
          dcnt_n = dcnt - 1'b1;
        end
      S_HIGH:
        if (wcnt == '0) begin
          if (pleft <= NPULSE_W'(1)) begin
            state_n = S_IDLE;
          end else begin
            state_n = S_LOW;
            wcnt_n  = wload;
          end
          pleft_n = pleft - 1'b1;
        end else begin
          wcnt_n = wcnt - 1'b1;
        end
      S_LOW:
        if (wcnt == '0) begin
          state_n = S_HIGH;
          wcnt_n  = wload;
        end else begin
          wcnt_n = wcnt - 1'b1;
        end
      default: state_n = S_IDLE;
    endcase
    // Leaving event mode or disabling the channel aborts a train.
    if (!cfg.enable || cfg.dir_in || cfg.mode != MODE_EVENT) state_n = S_IDLE;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      dcnt     <= '0;
      wcnt     <= '0;
      pleft    <= '0;
      line_out <= 1'b0;
      in_sync  <= '0;
      in_evt   <= 1'b0;
    end else begin
      state <= state_n;
      dcnt  <= dcnt_n;
      wcnt  <= wcnt_n;
      pleft <= pleft_n;
      if (cfg.enable && cfg.mode == MODE_DBUS)
        line_out <= cfg.polarity ^ frame.dbus[cfg.dbus_sel];
      else
        line_out <= cfg.polarity ^ (state_n == S_HIGH);
      in_sync <= {in_sync[1:0], line_in ^ cfg.polarity};
      in_evt  <= cfg.enable && cfg.dir_in && in_sync[1] && !in_sync[2];
    end
  end

  assign line_oe = !cfg.dir_in;

endmodule
