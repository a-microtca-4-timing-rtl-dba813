// afc_timing_pkg - types and constants shared by the AFC timing receiver gateware.
//
// The event link carries one frame per event clock (RF/4, about 124.9 MHz): an 8-bit event
// code and an 8-bit distributed data bus (DBUS). Each of the 18 monitoring channels is set up
// by a chan_cfg_t word. The 8-bit code / 8-bit DBUS split, the 18 channels (10 POF + 8 AMC)
// and the 16-bit pulse count (1..65535) follow the design description; the 32-bit delay and
// width fields, the meaning of event code 0 and the pulse train shape are this design's own.
package afc_timing_pkg;

  localparam int unsigned EVT_CODE_W = 8;   // event code width
  localparam int unsigned DBUS_W     = 8;   // distributed data bus width
  localparam int unsigned N_POF      = 10;  // POF outputs (2 FMC 5 POF boards)
  localparam int unsigned N_AMC      = 8;   // AMC backplane lines, input or output
  localparam int unsigned N_CHAN     = N_POF + N_AMC;
  localparam int unsigned DLY_W      = 32;  // delay counter width (event clocks)
  localparam int unsigned WID_W      = 32;  // pulse width counter width (event clocks)
  localparam int unsigned NPULSE_W   = 16;  // pulse count, 1..65535

  // Event code 0 carries no event (null frame).
  localparam logic [EVT_CODE_W-1:0] EVT_NULL = '0;

  typedef logic [EVT_CODE_W-1:0] evt_code_t;
  typedef logic [DBUS_W-1:0]     dbus_t;

  // One event frame as delivered by the link receiver.
  typedef struct packed {
    evt_code_t code;
    dbus_t     dbus;
  } evt_frame_t;

  typedef enum logic [0:0] {
    MODE_EVENT = 1'b0,  // trigger / pulse train on a matching event code
    MODE_DBUS  = 1'b1   // copy one DBUS bit out as a clock
  } chan_mode_t;

  // Configuration of one monitoring channel.
  typedef struct packed {
    logic                            enable;
    chan_mode_t                      mode;
    logic                            dir_in;    // AMC lines only: 1 = line is an input
    logic                            polarity;  // 0 = idle low, active high; 1 = inverted
    logic [$clog2(DBUS_W)-1:0]       dbus_sel;  // DBUS bit monitored in MODE_DBUS
    evt_code_t                       evt_code;  // code that fires the channel (MODE_EVENT)
    logic [DLY_W-1:0]                delay;     // event clocks from code to first pulse
    logic [WID_W-1:0]                width;     // active (and inactive) time of each pulse
    logic [NPULSE_W-1:0]             n_pulses;  // pulses per trigger, 0 is taken as 1
    evt_code_t                       in_code;   // code sent upstream when an input fires
  } chan_cfg_t;

endpackage
