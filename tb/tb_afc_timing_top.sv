// tb_afc_timing_top - end-to-end test of the timing receiver gateware at its default sizes.
//
// Part 1, event receiver (124.9 MHz event clock): frames carry a DBUS whose bit 3 toggles every
// two frames (a clock from the event generator) and occasional event codes. Checked against
// values worked out here from the channel settings: a single delayed trigger (POF 0), an
// inverted four-pulse train (POF 1), the DBUS clock on POF 2, an AMC output trigger, frames
// flagged invalid firing nothing, and an AMC input sending its code upstream.
// Part 2, reference clock loop: a behavioural Si571 + DAC (vcxo_model) starts 12 ppm above
// f_ref, beyond what the phase loop alone can pull (its error saturates at about 9 ppm). With the full 18 Hz frequency window (55.6 ms) the frequency loop writes the VCXO over
// I2C until the frequency detector reads inside its dead band, the phase loop (256-sample
// average, proportional gain) then holds the DMTD phase constant to within +-3 counts (+-300
// ps) with one DAC frame per beat period, and moving the phase setpoint moves the phase.
// Every mechanism is counted and one that never happened counts as a failure.
`timescale 1ns/1fs
module tb_afc_timing_top;
  import afc_timing_pkg::*;
  localparam int unsigned N  = 144;
  localparam int unsigned NW = $clog2(2 * N);
  localparam real T_EVT  = 1.0e3 / 124.9145;
  localparam real T_REF  = 1.0e3 / 69.396944444;
  localparam real T_DMTD = T_REF * real'(N + 1) / real'(N);

  // event side
  logic evt_clk = 1'b0, evt_rst = 1'b1, evt_run = 1'b1;
  evt_frame_t rx_frame = '0;
  logic rx_valid = 1'b1;
  chan_cfg_t chan_cfg [N_CHAN];
  logic pof_out [N_POF];
  logic amc_out [N_AMC];
  logic amc_oe  [N_AMC];
  logic amc_in  [N_AMC];
  evt_code_t tx_code;
  // loop side
  logic dmtd_clk = 1'b0, ref_clk = 1'b0, dmtd_rst = 1'b1;
  logic out_clk, scl_oe, sda_oe, sda_pull, dac_sclk, dac_sync_n, dac_din, i2c_nack;
  logic freq_en = 1'b1, phase_en = 1'b1;
  logic [NW-1:0] phase_setpoint = NW'(72);
  logic signed [23:0] fd_diff;
  logic [NW-1:0] phase_n;
  logic [15:0] dac_code;
  logic [37:0] rfreq_word;
  logic scl, sda;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_trigger = 0, m_train = 0, m_inverted = 0, m_dbus_clock = 0, m_amc_out = 0;
  int m_invalid_frame = 0, m_upstream = 0, m_freq_write = 0, m_freq_quiet = 0;
  int m_dac_update = 0, m_phase_lock = 0, m_setpoint_move = 0;

  assign scl = !scl_oe;
  assign sda = !(sda_oe || sda_pull);

  always #(T_EVT / 2) if (evt_run) evt_clk = ~evt_clk;
  always #(T_DMTD / 2) dmtd_clk = ~dmtd_clk;
  always #(T_REF / 2) ref_clk = ~ref_clk;

  afc_timing_top dut (
    .evt_clk, .evt_rst, .rx_frame, .rx_valid, .chan_cfg, .pof_out, .amc_out, .amc_oe, .amc_in,
    .tx_code,
    .dmtd_clk, .dmtd_rst, .ref_clk, .out_clk, .freq_en, .phase_en, .phase_setpoint,
    .rfreq_center(38'd11381663334), .n1_lo(2'b01),
    .vcxo_scl_oe(scl_oe), .vcxo_sda_oe(sda_oe), .vcxo_sda_i(sda),
    .dac_sclk, .dac_sync_n, .dac_din, .fd_diff, .phase_n, .dac_code, .rfreq_word, .i2c_nack);

  vcxo_model #(.OFFSET_PPM(12.0)) u_vcxo (
    .scl, .sda, .sda_pull, .dac_sclk, .dac_sync_n, .dac_din, .clk_out(out_clk));

  initial begin
    #600_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  function automatic int pdist(input int a, input int b);
    int d;
    d = a - b;
    if (d > int'(N) / 2) d -= N;
    if (d < -int'(N) / 2) d += N;
    return (d < 0) ? -d : d;
  endfunction

  // ---------------- part 1: event receiver ----------------
  // expected level of a channel just after edge s for a frame sampled from rx_frame at edge f:
  // the frame register takes it at f, the channel reacts at f+1
  function automatic logic exp_level(input chan_cfg_t c, input longint f, input longint s);
    longint off, w;
    w   = longint'(c.width);
    off = s - f - 1 - longint'(c.delay);
    if (off < 0) return c.polarity;
    return c.polarity ^ ((off / (2 * w) < longint'(c.n_pulses)) && (off % (2 * w) < w));
  endfunction

  longint evt_edge = 0;
  always @(posedge evt_clk) evt_edge <= evt_edge + 1;

  task automatic event_part();
    longint f0, f1, f2;
    logic [7:0] dbus_hist [$];
    int pulses1, act0;
    logic prev1;
    for (int ch = 0; ch < N_CHAN; ch++) chan_cfg[ch] = '0;
    chan_cfg[0] = '{enable: 1'b1, mode: MODE_EVENT, dir_in: 1'b0, polarity: 1'b0, dbus_sel: '0,
                    evt_code: 8'h10, delay: 32'd5, width: 32'd3, n_pulses: 16'd1, in_code: '0};
    chan_cfg[1] = '{enable: 1'b1, mode: MODE_EVENT, dir_in: 1'b0, polarity: 1'b1, dbus_sel: '0,
                    evt_code: 8'h10, delay: 32'd0, width: 32'd2, n_pulses: 16'd4, in_code: '0};
    chan_cfg[2] = '{enable: 1'b1, mode: MODE_DBUS, dir_in: 1'b0, polarity: 1'b0, dbus_sel: 3'd3,
                    evt_code: '0, delay: '0, width: '0, n_pulses: '0, in_code: '0};
    chan_cfg[N_POF + 0] = '{enable: 1'b1, mode: MODE_EVENT, dir_in: 1'b0, polarity: 1'b0,
                    dbus_sel: '0, evt_code: 8'h22, delay: 32'd7, width: 32'd1, n_pulses: 16'd2,
                    in_code: '0};
    chan_cfg[N_POF + 1] = '{enable: 1'b1, mode: MODE_EVENT, dir_in: 1'b1, polarity: 1'b0,
                    dbus_sel: '0, evt_code: '0, delay: '0, width: '0, n_pulses: '0,
                    in_code: 8'h77};
    foreach (amc_in[k]) amc_in[k] = 1'b0;
    repeat (4) @(posedge evt_clk);
    #1 evt_rst = 1'b0;
    f0 = -1000; f1 = -1000; f2 = -1000;
    pulses1 = 0; act0 = 0; prev1 = 1'b1;
    @(negedge evt_clk);
    for (int c = 0; c < 400; c++) begin
      longint s;
      rx_frame.dbus = {4'b0, 1'((c / 2) % 2), 3'b0};   // DBUS bit 3: clock at 1/4 event rate
      rx_frame.code = 8'h00;
      rx_valid = 1'b1;
      if (c == 20)  rx_frame.code = 8'h10;
      if (c == 60)  rx_frame.code = 8'h22;
      if (c == 120) begin rx_frame.code = 8'h10; rx_valid = 1'b0; end   // must fire nothing
      if (c == 200) amc_in[1] = 1'b1;
      dbus_hist.push_front(rx_frame.dbus);
      @(posedge evt_clk);
      s = evt_edge + 1;
      if (c == 20) f0 = s;
      if (c == 60) f1 = s;
      @(negedge evt_clk);
      s = evt_edge;
      // POF 0: single trigger, delay 5, width 3
      check(pof_out[0] == exp_level(chan_cfg[0], f0, s), "POF0 trigger level");
      // POF 1: inverted train of 4 pulses, width 2, no delay
      check(pof_out[1] == exp_level(chan_cfg[1], f0, s), "POF1 train level");
      // AMC 0 output: two pulses after delay 7
      check(amc_out[0] == exp_level(chan_cfg[N_POF], f1, s), "AMC0 trigger level");
      check(amc_oe[0] && !amc_oe[1], "AMC directions");
      if (pof_out[0]) act0++;
      if (!pof_out[1] && prev1) pulses1++;
      prev1 = pof_out[1];
      // POF 2: DBUS bit 3 of the frame before the one just sampled
      if (dbus_hist.size() > 2) begin
        check(pof_out[2] == dbus_hist[1][3], "POF2 DBUS clock");
        if (dbus_hist[1][3] != dbus_hist[2][3]) m_dbus_clock++;
      end
      if (tx_code != EVT_NULL) begin
        check(tx_code == 8'h77, "upstream code");
        m_upstream++;
      end
    end
    // counts: the valid frame at 20 gave one trigger of 3 cycles and 4 inverted pulses,
    // the invalid one at 120 nothing
    check(act0 == 3, "POF0 one trigger of three clocks");
    check(pulses1 == 4, "POF1 four pulses");
    if (act0 == 3) m_trigger++;
    if (pulses1 == 4) begin m_train++; m_inverted++; end
    if (act0 == 3 && pulses1 == 4) m_invalid_frame++;
    m_amc_out++;
    check(m_upstream == 1, "one upstream event");
  endtask

  // ---------------- part 2: reference clock loop ----------------
  int n_meas = 0;
  always @(posedge dmtd_clk) if (dut.u_fpc.n_valid && !dmtd_rst) n_meas++;

  task automatic wait_lock(input int max_meas, output int took, output int n_lock);
    int good;
    good = 0; took = 0; n_lock = -100;
    while (good < 300 && took < max_meas) begin
      @(posedge dmtd_clk iff dut.u_fpc.n_valid);
      took++;
      if (pdist(int'(dut.u_fpc.n), n_lock) <= 3) good++;
      else begin good = 0; n_lock = int'(dut.u_fpc.n); end
    end
  endtask

  task automatic loop_part();
    int quiet, windows, took, n1, n2, i2c0, dac0, meas0, worst;
    repeat (10) @(posedge dmtd_clk);
    dmtd_rst <= 1'b0;
    quiet = 0; windows = 0;
    while (quiet < 2 && windows < 30) begin
      @(posedge dmtd_clk iff dut.u_fpc.u_fd.diff_valid);
      windows++;
      #1;
      $display("window %0d: fd_diff=%0d (x18 Hz), VCXO writes %0d, DAC code %0d", windows,
               fd_diff, u_vcxo.n_i2c_updates, dac_code);
      if (fd_diff >= -1 && fd_diff <= 1) quiet++; else quiet = 0;
    end
    check(quiet == 2, "frequency loop settles");
    if (quiet == 2) m_freq_quiet++;
    m_freq_write = u_vcxo.n_i2c_updates;
    check(!i2c_nack, "VCXO acknowledged");
    wait_lock(20000, took, n1);
    check(took < 20000, "phase lock");
    repeat (2000) @(posedge dmtd_clk iff dut.u_fpc.n_valid);   // let the last counts settle
    n1 = int'(dut.u_fpc.n);
    $display("phase constant at n=%0d after %0d more measurements", n1, took + 2000);
    i2c0 = u_vcxo.n_i2c_updates; dac0 = u_vcxo.n_dac_frames; meas0 = n_meas; worst = 0;
    repeat (3000) begin
      @(posedge dmtd_clk iff dut.u_fpc.n_valid);
      if (pdist(int'(dut.u_fpc.n), n1) > worst) worst = pdist(int'(dut.u_fpc.n), n1);
    end
    $display("hold: worst deviation %0d counts, %0d DAC frames for %0d measurements",
             worst, u_vcxo.n_dac_frames - dac0, n_meas - meas0);
    check(worst <= 3, "phase held within 3 counts");
    if (worst <= 3 && took < 20000) m_phase_lock++;
    check(u_vcxo.n_dac_frames - dac0 >= n_meas - meas0 - 1, "one DAC frame per measurement");
    m_dac_update = u_vcxo.n_dac_frames - dac0;
    check(u_vcxo.n_i2c_updates == i2c0, "frequency loop quiet while locked");
    phase_setpoint = NW'(72 + 20);
    repeat (5000) @(posedge dmtd_clk iff dut.u_fpc.n_valid);   // about 13 loop time constants
    n2 = int'(dut.u_fpc.n);
    $display("setpoint +20: phase %0d -> %0d", n1, n2);
    check(pdist(n2, (n1 + 20) % int'(N)) <= 3, "phase follows the setpoint");
    if (pdist(n2, (n1 + 20) % int'(N)) <= 3) m_setpoint_move++;
  endtask

  initial begin
    event_part();
    evt_run = 1'b0;            // the event side is done; stop its clock to save time
    loop_part();
    $display("mechanisms: trigger %0d, train %0d, inverted %0d, dbus clock %0d, amc out %0d,",
             m_trigger, m_train, m_inverted, m_dbus_clock, m_amc_out);
    $display("  invalid frame %0d, upstream %0d, freq writes %0d, freq quiet %0d, dac %0d,",
             m_invalid_frame, m_upstream, m_freq_write, m_freq_quiet, m_dac_update);
    $display("  phase lock %0d, setpoint move %0d", m_phase_lock, m_setpoint_move);
    check(m_trigger > 0, "mechanism: delayed trigger");
    check(m_train > 0, "mechanism: pulse train");
    check(m_inverted > 0, "mechanism: inverted polarity");
    check(m_dbus_clock > 0, "mechanism: DBUS clock");
    check(m_amc_out > 0, "mechanism: AMC output");
    check(m_invalid_frame > 0, "mechanism: invalid frame ignored");
    check(m_upstream > 0, "mechanism: upstream event");
    check(m_freq_write > 0, "mechanism: I2C frequency tune");
    check(m_freq_quiet > 0, "mechanism: frequency loop dead band");
    check(m_dac_update > 0, "mechanism: SPI phase tune");
    check(m_phase_lock > 0, "mechanism: phase lock");
    check(m_setpoint_move > 0, "mechanism: setpoint change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
