`timescale 1ns / 1fs
// tb_bunch_sync: the bunch clock of a WR2RF receiver keeps a fixed phase to
// the revolution, and finds the same phase again after a restart.
// A Beam-Control sends LHC-like frames (revolution FTW 25322000000, H_RF =
// 35640); one receiver gets them 100 clocks later. The RF clock here is not
// a free oscillator: like the real DAC + mixer output it follows the
// receiver's own NCO. At every 125 MHz clock the model takes the H1 phase
// step of the last cycle, multiplies it by H_RF and places the RF clock
// edges where that RF phase crosses whole and half turns (plus a fixed
// analog delay), so RF and revolution are locked to within femtoseconds.
// The fine revolution pulse goes through a delay-line model (tap * 78.125
// ps) into the bunch divider. Checked:
//  - after the first alignment, the divider never needs re-aligning again
//    (the pulse always hits the same RF edge), over 60 revolutions;
//  - the bunch clock rising edges sit at one fixed time, to within 5 ps,
//    modulo the bunch period, after the true H1 wrap (computed from the
//    phase values), i.e. the bunch clock is locked to the revolution;
//  - the receiver is power cycled (all its state reset at an arbitrary
//    time) and resynchronised: the bunch clock comes back at the same time
//    offset, which a plain divider restarted at an arbitrary RF edge would
//    hit only by chance (1 in 10);
//  - 3564 bunch periods fit exactly in one revolution (35640 / 10).
module tb_bunch_sync;
  import llrf_pkg::*;
  localparam int  NET_LAT = 100;
  localparam int  D = 51 + NET_LAT;
  localparam real P48 = 281474976710656.0;
  localparam real RF_DELAY = 4.7;             // analog delay of the RF chain, ns

  logic clk = 0, rst_n = 0, rf_clk = 0, rx_rst_n = 0;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ source
  logic tbl_we = 0, tbl_beam = 0;
  logic [11:0] tbl_addr = '0;
  logic [31:0] tbl_interval = '0;
  logic signed [47:0] tbl_slope = '0;
  logic [1:0] fgen_start = '0;
  ftw_t f_start [2];
  logic signed [31:0] orbit_corr [2];
  logic signed [15:0] adc [2];
  logic [15:0] h_rf = 16'd35640;
  ctrl_t ctrl [2];
  logic tx_valid, tx_sof, tx_eof, tx_overrun, rev_tick;
  logic [7:0] tx_data;
  ftw_t bc_ftw_prog [2], bc_ftw_master [2];
  phase_t bc_phase_prog [2], bc_phase_master [2];
  logic [1:0] fgen_running, pll_locked;

  assign adc[0] = '0;
  assign adc[1] = '0;

  beam_control u_bc (
    .clk, .rst_n,
    .tbl_we, .tbl_beam, .tbl_addr, .tbl_interval, .tbl_slope,
    .fgen_start, .fgen_stop(2'b00), .f_start, .orbit_corr,
    .adc, .pll_enable(2'b00), .h_rf, .ctrl,
    .tx_valid, .tx_sof, .tx_eof, .tx_data, .tx_overrun,
    .rev_tick, .ftw_prog(bc_ftw_prog), .ftw_master(bc_ftw_master),
    .phase_prog(bc_phase_prog), .phase_master(bc_phase_master),
    .fgen_running, .pll_locked
  );

  logic [39:0] tai_sec;
  logic [27:0] tai_cyc;
  longint unsigned tick = 64'd1_760_000_000 * 125_000_000 + 64'd4_321;
  assign tai_sec = 40'(tick / 125_000_000);
  assign tai_cyc = 28'(tick % 125_000_000);
  always @(posedge clk) tick <= tick + 1;

  logic [10:0] net_pipe [NET_LAT];
  always @(posedge clk) begin
    net_pipe[0] <= rst_n ? {tx_valid, tx_sof, tx_eof, tx_data} : 11'd0;
    for (int i = 1; i < NET_LAT; i++) net_pipe[i] <= rst_n ? net_pipe[i-1] : 11'd0;
  end

  // ------------------------------------------------------------ receiver
  logic dds_reset, dds_resync, frev_fine, frev_sync_in = 0, fc_locked, frev;
  logic [6:0] frev_tap;
  logic bunch_clk, bunch_aligned, bunch_realign, load, frame_err;
  logic resync_busy, pe_valid;
  logic signed [15:0] dac;
  logic signed [47:0] pe;
  phase_t phase_h1;

  wr2rf_fpga u_rx (
    .clk, .rst_n(rx_rst_n),
    .rx_valid(net_pipe[NET_LAT-1][10]), .rx_sof(net_pipe[NET_LAT-1][9]),
    .rx_eof(net_pipe[NET_LAT-1][8]), .rx_data(net_pipe[NET_LAT-1][7:0]),
    .tai_valid(1'b1), .tai_sec, .tai_cyc,
    .beam_sel(1'b0), .rf_sel(1'b0),
    .ftw_lo_int(48'h4DD2_F1A9_FBE7), .ftw_lo_frac(48'd3), .h_rf,
    .delay_cyc(32'(D * 256)), .fc_val(32'd100000),
    .i_set(16'sd16000), .q_set(16'sd0),
    .dac, .dds_reset, .dds_resync, .frev_fine, .frev_tap,
    .frev_sync_in, .rf_clk, .rf_rst_n(rx_rst_n),
    .bunch_clk, .bunch_aligned, .bunch_realign,
    .load, .frame_err, .fc_locked, .frev,
    .phase_h1, .phase_error(pe), .phase_error_valid(pe_valid), .resync_busy
  );

  // ------------------------------------------------------------ RF model
  // The phase held from the last rising clock edge (at now - 4 ns) and the
  // one before give one cycle of H1 phase; its RF crossings are replayed one
  // clock period later, shifted by RF_DELAY.
  phase_t ph_prev = '0;
  real    t_wrap = 0.0;          // time of the latest true H1 wrap
  int     n_wrap = 0;
  always @(negedge clk) begin
    phase_t step, rf0;
    real    f0, df, t_pe;
    t_pe = $realtime - 4.0;
    step = phase_h1 - ph_prev;
    rf0  = phase_t'(ph_prev * h_rf);
    f0   = real'(rf0) / P48;                       // RF phase, turns
    df   = real'(step) * real'(h_rf) / P48;        // RF turns this cycle
    if (step != 0) begin
      for (int k = int'($floor(2.0 * f0)) + 1; real'(k) <= 2.0 * (f0 + df); k++) begin
        automatic real dly = (real'(k) / 2.0 - f0) / df * 8.0 + 4.0 + RF_DELAY;
        automatic bit  lvl = (k % 2 == 0);
        fork begin #(dly) rf_clk = lvl; end join_none
      end
      if (frev) begin
        t_wrap = t_pe - real'(phase_h1) / real'(step) * 8.0;
        n_wrap++;
      end
    end
    ph_prev = phase_h1;
  end

  // fine delay line
  always @(posedge clk) if (frev_fine) begin
    automatic real d = real'(frev_tap) * 0.078125;
    fork begin
      #(d) frev_sync_in = 1;
      #8   frev_sync_in = 0;
    end join_none
  end

  // ------------------------------------------------------------ monitors
  real t_bunch;                  // bunch period, from the constant FTW
  int  n_realign = 0;
  always @(posedge rf_clk) if (rx_rst_n && bunch_realign) n_realign++;

  // margin of the sync pulse to the nearest RF rising edge
  real t_rf_rise = 0.0, margin_min = 1.0e9;
  always @(posedge rf_clk) t_rf_rise = $realtime;
  always @(posedge frev_sync_in) if (measuring) begin
    automatic real m = $realtime - t_rf_rise;
    automatic real t_rf = t_bunch / 10.0;
    if (t_rf - m < m) m = t_rf - m;
    if (m < margin_min) margin_min = m;
  end

  bit  measuring = 0;
  real off_ref = -1.0, off_worst = 0.0;
  int  n_bunch = 0;
  always @(posedge bunch_clk) if (measuring) begin
    automatic real off = $realtime - t_wrap;
    automatic real d;
    off = off - $floor(off / t_bunch) * t_bunch;
    n_bunch++;
    if (off_ref < 0.0) off_ref = off;
    d = off - off_ref;
    if (d >  t_bunch / 2.0) d = d - t_bunch;
    if (d < -t_bunch / 2.0) d = d + t_bunch;
    if (d < 0.0) d = -d;
    if (d > off_worst) off_worst = d;
  end

  task automatic wait_revs(int n);
    repeat (n) begin
      @(posedge clk);
      while (!frev) @(posedge clk);
    end
  endtask

  // align, then measure over n revolutions; returns the bunch-clock offset
  task automatic run_and_measure(int n, string what, output real off);
    int r0;
    int took = 0, run = 0;
    // wait for the phase ramp to end: receiver exactly at the source phase
    // for a whole revolution
    while (run < 12000 && took < 20_000_000) begin
      @(negedge clk);
      took++;
      run = (phase_h1 == bc_phase_prog[0] && !resync_busy) ? run + 1 : 0;
    end
    check(run == 12000, $sformatf("%s: receiver reached the source phase", what));
    wait_revs(2);                        // the next sync pulses re-align
    r0 = n_realign;
    off_ref = -1.0; off_worst = 0.0; n_bunch = 0; margin_min = 1.0e9;
    measuring = 1;
    wait_revs(n);
    measuring = 0;
    check(n_realign == r0, $sformatf("%s: %0d re-alignments while locked", what, n_realign - r0));
    check(n_bunch > 3564 * (n - 1) && off_worst < 0.005,
          $sformatf("%s: %0d bunch edges, worst offset deviation %f ns", what, n_bunch, off_worst));
    $display("%s: bunch offset %f ns, sync pulse margin to RF edges %f ns", what, off_ref, margin_min);
    off = off_ref;
  endtask

  real off1, off2;
  initial begin
    f_start[0] = 48'd25322000000; f_start[1] = 48'd25322000000;
    orbit_corr[0] = 32'sd0; orbit_corr[1] = 32'sd0;
    t_bunch = 10.0 * 8.0 * P48 / (real'(f_start[0]) * 35640.0);
    check(35640 % 10 == 0, "whole number of bunch periods per revolution");
    ctrl[0] = '{reserved: '0, dds_resync: 1'b0, nco_resync: 1'b1, nco_reset: 1'b1};
    ctrl[1] = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    // a constant program: one flat vector, then the end marker
    tbl_we <= 1;
    tbl_addr <= 0; tbl_interval <= 2; tbl_slope <= 48'sd0;
    @(posedge clk);
    tbl_addr <= 1; tbl_interval <= 0;
    @(posedge clk);
    tbl_we <= 0;
    fgen_start <= 2'b01;
    @(posedge clk);
    fgen_start <= 2'b00;
    repeat (3333) @(posedge clk);
    rx_rst_n <= 1;
    wait_revs(2);
    ctrl[0].nco_reset = 1'b0;
    run_and_measure(30, "first start", off1);
    check(n_realign >= 1, "the divider was re-aligned by the pulse at start-up");
    // power cycle: receiver and its RF chain restart at an arbitrary time
    rx_rst_n <= 0;
    repeat (54_321) @(posedge clk);
    rx_rst_n <= 1;
    ctrl[0].nco_reset = 1'b1;
    wait_revs(2);
    ctrl[0].nco_reset = 1'b0;
    run_and_measure(30, "after power cycle", off2);
    begin
      real d = off2 - off1;
      if (d >  t_bunch / 2.0) d = d - t_bunch;
      if (d < -t_bunch / 2.0) d = d + t_bunch;
      check(d < 0.005 && d > -0.005, $sformatf("same bunch-clock phase after power cycle (%f ns apart)", d));
    end
    check(!frame_err && !tx_overrun, "no frame errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
