`timescale 1ns / 1ps
// tb_phase_recovery: two WR2RF receivers at different distances rebuild the
// same program RF, with no NCO reset in any frame.
// One Beam-Control sends its frames once per revolution. Receiver 0 gets
// them after 1250 clocks (10 us, a latency-critical path), receiver 1 after
// 16000 clocks (128 us, the general timing network); each compensates its
// own latency (delay_cyc). Receivers start at arbitrary times with an NCO at
// phase 0, so only the phase comparison and the glitch-free re-sync ramp can
// bring them into phase. The test:
//  1. receiver 0 starts with the source, receiver 1 much later; both must
//     converge to the source program phase, exactly, clock by clock;
//  2. the source plays a frequency ramp; after it both must be back in
//     phase exactly;
//  3. receiver 1 is "power cycled" (held in reset and restarted): it must
//     recover the same phase, while receiver 0 stays in phase throughout.
// During the whole run every clock-to-clock H1 phase step of each receiver
// must differ from the FTW it was made with by at most the re-sync step
// (2**24): the phase is never moved by a jump. The checks are against the source's own
// program NCO, so phase agreement of the receivers with each other follows.
module tb_phase_recovery;
  import llrf_pkg::*;
  localparam int NR = 2;
  localparam int LAT [NR] = '{1250, 16000};
  localparam longint unsigned MAX_STEP = 64'd16777216;

  logic clk = 0, rst_n = 0, rf_clk = 0;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  always #1.25 rf_clk = ~rf_clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
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
  logic [1:0] fgen_start = '0, fgen_stop = '0;
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
    .fgen_start, .fgen_stop, .f_start, .orbit_corr,
    .adc, .pll_enable(2'b00), .h_rf, .ctrl,
    .tx_valid, .tx_sof, .tx_eof, .tx_data, .tx_overrun,
    .rev_tick, .ftw_prog(bc_ftw_prog), .ftw_master(bc_ftw_master),
    .phase_prog(bc_phase_prog), .phase_master(bc_phase_master),
    .fgen_running, .pll_locked
  );

  // TAI, shared by all receivers
  logic [39:0] tai_sec;
  logic [27:0] tai_cyc;
  longint unsigned tick = 64'd1_760_000_000 * 125_000_000 + 64'd12_345;
  assign tai_sec = 40'(tick / 125_000_000);
  assign tai_cyc = 28'(tick % 125_000_000);
  always @(posedge clk) tick <= tick + 1;

  // ------------------------------------------------------------ network
  // a ring buffer per receiver, read LAT[r] clocks after it was written
  localparam int RB = 16384 * 2;
  logic [10:0] ring [RB];
  int unsigned wp = 0;
  always @(posedge clk) begin
    ring[wp % RB] <= rst_n ? {tx_valid, tx_sof, tx_eof, tx_data} : 11'd0;
    wp <= wp + 1;
  end
  initial for (int i = 0; i < RB; i++) ring[i] = '0;

  // ------------------------------------------------------------ receivers
  logic   rx_rst_n [NR];
  phase_t rx_ph    [NR];
  logic   rx_busy  [NR];
  logic   rx_load  [NR];
  logic   rx_ferr  [NR];
  ftw_t   rx_ftw   [NR];
  int     n_ramp   [NR];
  int     n_jump   [NR];

  for (genvar r = 0; r < NR; r++) begin : g_rx
    logic [10:0] net;
    logic dds_reset, dds_resync, frev_fine, fc_locked, frev;
    logic [6:0] frev_tap;
    logic bunch_clk, bunch_aligned, bunch_realign, pe_valid;
    logic signed [15:0] dac;
    logic signed [47:0] pe;
    assign net = ring[(wp + RB - LAT[r]) % RB];

    wr2rf_fpga u_rx (
      .clk, .rst_n(rx_rst_n[r]),
      .rx_valid(net[10]), .rx_sof(net[9]), .rx_eof(net[8]), .rx_data(net[7:0]),
      .tai_valid(1'b1), .tai_sec, .tai_cyc,
      .beam_sel(1'b0), .rf_sel(1'b0),
      .ftw_lo_int(48'h4DD2_F1A9_FBE7), .ftw_lo_frac(48'd3), .h_rf,
      .delay_cyc(32'((51 + LAT[r]) * 256)), .fc_val(32'd100000),
      .i_set(16'sd16000), .q_set(16'sd0),
      .dac, .dds_reset, .dds_resync, .frev_fine, .frev_tap,
      .frev_sync_in(1'b0), .rf_clk, .rf_rst_n(rx_rst_n[r]),
      .bunch_clk, .bunch_aligned, .bunch_realign,
      .load(rx_load[r]), .frame_err(rx_ferr[r]), .fc_locked, .frev,
      .phase_h1(rx_ph[r]), .phase_error(pe), .phase_error_valid(pe_valid),
      .resync_busy(rx_busy[r])
    );
    assign rx_ftw[r] = u_rx.u_nco.ftw_lat;

    // no jumps: each phase step is the FTW latched in the cycle before plus
    // at most one re-sync step
    phase_t prev_ph;
    ftw_t   prev_ftw;
    bit     prev_busy = 0, have_prev = 0;
    always @(posedge clk) begin
      if (rx_rst_n[r]) begin
        if (have_prev) begin
          longint signed dev;
          dev = longint'($signed(phase_t'(rx_ph[r] - prev_ph - prev_ftw)));
          if (dev > longint'(MAX_STEP) || dev < -longint'(MAX_STEP)) n_jump[r]++;
        end
        prev_ph   <= rx_ph[r];
        prev_ftw  <= rx_ftw[r];
        have_prev <= 1'b1;
        if (rx_busy[r] && !prev_busy) n_ramp[r]++;
        prev_busy <= rx_busy[r];
        if (rx_ferr[r]) failures++;
      end else begin
        have_prev <= 1'b0;
        prev_busy <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ helpers
  function automatic bit in_phase(int r);
    return rx_rst_n[r] && rx_ph[r] == bc_phase_prog[0] && !rx_busy[r];
  endfunction

  // wait until receiver r has been in phase for a whole revolution
  task automatic wait_in_phase(int r, int max_clocks, output int took);
    int run = 0;
    took = 0;
    while (run < 12000 && took < max_clocks) begin
      @(negedge clk);
      took++;
      run = in_phase(r) ? run + 1 : 0;
    end
  endtask

  task automatic check_in_phase(int r, int n, string what);
    int bad = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      if (!in_phase(r)) bad++;
    end
    check(bad == 0, $sformatf("%s: receiver %0d out of phase in %0d of %0d clocks", what, r, bad, n));
  endtask

  // receiver 0 must stay in phase while this runs (set during step 3)
  bit watch0 = 0;
  int bad0 = 0;
  always @(negedge clk) if (watch0 && !in_phase(0)) bad0++;

  task automatic write_vec(int a, int iv, logic signed [47:0] sl);
    tbl_we <= 1; tbl_addr <= 12'(a); tbl_interval <= 32'(iv); tbl_slope <= sl;
    @(posedge clk);
    tbl_we <= 0;
  endtask

  task automatic start_program();
    fgen_start <= 2'b01;
    @(posedge clk);
    fgen_start <= 2'b00;
    #1 wait (fgen_running == 2'b00);
    @(posedge clk); #1;
  endtask

  int took;
  logic [79:0] acc;
  initial begin
    for (int r = 0; r < NR; r++) begin rx_rst_n[r] = 0; n_ramp[r] = 0; n_jump[r] = 0; end
    f_start[0] = 48'd25322000000; f_start[1] = 48'd25322000000;
    orbit_corr[0] = 32'sd0; orbit_corr[1] = 32'sd0;
    // re-sync on, and never an NCO reset
    ctrl[0] = '{reserved: '0, dds_resync: 1'b0, nco_resync: 1'b1, nco_reset: 1'b0};
    ctrl[1] = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    // first program: constant f_start (one flat vector, then the end)
    write_vec(0, 2, 0);
    write_vec(1, 0, 0);
    start_program();
    check(bc_ftw_prog[0] == f_start[0], "source runs at f_start");
    repeat (5000) @(posedge clk);
    rx_rst_n[0] <= 1;                  // receiver 0 starts early
    repeat (1_234_567) @(posedge clk);
    rx_rst_n[1] <= 1;                  // receiver 1 starts much later
    // ---------------------------------------------- 1. first start-up
    for (int r = 0; r < NR; r++) begin
      wait_in_phase(r, 20_000_000, took);
      check(took < 20_000_000, $sformatf("start-up: receiver %0d reached the source phase", r));
    end
    for (int r = 0; r < NR; r++) check_in_phase(r, 20000, "after start-up");
    // ---------------------------------------------- 2. frequency ramp
    // second program: flat 20000 clocks, then up by 2**22 FTW units in
    // 100000 clocks, then constant; it starts from f_start, the frequency
    // already running, so nothing jumps
    write_vec(0, 20000, 0);
    write_vec(1, 100000, 48'sd180143985094);   // about 2**54 / 100000
    write_vec(2, 0, 0);
    start_program();
    acc = {f_start[0], 32'd0} + 80'(100000) * 80'd180143985094;
    check(bc_ftw_prog[0] == acc[79:32], "source ramp end value");
    for (int r = 0; r < NR; r++) begin
      wait_in_phase(r, 20_000_000, took);
      check(took < 20_000_000, $sformatf("after ramp: receiver %0d back in phase", r));
    end
    for (int r = 0; r < NR; r++) check_in_phase(r, 20000, "after ramp");
    // ---------------------------------------------- 3. power cycle of 1
    watch0 = 1;
    rx_rst_n[1] <= 0;
    repeat (777_777) @(posedge clk);
    rx_rst_n[1] <= 1;
    repeat (100) @(posedge clk);
    check(!in_phase(1), "power cycle: receiver 1 lost its phase");
    wait_in_phase(1, 20_000_000, took);
    check(took < 20_000_000, "power cycle: receiver 1 recovered the source phase");
    check_in_phase(1, 20000, "after power cycle");
    watch0 = 0;
    check(bad0 == 0, $sformatf("receiver 0 out of phase in %0d clocks during step 3", bad0));
    // ---------------------------------------------- mechanisms
    for (int r = 0; r < NR; r++) begin
      check(n_ramp[r] >= 2, $sformatf("receiver %0d phase ramps: %0d", r, n_ramp[r]));
      check(n_jump[r] == 0, $sformatf("receiver %0d phase jumps: %0d", r, n_jump[r]));
    end
    check(!tx_overrun, "no frame overrun");
    $display("phase ramps: rx0=%0d rx1=%0d", n_ramp[0], n_ramp[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
