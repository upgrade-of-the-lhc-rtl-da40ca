`timescale 1ns / 1ps
// tb_llrf_wr_top: end-to-end run of the RF distribution, all parameters at
// their defaults.
// The Beam-Control plays a frequency program for beam 1 around the LHC
// revolution frequency (FTW 25322000000, 11.245 kHz at 125 MHz), with an
// orbit correction, and sends one frame per revolution. The network model
// delivers the frame stream to the WR2RF receiver NET_LAT clocks later. A
// TAI model, a VCXO model for beam 1 (sampled by the "ADC"), a fine delay
// line model and a 400 MHz RF clock complete the setup.
// Operation:
//  1. program RF: the first frames carry NCO_reset and all carry NCO_resync;
//     after the ramp and the phase ramp the receiver H1 phase must equal the
//     Beam-Control program phase exactly, clock by clock (the delay
//     compensation is set to the known frame latency 51 + NET_LAT clocks);
//  2. mode switch to the master RF with the DPLL of beam 1 enabled: after
//     lock and a new reset/resync the receiver RF phase must follow the
//     master NCO within 1/100 turn;
// and every mechanism must have happened: frames loaded, NCO reset, phase
// ramp, ramp played, orbit correction, f_c pulses at TAI multiples, DDS
// resync, fine revolution pulses, bunch-clock re-alignment, PLL lock, mode
// switch.
module tb_llrf_wr_top;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int NET_LAT = 100;
  localparam int D = 51 + NET_LAT;           // rev_tick to load, in clocks

  logic clk = 0, rst_n = 0, rf_clk = 0, rf_rst_n = 0;
  logic tbl_we = 0, tbl_beam = 0;
  logic [11:0] tbl_addr = '0;
  logic [31:0] tbl_interval = '0;
  logic signed [47:0] tbl_slope = '0;
  logic [1:0] fgen_start = '0, fgen_stop = '0, pll_enable = '0;
  ftw_t f_start [2];
  logic signed [31:0] orbit_corr [2];
  logic signed [15:0] vcxo_adc [2];
  logic [15:0] h_rf = 16'd35640;
  ctrl_t ctrl [2];
  logic rev_tick, tx_overrun;
  ftw_t bc_ftw_prog [2], bc_ftw_master [2];
  phase_t bc_phase_prog [2], bc_phase_master [2];
  logic [1:0] fgen_running, pll_locked;
  logic net_tx_valid, net_tx_sof, net_tx_eof;
  logic [7:0] net_tx_data;
  logic net_rx_valid, net_rx_sof, net_rx_eof;
  logic [7:0] net_rx_data;
  logic tai_valid = 0;
  logic [39:0] tai_sec;
  logic [27:0] tai_cyc;
  logic rx_beam_sel = 0, rx_rf_sel = 0;
  ftw_t ftw_lo_int = 48'h4DD2_F1A9_FBE7, ftw_lo_frac = 48'd3;
  logic signed [31:0] delay_cyc = 32'(D * 256);
  logic [31:0] fc_val = 32'd100000;
  logic signed [15:0] i_set = 16'sd16000, q_set = 16'sd0, dac;
  logic dds_reset, dds_resync, frev_fine, frev_sync_in = 0;
  logic [6:0] frev_tap;
  logic bunch_clk, bunch_aligned, bunch_realign;
  logic rx_load, rx_frame_err, fc_locked, rx_frev;
  phase_t rx_phase_h1;
  logic signed [47:0] rx_phase_error;
  logic rx_phase_error_valid, rx_resync_busy;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  always #1.25 rf_clk = ~rf_clk;

  llrf_wr_top dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- environment
  // WR network: fixed latency
  logic [10:0] net_pipe [NET_LAT];
  always @(posedge clk) begin
    net_pipe[0] <= rst_n ? {net_tx_valid, net_tx_sof, net_tx_eof, net_tx_data} : 11'd0;
    for (int i = 1; i < NET_LAT; i++) net_pipe[i] <= rst_n ? net_pipe[i-1] : 11'd0;
  end
  assign {net_rx_valid, net_rx_sof, net_rx_eof, net_rx_data} = net_pipe[NET_LAT-1];

  // TAI
  longint unsigned tick = 64'd1_760_000_000 * 125_000_000 + 64'd98_765_432;
  assign tai_sec = 40'(tick / 125_000_000);
  assign tai_cyc = 28'(tick % 125_000_000);
  always @(posedge clk) tick <= tick + 1;

  // VCXO of beam 1: the program plus 400 FTW units (the beam loops' share)
  phase_t vcxo = 48'h5555_0000_1234;
  always @(posedge clk) begin
    phase_t rf;
    vcxo <= vcxo + bc_ftw_prog[0] + 48'd400;
    rf = phase_t'(vcxo * h_rf);
    vcxo_adc[0] <= 16'($rtoi(20000.0 * $cos(2.0 * PI * real'(rf) / 281474976710656.0)));
  end
  assign vcxo_adc[1] = '0;

  // fine delay line
  always @(posedge clk) if (frev_fine) begin
    automatic real d = real'(frev_tap) * 0.078125;
    fork begin
      #(d) frev_sync_in = 1;
      #8   frev_sync_in = 0;
    end join_none
  end

  // ------------------------------------------------------ event counters
  int n_load = 0, n_reset = 0, n_ramp = 0, n_fc = 0, n_fc_bad = 0, n_ddsrs = 0;
  int n_fine = 0, n_realign = 0, n_ferr = 0, n_dac = 0;
  bit prev_busy = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_load) begin
      n_load++;
      if (dut.u_wr2rf.rec.ctrl.nco_reset) n_reset++;
    end
    if (rx_resync_busy && !prev_busy) n_ramp++;
    prev_busy <= rx_resync_busy;
    if (dds_reset) begin n_fc++; if (tick % fc_val != 0) n_fc_bad++; end
    if (fc_locked && !dds_reset && tick % fc_val == 0) n_fc_bad++;
    if (dds_resync) n_ddsrs++;
    if (frev_fine) n_fine++;
    if (rx_frame_err) n_ferr++;
    if (dac > 16'sd1000) n_dac++;
  end
  always @(posedge rf_clk) if (rf_rst_n && bunch_realign) n_realign++;

  task automatic wait_ticks(int n);
    repeat (n) begin
      @(posedge clk);
      while (!rev_tick) @(posedge clk);
    end
  endtask

  // exact clock-by-clock phase agreement over n clocks
  task automatic check_locked_phase(int n, string what);
    int bad = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      if (rx_phase_h1 != bc_phase_prog[0]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d of %0d clocks differ", what, bad, n));
  endtask

  int  ramp_end_seen = 0;
  logic [79:0] acc;

  initial begin
    f_start[0] = 48'd25322000000; f_start[1] = 48'd25322000000;
    orbit_corr[0] = 32'sd0; orbit_corr[1] = 32'sd0;
    ctrl[0] = '{reserved: '0, dds_resync: 1'b1, nco_resync: 1'b1, nco_reset: 1'b1};
    ctrl[1] = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1; rf_rst_n <= 1;
    tai_valid <= 1;
    // beam 1 program: up by about 4200 FTW units in 100000 clocks, flat
    // 20000, end
    tbl_we <= 1; tbl_beam <= 0;
    tbl_addr <= 0; tbl_interval <= 100000; tbl_slope <= 48'sd180388626;
    @(posedge clk);
    tbl_addr <= 1; tbl_interval <= 20000; tbl_slope <= 48'sd0;
    @(posedge clk);
    tbl_addr <= 2; tbl_interval <= 0;
    @(posedge clk);
    tbl_we <= 0;
    fgen_start <= 2'b01;
    @(posedge clk);
    fgen_start <= 2'b00;
    // the first frame resets the receiver NCO; later ones keep it in phase
    wait_ticks(1);
    @(posedge clk);
    ctrl[0].nco_reset = 1'b0;
    ctrl[0].dds_resync = 1'b0;
    #1 wait (fgen_running == 2'b00);
    acc = {f_start[0], 32'd0} + 80'(100000) * 80'(180388626);
    #1 check(bc_ftw_prog[0] == acc[79:32], "program ramp end value");
    orbit_corr[0] = 32'sd777;
    @(posedge clk); #1;
    check(bc_ftw_prog[0] == acc[79:32] + 48'd777, "orbit correction applied");
    // let the resync ramps converge with the program frequency constant
    wait_ticks(30);
    check_locked_phase(20000, "program RF");
    // ------------------------------------------------ switch to master RF
    pll_enable <= 2'b01;
    repeat (300000) @(posedge clk);
    check(pll_locked[0], "DPLL of beam 1 locked");
    rx_rf_sel <= 1'b1;
    ctrl[0].nco_reset = 1'b1;
    wait_ticks(1);
    @(posedge clk);
    ctrl[0].nco_reset = 1'b0;
    wait_ticks(30);
    begin
      int bad = 0;
      real worst = 0.0;
      for (int k = 0; k < 20000; k++) begin
        phase_t dph;
        real t;
        @(negedge clk);
        dph = phase_t'(rx_phase_h1 * h_rf) - phase_t'(bc_phase_master[0] * h_rf);
        t = real'($signed(dph)) / 281474976710656.0;
        if (t < 0) t = -t;
        if (t > worst) worst = t;
      end
      check(worst < 0.01, $sformatf("master RF phase difference %f turn", worst));
    end
    // ------------------------------------------------ mechanisms
    check(n_load > 50,      $sformatf("frames loaded: %0d", n_load));
    check(n_reset >= 2,     $sformatf("NCO resets: %0d", n_reset));
    check(n_ramp >= 2,      $sformatf("phase ramps: %0d", n_ramp));
    check(n_fc >= 5 && n_fc_bad == 0, $sformatf("f_c pulses: %0d (misplaced %0d)", n_fc, n_fc_bad));
    check(n_ddsrs >= 1,     $sformatf("DDS resync pulses: %0d", n_ddsrs));
    check(n_fine >= 50,     $sformatf("fine revolution pulses: %0d", n_fine));
    check(n_realign >= 1,   $sformatf("bunch clock re-alignments: %0d", n_realign));
    check(n_ferr == 0 && !tx_overrun, "no frame errors");
    check(n_dac > 1000,     $sformatf("DAC samples above 1000: %0d", n_dac));
    $display("mechanisms: loads=%0d resets=%0d ramps=%0d fc=%0d ddsresync=%0d fine=%0d realign=%0d",
             n_load, n_reset, n_ramp, n_fc, n_ddsrs, n_fine, n_realign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
