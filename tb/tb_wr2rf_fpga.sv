`timescale 1ns / 1ps
// tb_wr2rf_fpga: end-to-end check of the WR2RF receiver FPGA.
// Frames are built with random fields and streamed in byte by byte; a TAI
// model counts 125 MHz cycles; a fine delay line model delays frev_fine by
// tap * 78.125 ps and feeds it back; rf_clk runs at 400 MHz. Checked:
//  - each beam/RF selection makes the H1 NCO run with the selected FTW, and
//    NCO_reset in the frame restarts the H1 phase at zero;
//  - phase_error equals the selected reference phase minus the H1 phase at
//    load;
//  - DDS_resync gives one dds_resync pulse, dds_reset pulses exactly at the
//    TAI multiples of fc_val;
//  - frev_fine follows each H1 wrap, the bunch clock runs at rf_clk/10 and
//    is re-aligned by the delayed pulse;
//  - the DAC carries a non-zero IF signal; a short frame is flagged.
module tb_wr2rf_fpga;
  import llrf_pkg::*;

  logic clk = 0, rst_n = 0, rf_clk = 0, rf_rst_n = 0;
  logic rx_valid = 0, rx_sof = 0, rx_eof = 0;
  logic [7:0] rx_data = '0;
  logic tai_valid = 0;
  logic [39:0] tai_sec;
  logic [27:0] tai_cyc;
  logic beam_sel = 0, rf_sel = 0;
  ftw_t ftw_lo_int = 48'h2345_6789_abcd, ftw_lo_frac = 48'h10;
  logic [15:0] h_rf = 16'd35640;
  logic signed [31:0] delay_cyc = '0;
  logic [31:0] fc_val = 32'd777;
  logic signed [15:0] i_set = 16'sd20000, q_set = 16'sd5000;
  logic signed [15:0] dac;
  logic dds_reset, dds_resync, frev_fine, frev_sync_in = 0;
  logic [6:0] frev_tap;
  logic bunch_clk, bunch_aligned, bunch_realign;
  logic load, frame_err, fc_locked, frev;
  phase_t phase_h1;
  logic signed [47:0] phase_error;
  logic phase_error_valid, resync_busy;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  always #1.25 rf_clk = ~rf_clk;
  wr2rf_fpga dut (.*);

  // TAI model
  longint unsigned tick = 64'd1_000_000_000 * 125_000_000 + 64'd123_456;
  assign tai_sec = 40'(tick / 125_000_000);
  assign tai_cyc = 28'(tick % 125_000_000);
  always @(posedge clk) tick <= tick + 1;

  // fine delay line model
  always @(posedge clk) if (frev_fine) begin
    automatic real d = real'(frev_tap) * 0.078125;
    fork begin
      #(d) frev_sync_in = 1;
      #8   frev_sync_in = 0;
    end join_none
  end

  // counters
  int fc_pulses = 0, fc_bad = 0, fines = 0, frevs = 0, dds_rs = 0, realigns = 0, dac_nz = 0;
  always @(posedge clk) if (rst_n) begin
    if (dds_reset) begin fc_pulses++; if (tick % fc_val != 0) fc_bad++; end
    if (fc_locked && !dds_reset && tick % fc_val == 0) fc_bad++;
    if (frev_fine) fines++;
    if (frev) frevs++;
    if (dds_resync) dds_rs++;
    if (dac != 0) dac_nz++;
  end
  always @(posedge rf_clk) if (rf_rst_n && bunch_realign) realigns++;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(payload_t p, int nbytes);
    for (int k = 0; k < nbytes; k++) begin
      rx_valid <= 1; rx_sof <= (k == 0); rx_eof <= (k == nbytes - 1);
      rx_data <= payload_byte(p, k);
      @(posedge clk);
    end
    rx_valid <= 0; rx_sof <= 0; rx_eof <= 0;
  endtask

  function automatic payload_t make(bit rst, bit dds);
    payload_t p;
    for (int b = 0; b < N_BEAMS; b++) begin
      p[b].ftw_prog     = {8'h01, 8'($urandom), $urandom};
      p[b].ftw_master   = {8'h01, 8'($urandom), $urandom};
      p[b].phase_prog   = {16'($urandom), $urandom};
      p[b].phase_master = {16'($urandom), $urandom};
      p[b].ctrl         = '{reserved: '0, dds_resync: dds, nco_resync: 1'b0, nco_reset: rst};
    end
    return p;
  endfunction

  initial begin
    payload_t p;
    ftw_t f;
    phase_t ref_ph, at_load;
    repeat (3) @(posedge clk);
    rst_n <= 1; rf_rst_n <= 1;
    tai_valid <= 1;
    for (int sel = 0; sel < 4; sel++) begin
      beam_sel <= sel[1]; rf_sel <= sel[0];
      p = make(1, sel == 2);
      send(p, PAYLOAD_BYTES);
      // load is high now; H1 restarts at 0 and then runs with the FTW
      f      = sel[0] ? p[sel[1]].ftw_master   : p[sel[1]].ftw_prog;
      ref_ph = sel[0] ? p[sel[1]].phase_master : p[sel[1]].phase_prog;
      #1 check(load, "load after last byte");
      @(posedge clk); #1;
      check(phase_h1 == '0, $sformatf("sel %0d: NCO_reset restarts H1", sel));
      @(posedge clk); #1;
      check(phase_error_valid && phase_error == $signed(ref_ph + f),
            $sformatf("sel %0d: error against the selected reference phase", sel));
      for (int k = 1; k < 200; k++) begin
        check(phase_h1 == phase_t'(f * 48'(k)), $sformatf("sel %0d: H1 step %0d", sel, k));
        @(posedge clk); #1;
      end
      repeat (3000) @(posedge clk);
      // a frame without reset: error is reference minus H1 at load
      p = make(0, 0);
      f      = sel[0] ? p[sel[1]].ftw_master   : p[sel[1]].ftw_prog;
      ref_ph = sel[0] ? p[sel[1]].phase_master : p[sel[1]].phase_prog;
      for (int k = 0; k < PAYLOAD_BYTES; k++) begin
        rx_valid <= 1; rx_sof <= (k == 0); rx_eof <= (k == PAYLOAD_BYTES - 1);
        rx_data <= payload_byte(p, k);
        @(posedge clk);
      end
      rx_valid <= 0; rx_eof <= 0;                   // last byte taken here
      @(negedge clk);
      at_load = phase_h1;              // load is high now, H1 latched next edge
      repeat (2) @(posedge clk); #1;
      check(phase_error == $signed(ref_ph - at_load),
            $sformatf("sel %0d: error without reset %0d vs %0d (valid %0d)", sel, phase_error, $signed(ref_ph - at_load), phase_error_valid));
      repeat (2000) @(posedge clk);
    end
    // short frame
    send(make(0, 0), 20);
    #1 check(frame_err && !load, "short frame flagged");
    @(posedge clk);
    repeat (100) @(posedge clk);
    check(fc_pulses > 10 && fc_bad == 0, $sformatf("f_c pulses %0d, misplaced %0d", fc_pulses, fc_bad));
    check(dds_rs == 1, $sformatf("dds_resync pulses %0d", dds_rs));
    check(frevs > 10 && fines >= frevs - 1, $sformatf("frev %0d fine pulses %0d", frevs, fines));
    check(realigns >= 1 && dac_nz > 1000, $sformatf("realigns %0d, dac active %0d", realigns, dac_nz));
    // bunch clock period: 10 rf_clk cycles, 5 high
    // (measured in a window without re-alignment)
    begin
      int hi, r0, tries;
      tries = 0;
      do begin
        r0 = realigns; hi = 0; tries++;
        for (int k = 0; k < 100; k++) begin @(posedge rf_clk); #0.1; if (bunch_clk) hi++; end
      end while (realigns != r0 && tries < 50);
      check(hi == 50 && realigns == r0, $sformatf("bunch clock duty %0d/100", hi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
