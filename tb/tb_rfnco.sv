// tb_rfnco: checks the receiver NCO.
// A reference model keeps the ideal H1 phase (sum of the latched FTWs) and
// the LO phase (integer + fractional accumulators). Checked:
//  - after a load with NCO_reset the H1 phase is k*FTW, clock by clock, and
//    frev is high exactly in the cycles where the model wraps;
//  - a new FTW is used from the clock after `load`;
//  - phase_error = phase_master + FTW*delay - (H1 phase at load), two clocks
//    after load, with and without delay compensation;
//  - with NCO_resync the error is removed by a ramp: when resync_busy drops
//    the H1 phase equals the model plus the error, and no single clock
//    advanced by more than FTW + MAX_STEP;
//  - cos/sin(IF) equal 32767*cos/sin(2*pi*(LO - H_RF*H1)/2**48) within 6
//    LSB, CORDIC_ITER + 4 = 20 clocks after the H1 phase.
module tb_rfnco;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real TWO48 = 281474976710656.0;

  logic clk = 0, rst_n = 0;
  logic load = 0, nco_resync = 0, nco_reset = 0, fc_reset = 0;
  ftw_t ftw_master = '0, ftw_lo_int = '0, ftw_lo_frac = '0;
  phase_t phase_master = '0;
  logic [15:0] h_rf = 16'd35640;
  logic signed [31:0] delay_cyc = '0;
  logic signed [47:0] phase_error;
  logic phase_error_valid, resync_busy, frev, if_valid;
  phase_t phase_h1;
  logic signed [15:0] cos_if, sin_if;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  rfnco dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- model
  phase_t m_h1 = '0, m_lo_i = '0, m_lo_f = '0;
  ftw_t   m_ftw = '0;
  int     m_div = 0;
  bit     m_wrap = 0;
  phase_t h1_hist [$];
  phase_t lo_hist [$];
  int     frev_err = 0, wraps = 0, if_checks = 0;
  bit     track = 0;       // model valid (after the first reset)

  always @(posedge clk) begin
    logic [48:0] s;
    if (rst_n) begin
      if (nco_reset) begin
        m_h1 <= '0; m_wrap <= 0;
      end else begin
        s = {1'b0, m_h1} + {1'b0, m_ftw};
        m_h1 <= s[47:0]; m_wrap <= s[48];
      end
      if (load) m_ftw <= ftw_master;
      if (fc_reset || nco_reset) begin
        m_lo_i <= '0; m_lo_f <= '0; m_div <= 0;
      end else begin
        m_lo_i <= m_lo_i + ftw_lo_int;
        if (m_div == 4) begin m_lo_f <= m_lo_f + ftw_lo_frac; m_div <= 0; end
        else m_div <= m_div + 1;
      end
    end
  end

  // clock-by-clock comparison while no correction is running
  bit corr_seen = 0;
  always @(negedge clk) if (track) begin
    if (!corr_seen) begin
      checks++;
      if (phase_h1 != m_h1 || frev != m_wrap) begin
        failures++;
        $display("FAIL: H1 %h model %h frev %0d/%0d", phase_h1, m_h1, frev, m_wrap);
      end
      if (frev) wraps++;
    end
    h1_hist.push_back(phase_h1);
    lo_hist.push_back(phase_t'(m_lo_i + m_lo_f));
    if (h1_hist.size() > 20) begin
      phase_t h, l, ifp;
      real a, ec, es;
      h = h1_hist.pop_front();
      l = lo_hist.pop_front();
      ifp = l - phase_t'(h * h_rf);
      a = 2.0 * PI * real'(ifp) / TWO48;
      ec = real'(cos_if) - 32767.0 * $cos(a);
      es = real'(sin_if) - 32767.0 * $sin(a);
      checks++; if_checks++;
      if (!(if_valid && ec < 6.0 && ec > -6.0 && es < 6.0 && es > -6.0)) begin
        failures++;
        $display("FAIL: IF cos %0d sin %0d expected %f %f", cos_if, sin_if,
                 32767.0 * $cos(a), 32767.0 * $sin(a));
      end
    end
  end

  task automatic do_load(ftw_t f, phase_t pm, bit rs, bit rst);
    ftw_master <= f; phase_master <= pm; nco_resync <= rs; nco_reset <= rst;
    load <= 1;
    @(posedge clk);
    load <= 0; nco_reset <= 0;
  endtask

  initial begin
    phase_t at_load, expect_err, target;
    longint e;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    ftw_lo_int  <= 48'h1234_5678_9abc;
    ftw_lo_frac <= 48'h0000_0123_4567;
    fc_reset <= 1; @(posedge clk); fc_reset <= 0;
    // start: reset and first FTW (1/256 turn per clock)
    do_load(48'h0100_0000_0000, 48'h0, 0, 1);
    track = 1;
    repeat (3000) @(posedge clk);
    // new FTW, compare without resync
    for (int n = 0; n < 6; n++) begin
      e = longint'($urandom) - 64'd2147483648;
      @(negedge clk);
      // load happens at the next edge; the H1 phase then is phase_h1 now
      at_load = phase_h1;
      begin
        logic signed [31:0]  d;
        ftw_t                f;
        logic signed [80:0] prod;
        d = (n < 3) ? 32'sd0 : 32'(n * 1000 + 77);          // Q24.8 cycles
        f = 48'h0003_0000_0000 + 48'(n * 48'h1_0000_0001);
        prod = $signed({1'b0, f}) * d;
        delay_cyc    <= d;
        ftw_master   <= f;
        phase_master <= phase_t'(at_load + phase_t'(e) - phase_t'(prod[55:8]));
        expect_err = phase_t'(e);
      end
      load <= 1;
      @(posedge clk); load <= 0;
      #1;
      check(!phase_error_valid, "error not yet valid in the clock after load");
      @(posedge clk); #1;
      check(phase_error_valid && phase_error == $signed(expect_err),
            $sformatf("phase_error %0d expected %0d", phase_error, $signed(expect_err)));
      repeat (500) @(posedge clk);
    end
    // resync: error of 2**31 + something is absorbed by a ramp
    for (int n = 0; n < 4; n++) begin
      phase_t prev_ph;
      int len;
      bit stepok;
      e = (n % 2 ? -1 : 1) * (longint'($urandom_range(1, 1 << 30)) + (longint'(1) << 31));
      delay_cyc <= '0;
      @(negedge clk);
      at_load = phase_h1;
      phase_master <= phase_t'(at_load + m_ftw - m_ftw + phase_t'(e));
      // load at the next edge; at that edge the H1 phase equals at_load
      nco_resync <= 1; load <= 1; ftw_master <= m_ftw;
      @(posedge clk); load <= 0;
      corr_seen = 1;
      len = 0; stepok = 1;
      prev_ph = phase_h1;
      do begin
        @(negedge clk);
        if (phase_t'(phase_h1 - prev_ph) > phase_t'(m_ftw + 48'd16777216)) stepok = 0;
        prev_ph = phase_h1;
        len++;
      end while (len < 4 || resync_busy);
      repeat (3) @(negedge clk);
      check(phase_h1 == phase_t'(m_h1 + phase_t'(e)),
            $sformatf("after resync H1 %h model+e %h", phase_h1, phase_t'(m_h1 + phase_t'(e))));
      check(stepok, "ramp steps within FTW + MAX_STEP");
      check(len >= int'(((e < 0 ? -e : e) >> 24)), $sformatf("ramp length %0d", len));
      // the model follows the corrected phase from here on
      m_h1 = m_h1 + phase_t'(e);
      nco_resync <= 0;
      @(negedge clk);
      corr_seen = 0;
      repeat (300) @(posedge clk);
    end
    check(wraps > 3 && if_checks > 1000, $sformatf("wraps %0d IF checks %0d", wraps, if_checks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
