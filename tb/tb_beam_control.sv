// tb_beam_control: checks the Beam-Control frame source.
// Both function generators get a short ramp program (different per beam,
// written through the shared table port). Checked:
//  - one frame per revolution: a frame starts one clock after every
//    rev_tick, and rev_tick is the carry of the beam-1 program NCO, whose
//    phase is the running sum of ftw_prog;
//  - every frame carries exactly the FTWs, control bytes and phases of both
//    beams of its rev_tick cycle, in wire order;
//  - ftw_prog follows the ramp (f_start + sum of slopes) and the orbit
//    correction;
//  - with the DPLL of beam 2 enabled on a VCXO model, ftw_master of beam 2
//    converges to the VCXO tuning word and pll_locked rises, while beam 1
//    (PLL off) sends ftw_master = ftw_prog.
module tb_beam_control;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic tbl_we = 0, tbl_beam = 0;
  logic [11:0] tbl_addr = '0;
  logic [31:0] tbl_interval = '0;
  logic signed [47:0] tbl_slope = '0;
  logic [1:0] fgen_start = '0, fgen_stop = '0, pll_enable = '0;
  ftw_t f_start [2];
  logic signed [31:0] orbit_corr [2];
  logic signed [15:0] adc [2];
  logic [15:0] h_rf = 16'd35640;
  ctrl_t ctrl [2];
  logic tx_valid, tx_sof, tx_eof, tx_overrun, rev_tick;
  logic [7:0] tx_data;
  ftw_t ftw_prog [2], ftw_master [2];
  phase_t phase_prog [2], phase_master [2];
  logic [1:0] fgen_running, pll_locked;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  beam_control dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // VCXO model of beam 2, 500 FTW units above its program
  phase_t vcxo = 48'h0;
  always @(posedge clk) begin
    phase_t rf;
    vcxo <= vcxo + ftw_prog[1] + 48'd500;
    rf = phase_t'(vcxo * h_rf);
    adc[1] <= 16'($rtoi(20000.0 * $cos(2.0 * PI * real'(rf) / 281474976710656.0)));
  end
  assign adc[0] = '0;

  // frame monitor
  payload_t snap, got;
  logic [PAYLOAD_BITS-1:0] sh;
  int nb = 0, frames = 0, bad_frames = 0, ticks = 0, late = 0, nco_bad = 0;
  bit prev_tick = 0;
  phase_t m_prog = '0;
  always @(posedge clk) if (rst_n) begin
    logic [48:0] s;
    // program NCO model of beam 1 and its carry
    s = {1'b0, m_prog} + {1'b0, ftw_prog[0]};
    if (phase_prog[0] != m_prog) nco_bad++;
    m_prog <= s[47:0];
    if (rev_tick) begin
      ticks++;
      for (int b = 0; b < 2; b++)
        snap[b] <= '{ftw_prog: ftw_prog[b], ftw_master: ftw_master[b], ctrl: ctrl[b],
                     phase_prog: phase_prog[b], phase_master: phase_master[b]};
    end
    if (prev_tick && !(tx_valid && tx_sof)) late++;
    prev_tick <= rev_tick;
    if (tx_valid) begin
      sh = {sh[PAYLOAD_BITS-9:0], tx_data};
      nb = tx_sof ? 1 : nb + 1;
      if (tx_eof) begin
        frames++;
        checks++;                                  // one check per frame
        if (nb != PAYLOAD_BYTES || payload_t'(sh) != snap) begin
          bad_frames++;
          failures++;
        end
      end
    end
  end
  // rev_tick must be the carry of the model
  int carry_bad = 0;
  always @(posedge clk) if (rst_n) begin
    logic [48:0] s;
    s = {1'b0, m_prog} + {1'b0, ftw_prog[0]};
    #1 if (rev_tick != s[48]) carry_bad++;
  end

  initial begin
    logic [79:0] acc;
    f_start[0] = 48'h0100_0000_0000; f_start[1] = 48'h0080_0000_0000;
    orbit_corr[0] = 32'sd0; orbit_corr[1] = 32'sd0;
    ctrl[0] = 8'h05; ctrl[1] = 8'h02;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // programs: beam 1 three vectors, beam 2 one vector
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < 4; k++) begin
        tbl_we <= 1; tbl_beam <= 1'(b); tbl_addr <= 12'(k);
        tbl_interval <= (k == 3 || (b == 1 && k == 1)) ? 0 : 32'(1000 * (k + 1));
        tbl_slope <= (b == 0) ? 48'sd1 <<< (30 + k) : -(48'sd1 <<< 33);
        @(posedge clk);
      end
    tbl_we <= 0;
    fgen_start <= 2'b11;
    @(posedge clk);
    fgen_start <= 2'b00;
    #1 wait (fgen_running == 2'b00);
    @(posedge clk); #1;
    // beam 1: 1000*2**30 + 2000*2**31 + 3000*2**32 (fraction 32 bits)
    acc = {f_start[0], 32'd0} + 80'(1000) * (80'd1 << 30) + 80'(2000) * (80'd1 << 31)
          + 80'(3000) * (80'd1 << 32);
    check(ftw_prog[0] == acc[79:32], $sformatf("beam 1 ramp end value %h %h", ftw_prog[0], acc[79:32]));
    acc = {f_start[1], 32'd0} - 80'(1000) * (80'd1 << 33);
    check(ftw_prog[1] == acc[79:32], "beam 2 ramp end value");
    orbit_corr[0] = -32'sd12345;
    @(posedge clk); #1;
    acc = {f_start[0], 32'd0} + 80'(1000) * (80'd1 << 30) + 80'(2000) * (80'd1 << 31)
          + 80'(3000) * (80'd1 << 32);
    check(ftw_prog[0] == acc[79:32] - 48'd12345, "orbit correction");
    check(ftw_master[0] == ftw_prog[0], "PLL off: master = program");
    // PLL of beam 2
    pll_enable <= 2'b10;
    repeat (300000) @(posedge clk); #1;
    check(pll_locked == 2'b10, "beam 2 PLL locked");
    begin
      longint d;
      d = longint'($signed(ftw_master[1] - ftw_prog[1])) - 500;
      check(d < 200 && d > -200, $sformatf("beam 2 master FTW offset %0d", d + 500));
    end
    check(frames > 100 && frames >= ticks - 1 && bad_frames == 0,
          $sformatf("frames %0d ticks %0d bad %0d", frames, ticks, bad_frames));
    check(late == 0 && carry_bad == 0 && nco_bad == 0 && !tx_overrun,
          $sformatf("late %0d carry %0d nco %0d", late, carry_bad, nco_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
