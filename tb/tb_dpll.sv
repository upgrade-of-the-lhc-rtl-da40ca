// tb_dpll: checks the digital PLL that rebuilds the master FTW.
// A VCXO model runs its own 48-bit harmonic-1 accumulator with a tuning word
// offset from ftw_prog and produces 125 MS/s samples
// 20000*cos(2*pi*H_RF*phase/2**48) (H_RF = 35640). After enable the loop
// must lock: corr must settle to the VCXO offset (within 2 LSB on
// average), the RF phase of the master NCO must match the VCXO within
// 1/100 turn, and `locked` must be high. Positive and negative offsets are
// tried, and disabling the loop must clear the correction.
module tb_dpll;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, enable = 0;
  logic signed [15:0] adc = '0;
  ftw_t ftw_prog = 48'd25322000000;     // about 11.245 kHz at 125 MHz
  logic [15:0] h_rf = 16'd35640;
  ftw_t ftw_master;
  phase_t phase_master;
  logic signed [47:0] corr;
  logic locked;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  dpll dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  phase_t vcxo = 48'h1234_5678_9abc;
  longint offset;
  always @(posedge clk) begin
    phase_t rf;
    vcxo <= vcxo + ftw_prog + 48'(offset);
    rf = phase_t'(vcxo * h_rf);
    adc <= 16'($rtoi(20000.0 * $cos(2.0 * PI * real'(rf) / 281474976710656.0)));
  end

  task automatic try(longint off);
    real csum, dph;
    phase_t d;
    offset = off;
    enable <= 1;
    repeat (250000) @(posedge clk);
    csum = 0;
    for (int k = 0; k < 65536; k++) begin
      @(posedge clk); #1;
      csum += real'(corr);
    end
    csum = csum / 65536.0;
    check(csum > real'(off) - 2.0 && csum < real'(off) + 2.0,
          $sformatf("corr %f expected %0d", csum, off));
    // adc lags vcxo by one clock; the NCO phase is compared with it
    d = phase_t'(phase_master * h_rf) - phase_t'((vcxo - ftw_prog - 48'(offset)) * h_rf);
    dph = real'($signed(d)) / 281474976710656.0;
    check(dph < 0.01 && dph > -0.01, $sformatf("RF phase difference %f turn", dph));
    check(locked, "locked");
    check(ftw_master == ftw_prog + 48'(corr), "ftw_master = ftw_prog + corr");
    enable <= 0;
    repeat (2) @(posedge clk); #1;
    check(corr == 0 && !locked, "disable clears correction");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    try(300);
    try(-1200);
    try(50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
