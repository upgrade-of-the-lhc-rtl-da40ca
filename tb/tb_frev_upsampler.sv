// tb_frev_upsampler: checks the fine revolution pulse.
// An accumulator model with random tuning words drives phase_h1 and frev.
// For every wrap the expected position of the crossing inside the clock
// period, f = (2**48 - p_before) / step, is computed in real arithmetic;
// the tap count must be floor(f * 8000 / 78.125) within one tap, and
// frev_fine must come exactly Q + 1 = 17 clocks after frev.
module tb_frev_upsampler;
  import llrf_pkg::*;
  logic clk = 0, rst_n = 0, frev = 0;
  phase_t phase_h1 = '0;
  logic frev_fine;
  logic [6:0] tap;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  frev_upsampler dut (.*);

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

  ftw_t ftw;
  int wraps = 0, fines = 0, cyc = 0, last_wrap = 0;
  real exp_tap;
  logic [FTW_W:0] s;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 200; n++) begin
      ftw = {16'($urandom_range(16, 2047)), $urandom};   // 2**36 .. 2**43
      // run until one wrap has been followed by its fine pulse
      do begin
        s = {1'b0, phase_h1} + {1'b0, ftw};
        if (s[FTW_W]) begin
          exp_tap = (281474976710656.0 - real'(phase_h1)) / real'(ftw) * 102.4;
          last_wrap = cyc;
          wraps++;
        end
        phase_h1 <= s[FTW_W-1:0];
        frev     <= s[FTW_W];
        @(posedge clk); #1;
        cyc++;
        if (frev_fine) begin
          fines++;
          check(cyc - last_wrap == 17, $sformatf("fine pulse %0d clocks after frev", cyc - last_wrap));
          check(real'(tap) >= exp_tap - 1.0 && real'(tap) <= exp_tap + 1.0,
                $sformatf("tap %0d expected %f", tap, exp_tap));
        end
      end while (!(frev_fine && fines == wraps) && cyc - last_wrap < 300000);
    end
    check(wraps == fines && wraps >= 200, $sformatf("wraps %0d fine pulses %0d", wraps, fines));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
