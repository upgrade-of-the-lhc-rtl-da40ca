// tb_lo_nco: checks the integer + fractional LO accumulator.
// After an fc_reset the phase k clocks later must be
// k*FTW_LO_int + floor(k/5)*FTW_LO_frac (mod 2**48); checked every clock for
// several random tuning words, with fc_reset and nco_reset applied at random
// points (both must restart the count from zero).
module tb_lo_nco;
  import llrf_pkg::*;

  logic clk = 0, rst_n = 0, fc_reset = 0, nco_reset = 0;
  ftw_t ftw_lo_int = '0, ftw_lo_frac = '0;
  phase_t lo_phase;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  lo_nco dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase_t expct;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 12; n++) begin
      ftw_lo_int  <= {$urandom, $urandom} ;
      ftw_lo_frac <= {$urandom, $urandom};
      if (n % 2) fc_reset <= 1; else nco_reset <= 1;
      @(posedge clk);
      fc_reset <= 0; nco_reset <= 0;
      for (int k = 0; k < 200; k++) begin
        #1;
        expct = phase_t'(ftw_lo_int * 48'(k) + ftw_lo_frac * 48'(k / 5));
        check(lo_phase == expct, $sformatf("k=%0d phase %h expected %h", k, lo_phase, expct));
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
