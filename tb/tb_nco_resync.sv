// tb_nco_resync: checks the phase-ramp correction.
// For random signed errors it sums freq_delta until busy drops and checks
// that the sum equals the error, that no step exceeds MAX_STEP, and that the
// ramp lasts ceil(|E| / MAX_STEP) cycles. Also checks that nothing happens
// without resync_en, that new errors are ignored while busy, and that clear
// aborts a correction.
module tb_nco_resync;
  import llrf_pkg::*;
  localparam logic [47:0] MAXS = 48'd1000;

  logic clk = 0, rst_n = 0, clear = 0, err_valid = 0, resync_en = 0;
  logic signed [47:0] phase_err = '0, freq_delta;
  logic busy;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  nco_resync #(.MAX_STEP(MAXS)) dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e, sum, cyc, expc;
    bit stepok;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      e = longint'($urandom_range(0, 60000)) - 30000;
      if (e == 0) e = 7;
      phase_err <= 48'(e); err_valid <= 1; resync_en <= 1;
      @(posedge clk);
      err_valid <= 0;
      phase_err <= 48'(12345);
      sum = 0; cyc = 0; stepok = 1;
      // count the cycles with a step until busy drops
      do begin
        @(posedge clk); #1;
        sum += longint'(freq_delta);
        if (freq_delta > 48'sd1000 || freq_delta < -48'sd1000) stepok = 0;
        cyc++;
        // a new error while busy must be ignored
        err_valid <= (cyc == 1 && busy);
      end while (busy);
      err_valid <= 0;
      expc = ((e < 0 ? -e : e) + 999) / 1000;
      check(sum == e, $sformatf("sum of steps %0d == error %0d", sum, e));
      check(stepok, "step within MAX_STEP");
      check(cyc == expc, $sformatf("ramp length %0d == %0d", cyc, expc));
      @(posedge clk); #1;
      check(freq_delta == 0, "delta back to zero");
      repeat (2) @(posedge clk);
    end
    // disabled: no correction
    phase_err <= 48'sd5000; err_valid <= 1; resync_en <= 0;
    @(posedge clk); err_valid <= 0;
    repeat (3) @(posedge clk);
    #1;
    check(!busy && freq_delta == 0, "no correction without NCO_resync");
    // clear aborts
    phase_err <= 48'sd50000; err_valid <= 1; resync_en <= 1;
    @(posedge clk); err_valid <= 0;
    repeat (5) @(posedge clk);
    #1;
    check(busy, "busy during correction");
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk); #1;
    check(!busy && freq_delta == 0, "clear aborts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
