// tb_tai_to_fc: checks the TAI-derived f_c pulse.
// A TAI model counts 125 MHz cycles from a random start just before a
// second boundary (seconds plus cycles within the second). Once `locked`,
// fc_reset must be high exactly in the cycles whose TAI time is a multiple
// of fc_val; lock must come within 74 clocks of tai_valid or of a change of
// fc_val. Several periods are tried, including f_c = 232.8 mHz (2**29
// cycles) where only the lock and the first pulse position are checked
// through the remainder the counter is loaded with.
module tb_tai_to_fc;
  logic clk = 0, rst_n = 0, tai_valid = 0;
  logic [39:0] tai_sec;
  logic [27:0] tai_cyc;
  logic [31:0] fc_val = 32'd1000;
  logic fc_reset, locked;
  int checks = 0, failures = 0;
  longint unsigned tick;
  longint pulses = 0;

  always #4 clk = ~clk;
  tai_to_fc dut (.*);

  assign tai_sec = 40'(tick / 125_000_000);
  assign tai_cyc = 28'(tick % 125_000_000);
  always @(posedge clk) tick <= tick + 1;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_period(int unsigned p, int ncyc);
    int t;
    fc_val <= p;
    @(posedge clk); #1;
    t = 0;
    while (!locked && t < 200) begin @(posedge clk); #1; t++; end
    check(locked && t <= 74, $sformatf("lock after %0d clocks for period %0d", t, p));
    for (int k = 0; k < ncyc; k++) begin
      check(fc_reset == (tick % p == 0), $sformatf("pulse at tick %0d period %0d", tick, p));
      if (fc_reset) pulses++;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    tick = 64'd1_700_000_000 * 125_000_000 + 124_999_000 + 64'($urandom_range(0, 999));
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    tai_valid <= 1;
    run_period(1000, 5000);
    run_period(137, 3000);
    run_period(4096, 10000);
    run_period(32'd536_870_912, 100);
    check(dut.cnt == 32'(tick % 536_870_912), "counter tracks TAI mod 2**29");
    check(pulses >= 5 + 21 + 2, $sformatf("pulses seen %0d", pulses));
    // TAI lost: pulse stops
    tai_valid <= 0;
    repeat (2) @(posedge clk); #1;
    check(!locked && !fc_reset, "no pulse without TAI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
