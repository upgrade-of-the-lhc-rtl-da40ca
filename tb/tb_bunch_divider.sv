// tb_bunch_divider: checks the bunch clock divider and its re-alignment.
// rf_clk has a period of 10 time units; sync pulses 32 units wide (an 8 ns
// pulse at 2.5 ns RF period) are placed 3 units after an rf_clk edge. After
// the first rf_clk edge that sees a pulse (edge s), bunch_clk must be high
// after edges s+3 .. s+7 and low after s+8 .. s+12, repeating every 10
// edges. A pulse that arrives a multiple of 10 RF periods after the previous
// one must find the divider aligned; one that is 3 periods off must cause
// exactly one `realign`.
module tb_bunch_divider;
  logic rf_clk = 0, rst_n = 0, sync_in = 0;
  logic bunch_clk, aligned, realign;
  int checks = 0, failures = 0, realigns = 0;

  always #5 rf_clk = ~rf_clk;
  bunch_divider dut (.*);

  always @(posedge rf_clk) if (rst_n && realign) realigns++;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge rf_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse starting 3 units after the current edge; returns after edge s
  task automatic pulse_and_check(int ncheck);
    #3 sync_in = 1;
    #32 sync_in = 0;
  endtask

  task automatic check_phase();
    // called right after edge s (the first edge that saw the pulse)
    @(posedge rf_clk); @(posedge rf_clk);           // edges s+1, s+2
    for (int k = 0; k < 30; k++) begin
      @(posedge rf_clk); #1;                         // edge s+3+k
      check(bunch_clk == ((k % 10) < 5), $sformatf("bunch_clk phase k=%0d", k));
    end
  endtask

  initial begin
    int r0;
    repeat (3) @(posedge rf_clk);
    rst_n <= 1;
    repeat ($urandom_range(3, 17)) @(posedge rf_clk);
    // first sync
    fork pulse_and_check(0); join_none
    @(posedge rf_clk);                               // edge s
    check_phase();                                   // ends at edge s+32
    // next pulse 50 RF periods after the first: already aligned
    repeat (17) @(posedge rf_clk);                   // edge s+49
    r0 = realigns;
    fork pulse_and_check(0); join_none
    @(posedge rf_clk);                               // edge s+50
    check_phase();
    check(aligned && realigns == r0, "aligned pulse leaves divider alone");
    // a pulse 3 periods off
    repeat (20) @(posedge rf_clk);
    fork pulse_and_check(0); join_none
    @(posedge rf_clk);
    check_phase();
    check(!aligned && realigns == r0 + 1, "misaligned pulse realigns once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
