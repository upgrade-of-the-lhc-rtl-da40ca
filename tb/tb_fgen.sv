// tb_fgen: checks the function generator against a cycle model.
// Program 1: 40 random vectors (intervals 2..60, signed slopes) then an end
// marker; program 2: all 4096 table entries with interval 2. For every
// clock after `start` the output must equal the model: f_start, then plus
// the current vector's slope per clock (with 32 fraction bits), plus the
// orbit correction. `running` must drop exactly 2 + sum(intervals) clocks
// after start, and the output must then stay put.
module tb_fgen;
  import llrf_pkg::*;
  localparam int DEPTH = 4096;

  logic clk = 0, rst_n = 0;
  logic tbl_we = 0;
  logic [11:0] tbl_addr = '0;
  logic [31:0] tbl_interval = '0;
  logic signed [47:0] tbl_slope = '0;
  logic start = 0, stop = 0;
  ftw_t f_start = '0;
  logic signed [31:0] orbit_corr = '0;
  ftw_t ftw;
  logic running;
  logic [11:0] vec_idx;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  fgen dut (.*);

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

  int unsigned iv [DEPTH];
  longint      sl [DEPTH];

  task automatic write_tbl(int n, bit full);
    for (int k = 0; k < DEPTH; k++) begin
      if (k < n) begin
        iv[k] = full ? 2 : $urandom_range(2, 60);
        sl[k] = longint'({$urandom, $urandom}) >>> 18;       // about +-2**45
      end else begin
        iv[k] = 0; sl[k] = 0;
      end
      if (k <= n || full) begin
        tbl_we <= 1; tbl_addr <= 12'(k); tbl_interval <= iv[k]; tbl_slope <= 48'(sl[k]);
        @(posedge clk);
      end
    end
    tbl_we <= 0;
  endtask

  task automatic run(int n);
    logic [79:0] acc;
    ftw_t expd;
    int total, t;
    f_start    <= {$urandom, 16'($urandom)};
    orbit_corr <= $urandom;
    @(posedge clk);
    acc = {f_start, 32'd0};
    total = 0;
    for (int k = 0; k < n; k++) total += iv[k];
    start <= 1; @(posedge clk); start <= 0;          // start sampled here (t = 0)
    t = 0;
    // t counts clocks after the start edge
    for (int k = 0; k < n; k++)
      for (int j = 0; j < int'(iv[k]); j++) begin
        if (t == 0) begin @(posedge clk); @(posedge clk); t = 2; end
        @(posedge clk); #1; t++;
        acc = acc + 80'(sl[k]);
        expd = acc[79:32] + ftw_t'(orbit_corr);
        if (k < 3 || k == n - 1 || j == 0)
          check(ftw == expd, $sformatf("vector %0d step %0d: %h expected %h", k, j, ftw, expd));
        if (t == total + 2) check(!running, "running drops at 2 + sum(intervals)");
        else check(running, "running during program");
      end
    repeat (5) @(posedge clk);
    #1 check(ftw == expd && !running, "output holds after the end");
    orbit_corr <= -32'sd1000;
    @(posedge clk); #1;
    check(ftw == acc[79:32] - 48'd1000, "orbit correction applied after the end");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    write_tbl(40, 0);
    run(40);
    write_tbl(DEPTH, 1);
    run(DEPTH);
    check(vec_idx == 12'(DEPTH - 1), "all 4096 vectors played");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
