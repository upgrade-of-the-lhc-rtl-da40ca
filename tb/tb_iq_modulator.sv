// tb_iq_modulator: checks dac = sat((I*cos - Q*sin) >>> 15) with latency 2,
// on random samples and on full-scale corners that must saturate.
module tb_iq_modulator;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] i_set = 0, q_set = 0, cos_if = 0, sin_if = 0, dac;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  iq_modulator dut (.*);

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

  longint expq[$];

  function automatic longint model(longint i, longint q, longint c, longint s);
    longint v;
    v = i * c - q * s;
    v = (v >= 0) ? v / 32768 : -((-v + 32767) / 32768);   // floor
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000 + 2; n++) begin
      logic signed [15:0] a, b, c, d;
      if (n < 4) begin
        a = -32768; b = 32767; c = (n[0]) ? 16'sd32767 : -16'sd32768; d = (n[1]) ? 16'sd32767 : -16'sd32768;
      end else begin
        a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); d = 16'($urandom);
      end
      i_set <= a; q_set <= b; cos_if <= c; sin_if <= d;
      expq.push_back(model(a, b, c, d));
      @(posedge clk); #1;
      if (n >= 1 && n - 1 < 2000) check(longint'(dac) == expq[n - 1],
                     $sformatf("sample %0d dac %0d expected %0d", n - 1, dac, expq[n - 1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
