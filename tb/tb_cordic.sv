// tb_cordic: checks the phase-to-cos/sin CORDIC.
// Streams one random phase per clock (plus the quadrant edges) and compares
// each output, ITER + 2 clocks later, with 32767*cos/sin computed in real
// arithmetic; allowed error 4 LSB. out_valid must rise exactly ITER + 2
// clocks after the first in_valid.
module tb_cordic;
  localparam int ITER = 16, LAT = ITER + 2;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [17:0] phase = '0;
  logic out_valid;
  logic signed [15:0] cos_o, sin_o;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  cordic #(.PHASE_W(18), .OUT_W(16), .ITER(ITER)) dut (.*);

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

  logic [17:0] hist [$];
  int cyc = 0, first_valid = -1, first_in = -1;
  int maxerr = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (in_valid && first_in < 0) first_in = cyc;
    if (out_valid && first_valid < 0) first_valid = cyc;
  end

  initial begin
    real a, ec, es;
    int n;
    logic [17:0] p;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (n = 0; n < 3000 + LAT; n++) begin
      if (n < 3000) begin
        if (n < 8) p = 18'(n * 32768);          // multiples of 1/8 turn
        else p = 18'($urandom);
        phase <= p; in_valid <= 1;
        hist.push_back(p);
      end else in_valid <= 0;
      @(posedge clk); #1;
      if (n >= LAT - 1 && n - (LAT - 1) < 3000) begin
        p = hist[n - (LAT - 1)];
        a  = 2.0 * PI * real'(p) / 262144.0;
        ec = real'(cos_o) - 32767.0 * $cos(a);
        es = real'(sin_o) - 32767.0 * $sin(a);
        check(out_valid && ec < 4.0 && ec > -4.0 && es < 4.0 && es > -4.0,
              $sformatf("phase %0d: cos %0d sin %0d", p, cos_o, sin_o));
      end
    end
    check(first_valid - first_in == LAT, $sformatf("latency %0d", first_valid - first_in));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
