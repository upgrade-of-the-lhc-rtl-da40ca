// tb_rf_frame_rx: checks the RF frame decoder.
// Sends random 50-byte payloads (MSB-first byte order), checks that the
// decoded payload matches and that `load` comes exactly one clock after the
// last byte; then sends a short and a long frame and checks that both are
// flagged on frame_err and leave the previous payload in place.
module tb_rf_frame_rx;
  import llrf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_valid = 0, rx_sof = 0, rx_eof = 0;
  logic [7:0] rx_data = '0;
  payload_t payload;
  logic load, frame_err;
  int checks = 0, failures = 0;
  int loads = 0, errs = 0;

  always #4 clk = ~clk;

  rf_frame_rx dut (.*);

  always @(posedge clk) begin
    if (rst_n && load) loads++;
    if (rst_n && frame_err) errs++;
  end

  function automatic payload_t rand_payload();
    logic [PAYLOAD_BITS-1:0] f;
    for (int i = 0; i < PAYLOAD_BITS; i += 32) f[i +: 32] = $urandom;
    return payload_t'(f);
  endfunction

  task automatic send(payload_t p, int nbytes);
    for (int k = 0; k < nbytes; k++) begin
      rx_valid <= 1'b1;
      rx_sof   <= (k == 0);
      rx_eof   <= (k == nbytes - 1);
      rx_data  <= payload_byte(p, k % PAYLOAD_BYTES);
      @(posedge clk);
    end
    rx_valid <= 1'b0; rx_sof <= 1'b0; rx_eof <= 1'b0;
  endtask

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

  initial begin
    payload_t p, last;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      p = rand_payload();
      send(p, PAYLOAD_BYTES);
      // the last byte was sampled at the previous edge: load is high now
      #1;
      check(load == 1'b1, "load one clock after last byte");
      check(payload == p, "payload decoded");
      check(payload[1].phase_master == p[1].phase_master && payload[0].ftw_prog == p[0].ftw_prog,
            "field mapping");
      last = p;
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    // short frame
    p = rand_payload();
    send(p, 30);
    #1;
    check(frame_err == 1'b1 && load == 1'b0, "short frame flagged");
    check(payload == last, "short frame dropped");
    @(posedge clk);
    // long frame (no eof at byte 50)
    for (int k = 0; k < 55; k++) begin
      rx_valid <= 1'b1; rx_sof <= (k == 0); rx_eof <= (k == 54);
      rx_data <= 8'(k); @(posedge clk);
    end
    rx_valid <= 1'b0; rx_eof <= 1'b0;
    repeat (3) @(posedge clk);
    check(payload == last, "long frame dropped");
    check(loads == 20, $sformatf("twenty loads (%0d)", loads));
    check(errs == 2, $sformatf("two frame errors (%0d)", errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
