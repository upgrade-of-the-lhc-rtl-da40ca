// tb_rf_frame_tx: checks the RF frame serialiser.
// For random payloads: the first byte must appear one clock after `send`,
// 50 consecutive bytes must follow in wire order with sof on the first and
// eof on the last; a `send` during a frame must be flagged as overrun and
// must not disturb the frame. Frames are also sent back to back.
module tb_rf_frame_tx;
  import llrf_pkg::*;
  logic clk = 0, rst_n = 0, send = 0;
  payload_t payload;
  logic tx_valid, tx_sof, tx_eof, overrun;
  logic [7:0] tx_data;
  int checks = 0, failures = 0, overruns = 0;

  always #4 clk = ~clk;
  rf_frame_tx dut (.*);
  always @(posedge clk) if (rst_n && overrun) overruns++;

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

  function automatic payload_t rand_payload();
    logic [PAYLOAD_BITS-1:0] f;
    for (int i = 0; i < PAYLOAD_BITS; i += 32) f[i +: 32] = $urandom;
    return payload_t'(f);
  endfunction

  task automatic frame(bit disturb, bit back_to_back, payload_t p, payload_t pnext,
                       bit do_send);
    if (do_send) begin
      payload <= p; send <= 1;
      @(posedge clk);
    end
    payload <= back_to_back ? pnext : rand_payload();
    for (int k = 0; k < PAYLOAD_BYTES; k++) begin
      send <= (disturb && k == 20) || (back_to_back && k == PAYLOAD_BYTES - 1);
      #1;
      check(tx_valid && tx_data == payload_byte(p, k) && tx_sof == (k == 0) &&
            tx_eof == (k == PAYLOAD_BYTES - 1), $sformatf("byte %0d", k));
      @(posedge clk);
    end
  endtask

  initial begin
    payload_t p1, p2;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    payload <= '0;
    @(posedge clk);
    for (int n = 0; n < 10; n++) begin
      frame(n == 3, 0, rand_payload(), '0, 1);
      send <= 0;
      #1 check(!tx_valid, "idle after frame");
      repeat ($urandom_range(1, 4)) @(posedge clk);
    end
    p1 = rand_payload(); p2 = rand_payload();
    frame(0, 1, p1, p2, 1);      // next frame requested on the last byte
    frame(0, 0, p2, '0, 0);      // ... follows without a gap
    send <= 0;
    check(overruns == 1, $sformatf("one overrun (%0d)", overruns));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
