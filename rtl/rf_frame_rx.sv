// rf_frame_rx: RF frame payload decoder of the WR2RF receiver.
//
// The White-Rabbit core delivers the RF-over-Ethernet payload as a byte
// stream (rx_valid/rx_data, rx_sof on the first byte, rx_eof on the last).
// Bytes are shifted into a 400-bit register; when the 50th byte arrives and
// carries rx_eof, the whole payload is copied to `payload` and `load` pulses
// for one cycle in the following clock. `load` is the strobe that applies the
// new FTWs and starts the phase comparison in the RFNCO; since the WR core
// delivers frames with a fixed latency, all receivers see `load` in the same
// 8 ns cycle. A frame that ends early or runs long is dropped and flagged on
// `frame_err`; the previous payload stays in force.
//
// Timing: load and payload are valid one cycle after the last byte.
// The 50-byte payload size follows the frame description; the stream
// interface and the error handling are this design's own choice.
module rf_frame_rx
  import llrf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_valid,
  input  logic       rx_sof,
  input  logic       rx_eof,
  input  logic [7:0] rx_data,
  output payload_t   payload,
  output logic       load,
  output logic       frame_err
);

  logic [PAYLOAD_BITS-1:0] shreg;
  logic [5:0]              cnt;       // bytes received in this frame
  logic                    active;

  logic [5:0] cnt_next;
  assign cnt_next = rx_sof ? 6'd1 : cnt + 6'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      cnt       <= '0;
      active    <= 1'b0;
      payload   <= '0;
      load      <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      load      <= 1'b0;
      frame_err <= 1'b0;
      if (rx_valid && (rx_sof || active)) begin
        shreg <= {shreg[PAYLOAD_BITS-9:0], rx_data};
        cnt   <= cnt_next;
        if (rx_eof) begin
          active <= 1'b0;
          if (cnt_next == 6'(PAYLOAD_BYTES)) begin
            payload <= payload_t'({shreg[PAYLOAD_BITS-9:0], rx_data});
            load    <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
        end else if (cnt_next == 6'(PAYLOAD_BYTES)) begin
          // 50 bytes without end of frame: too long, drop it
          active    <= 1'b0;
          frame_err <= 1'b1;
        end else begin
          active <= 1'b1;
        end
      end
    end
  end

endmodule
