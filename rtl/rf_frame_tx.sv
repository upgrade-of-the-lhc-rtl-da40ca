// rf_frame_tx: RF frame payload serialiser of the Beam-Control.
//
// On `send` the 50-byte payload is captured and streamed to the WR core, one
// byte per 125 MHz clock (1 Gb/s, the line rate of the link), first byte with
// tx_sof, last with tx_eof. A `send` that arrives while a frame is still
// going out is dropped and counted on `overrun`. The Beam-Control asks for
// one frame per beam revolution.
//
// Timing: the first byte is on tx_data in the clock after `send`; the frame
// occupies PAYLOAD_BYTES consecutive clocks. Byte order as in llrf_pkg. The
// stream interface is this design's own choice.
module rf_frame_tx
  import llrf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       send,
  input  payload_t   payload,
  output logic       tx_valid,
  output logic       tx_sof,
  output logic       tx_eof,
  output logic [7:0] tx_data,
  output logic       overrun
);

  logic [PAYLOAD_BITS-1:0] shreg;
  logic [5:0]              cnt;    // bytes still to send after the current one
  logic [PAYLOAD_BITS-1:0] flat;
  assign flat = payload;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg    <= '0;
      cnt      <= '0;
      tx_valid <= 1'b0;
      tx_sof   <= 1'b0;
      tx_eof   <= 1'b0;
      tx_data  <= '0;
      overrun  <= 1'b0;
    end else begin
      overrun <= 1'b0;
      tx_sof  <= 1'b0;
      tx_eof  <= 1'b0;
      if (tx_valid && cnt != '0) begin
        tx_data <= shreg[PAYLOAD_BITS-1 -: 8];
        shreg   <= {shreg[PAYLOAD_BITS-9:0], 8'h00};
        cnt     <= cnt - 1'b1;
        tx_eof  <= (cnt == 6'd1);
        overrun <= send;
      end else if (send) begin
        tx_valid <= 1'b1;
        tx_sof   <= 1'b1;
        tx_eof   <= 1'b0;
        tx_data  <= flat[PAYLOAD_BITS-1 -: 8];
        shreg    <= {flat[PAYLOAD_BITS-9:0], 8'h00};
        cnt      <= 6'(PAYLOAD_BYTES - 1);
      end else begin
        tx_valid <= 1'b0;
      end
    end
  end

endmodule
