// bunch_divider: bunch clock from the reconstructed RF, phase-locked to the
// revolution pulse.
//
// Runs on the RF output clock (rf_clk). A modulo-DIV counter divides it down
// to the bunch clock (high for the first DIV/2 counts). Dividing alone leaves
// the bunch clock in one of DIV possible phases; the high-resolution
// revolution pulse (sync_in, from the fine delay line) fixes it: the pulse is
// brought into the rf_clk domain by two flip-flops, and its rising edge sets
// the counter to SYNC_LOAD. Because the pulse is placed with a resolution far
// finer than one RF period, the RF edge that samples it is the same after
// every restart, and so is the bunch-clock phase. If the counter was already
// where the pulse puts it, nothing changes (aligned stays high); otherwise
// the counter jumps once and `realign` pulses.
//
// Timing: bunch_clk is registered; after a sync edge it starts a new period
// three rf_clk cycles later (two synchroniser stages, one edge detect).
// The divider and its re-alignment by the pulse follow the document; the
// ratio DIV = 10 (25 ns bunch spacing at 400 MHz RF), the synchroniser and
// the status outputs are this design's own choice.
module bunch_divider #(
  parameter int unsigned DIV       = 10,
  parameter int unsigned SYNC_LOAD = 0
) (
  input  logic rf_clk,
  input  logic rst_n,
  input  logic sync_in,
  output logic bunch_clk,
  output logic aligned,
  output logic realign
);

  localparam int unsigned CW = $clog2(DIV);

  logic [CW-1:0] cnt, cnt_inc;
  logic [2:0]    sync_sr;
  logic          sync_edge;

  assign cnt_inc   = (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
  assign sync_edge = sync_sr[1] && !sync_sr[2];

  always_ff @(posedge rf_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      sync_sr   <= '0;
      bunch_clk <= 1'b0;
      aligned   <= 1'b0;
      realign   <= 1'b0;
    end else begin
      sync_sr   <= {sync_sr[1:0], sync_in};
      realign   <= 1'b0;
      if (sync_edge) begin
        cnt     <= CW'(SYNC_LOAD);
        aligned <= (cnt_inc == CW'(SYNC_LOAD));
        realign <= (cnt_inc != CW'(SYNC_LOAD));
      end else begin
        cnt <= cnt_inc;
      end
      bunch_clk <= (cnt < CW'(DIV / 2));
    end
  end

endmodule
