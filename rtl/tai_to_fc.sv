// tai_to_fc: cyclic synchronisation pulse f_c derived from TAI.
//
// fc_reset is high during every 125 MHz clock cycle whose TAI time, counted
// in clock cycles since the TAI epoch, is a multiple of fc_val. Because all
// receivers share TAI through White Rabbit, they all see the pulse in the
// same cycle, whenever they were started; LO frequencies whose phase repeats
// every fc_val cycles can therefore be restarted on it without a phase step.
//
// How: when TAI becomes valid, or fc_val changes, the current TAI time
// T = tai_sec * CLK_PER_SEC + tai_cyc is captured and (T + DW + 1) mod fc_val
// is computed by a bit-serial restoring divider in DW = 72 cycles. The result
// is the TAI phase of the cycle in which the divider finishes, so a
// free-running modulo-fc_val counter loaded with it tracks T mod fc_val from
// then on; `locked` shows that the counter is running.
//
// Timing: first pulse at the earliest DW + 1 cycles after the (re)start.
// Deriving f_c from TAI follows the document; the TAI input format (seconds
// plus cycles within the second, as a WR core provides it) and the divider
// are this design's own choice. fc_val = 0 stops the pulse.
module tai_to_fc #(
  parameter longint unsigned CLK_PER_SEC = 125_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tai_valid,
  input  logic [39:0] tai_sec,
  input  logic [27:0] tai_cyc,
  input  logic [31:0] fc_val,
  output logic        fc_reset,
  output logic        locked
);

  localparam int unsigned DW = 72;
  typedef enum logic [1:0] {S_IDLE, S_DIV, S_RUN} state_t;

  state_t        state;
  logic [DW-1:0] dividend;
  logic [32:0]   rem;
  logic [6:0]    bit_cnt;
  logic [31:0]   period, cnt;
  logic          tai_valid_d;

  logic [DW-1:0] t_now;
  assign t_now = DW'(tai_sec) * DW'(CLK_PER_SEC) + DW'(tai_cyc);

  logic restart;
  assign restart = (tai_valid && !tai_valid_d) ||
                   (tai_valid && fc_val != period);

  // one restoring division step
  logic [32:0] rem_shift, rem_step;
  assign rem_shift = {rem[31:0], dividend[DW-1]};
  assign rem_step  = (rem_shift >= {1'b0, period}) ? rem_shift - {1'b0, period} : rem_shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      dividend    <= '0;
      rem         <= '0;
      bit_cnt     <= '0;
      period      <= '0;
      cnt         <= '0;
      tai_valid_d <= 1'b0;
    end else begin
      tai_valid_d <= tai_valid;
      if (!tai_valid) begin
        state <= S_IDLE;
      end else if (restart) begin
        period   <= fc_val;
        dividend <= t_now + DW'(DW + 1);
        rem      <= '0;
        bit_cnt  <= '0;
        state    <= (fc_val == '0) ? S_IDLE : S_DIV;
      end else begin
        case (state)
          S_DIV: begin
            rem      <= rem_step;
            dividend <= {dividend[DW-2:0], 1'b0};
            bit_cnt  <= bit_cnt + 1'b1;
            if (bit_cnt == 7'(DW - 1)) begin
              cnt   <= rem_step[31:0];
              state <= S_RUN;
            end
          end
          S_RUN: cnt <= (cnt == period - 1) ? '0 : cnt + 1'b1;
          default: ;
        endcase
      end
    end
  end

  assign locked   = (state == S_RUN);
  assign fc_reset = locked && (cnt == '0);

endmodule
