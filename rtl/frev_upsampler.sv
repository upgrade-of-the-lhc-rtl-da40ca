// frev_upsampler: high-resolution revolution pulse from the NCO phase.
//
// The H1 accumulator wraps once per revolution, but its carry (frev) only
// says in which 8 ns clock cycle the wrap happened. The accumulator value
// tells more: if the phase was p0 one cycle before the wrap and the step is
// d = phase_h1 - p0 (mod 2**48), the wrap happened a fraction
// f = (2**48 - p0) / d = (d - phase_h1) / d of a clock period after the
// sample p0. This block computes f with a bit-serial divider (Q bits), turns
// it into a number of fine-delay taps, tap = floor(f * CLK_PERIOD_PS /
// TAP_PS), and emits a one-cycle pulse frev_fine together with that tap
// count. An output delay line (outside this block, e.g. an FPGA output delay
// with 78.125 ps taps) delays the pulse by `tap` steps; the delayed pulse then
// sits a fixed number of cycles after the true phase crossing, to within one
// tap. It re-aligns the bunch-clock divider and serves as revolution clock.
//
// Timing: frev_fine is high Q + 2 cycles after the sample p0 (Q + 1 cycles
// after frev), so the fixed latency is LATENCY = Q + 2 clock periods.
// The ~78 ps resolution and the use of NCO phase information follow the
// document; the interpolation method, the fixed-point constant
// K = round(2**S * CLK_PERIOD_PS / TAP_PS) with S = 10, and the external
// delay line are this design's own choice.
module frev_upsampler
  import llrf_pkg::*;
#(
  parameter int unsigned Q             = 16,      // bits of the fraction
  parameter int unsigned CLK_PERIOD_PS = 8000,    // 125 MHz
  parameter int unsigned TAP_PS_X8     = 625,     // tap of 78.125 ps, times 8
  parameter int unsigned TAP_W         = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frev,
  input  phase_t           phase_h1,
  output logic             frev_fine,
  output logic [TAP_W-1:0] tap
);

  localparam int unsigned S = 10;
  localparam longint unsigned K =
      ((longint'(CLK_PERIOD_PS) * 8 * (longint'(1) << S)) + longint'(TAP_PS_X8) / 2) / longint'(TAP_PS_X8);
  localparam int unsigned KW = $clog2(K + 1);
  localparam int unsigned CW = $clog2(Q + 1);

  phase_t         p_prev;
  logic           busy;
  logic [CW-1:0]  it;
  logic [FTW_W:0] rem;       // one bit more than the divisor
  phase_t         divisor;
  logic [Q-1:0]   quo;

  logic [FTW_W:0] rem_sh;
  logic           ge;
  assign rem_sh = {rem[FTW_W-1:0], 1'b0};
  assign ge     = rem_sh >= {1'b0, divisor};

  logic [Q-1:0]    quo_next;
  logic [Q+KW-1:0] tap_full;
  assign quo_next = {quo[Q-2:0], ge};
  assign tap_full = (Q+KW)'(quo_next) * (Q+KW)'(K);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_prev    <= '0;
      busy      <= 1'b0;
      it        <= '0;
      rem       <= '0;
      divisor   <= '0;
      quo       <= '0;
      frev_fine <= 1'b0;
      tap       <= '0;
    end else begin
      p_prev    <= phase_h1;
      frev_fine <= 1'b0;
      if (!busy) begin
        if (frev) begin
          divisor <= phase_h1 - p_prev;                         // d
          rem     <= {1'b0, phase_t'(phase_h1 - p_prev - phase_h1)};  // d - r
          it      <= '0;
          busy    <= 1'b1;
        end
      end else begin
        rem <= ge ? rem_sh - {1'b0, divisor} : rem_sh;
        quo <= quo_next;
        it  <= it + 1'b1;
        if (it == CW'(Q - 1)) begin
          busy      <= 1'b0;
          frev_fine <= 1'b1;
          tap       <= TAP_W'(tap_full >> (Q + S));
        end
      end
    end
  end

endmodule
