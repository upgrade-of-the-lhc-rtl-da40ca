// lo_nco: digital local-oscillator phase of the WR2RF receiver.
//
// Two 48-bit accumulators run side by side. The integer one adds FTW_LO_int
// on every 125 MHz clock; the fractional one adds FTW_LO_frac only on one
// clock in DIV (a clock enable from a divide-by-DIV counter). The LO phase is
// their sum, so the effective tuning word is FTW_LO_int + FTW_LO_frac/DIV and
// the LO frequency grid is DIV times finer than the 48-bit NCO alone. Both
// accumulators and the divider restart from zero on the cyclic pulse
// fc_reset: the LO frequencies are chosen so that their phase is zero at
// every f_c tick anyway, so the restart is glitch-free in normal operation
// and fixes the LO phase to TAI after a power cycle. nco_reset clears them
// too.
//
// Timing: lo_phase is the sum of the two accumulator registers; in the
// cycle after fc_reset it reads 0,
// one cycle later FTW_LO_int, and so on. The structure (integer and
// fractional accumulators, divide-by-5, resets) follows the RFNCO block
// diagram; a zero restart value is this design's own choice.
module lo_nco
  import llrf_pkg::*;
#(
  parameter int unsigned DIV = 5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   fc_reset,
  input  logic   nco_reset,
  input  ftw_t   ftw_lo_int,
  input  ftw_t   ftw_lo_frac,
  output phase_t lo_phase
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] div_cnt;
  logic          frac_ce;
  phase_t        acc_int, acc_frac;

  assign frac_ce = (div_cnt == CW'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt  <= '0;
      acc_int  <= '0;
      acc_frac <= '0;
    end else if (fc_reset || nco_reset) begin
      div_cnt  <= '0;
      acc_int  <= '0;
      acc_frac <= '0;
    end else begin
      div_cnt <= frac_ce ? '0 : div_cnt + 1'b1;
      acc_int <= acc_int + ftw_lo_int;
      if (frac_ce) acc_frac <= acc_frac + ftw_lo_frac;
    end
  end

  assign lo_phase = acc_int + acc_frac;

endmodule
