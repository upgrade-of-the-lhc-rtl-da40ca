// iq_modulator: I/Q modulation of the IF carrier by a set-point.
//
// dac = (I * cos(IF) - Q * sin(IF)) / 2**(W-1), rounded towards minus
// infinity and saturated to W bits. With cos/sin of amplitude 2**(W-1)-1 the
// output is an IF carrier of amplitude sqrt(I**2 + Q**2) and phase
// IF + atan2(Q, I): the set-point sets amplitude and phase of the RF after
// the analog mixer.
//
// Timing: two register stages (products, then sum), latency 2 cycles, one
// sample per clock. The block's place between RFNCO and DAC follows the
// document; the formula, widths and scaling are this design's own choice.
module iq_modulator #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] i_set,
  input  logic signed [W-1:0] q_set,
  input  logic signed [W-1:0] cos_if,
  input  logic signed [W-1:0] sin_if,
  output logic signed [W-1:0] dac
);

  logic signed [2*W-1:0] p_i, p_q;
  logic signed [2*W:0]   s;
  localparam logic signed [2*W:0] MAXV = (2*W+1)'(2**(W-1) - 1);
  localparam logic signed [2*W:0] MINV = -(2*W+1)'(2**(W-1));

  assign s = ((2*W+1)'(p_i) - (2*W+1)'(p_q)) >>> (W - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_i <= '0;
      p_q <= '0;
      dac <= '0;
    end else begin
      p_i <= i_set * cos_if;
      p_q <= q_set * sin_if;
      if (s > MAXV)      dac <= MAXV[W-1:0];
      else if (s < MINV) dac <= MINV[W-1:0];
      else               dac <= s[W-1:0];
    end
  end

endmodule
