// dpll: digital PLL locking the master NCO to the sampled VCXO.
//
// The master oscillator (VCXO) of one beam is sampled at 125 MS/s (adc).
// A harmonic-1 NCO, the master NCO, runs with ftw_master = ftw_prog + corr;
// its phase times H_RF, turned into sin() by a CORDIC, is multiplied with the
// ADC sample delayed by the same number of cycles (ALIGN = CORDIC_ITER + 3).
// For a VCXO sample A*cos(phi) this product averages to A/2*sin(theta - phi),
// a phase detector. It is summed over 2**AVG_LOG2 samples, which also removes
// the sum-frequency term, and drives a proportional-integral filter whose
// output is the frequency correction corr:
//     integ <= integ - (pd >>> KI_SH);  corr <= integ - (pd >>> KP_SH).
// ftw_master and phase_master thus describe the VCXO as seen by the digital
// system: the program frequency plus the beam-loop corrections that the
// analog synchro loop applied to the VCXO. `locked` is high after LOCK_N
// consecutive updates with |pd >>> KP_SH| below LOCK_TH.
//
// Timing: corr is updated once every 2**AVG_LOG2 clocks; phase_master is the
// master NCO accumulator, ftw_master takes effect on the next clock. The
// document says only that a digital PLL locked to the VCXO through a 125 MS/s
// ADC rebuilds the master FTW; the mixer phase detector, the averaging, the
// PI filter and all gains are this design's own choice.
module dpll
  import llrf_pkg::*;
#(
  parameter int unsigned ADC_W       = 16,
  parameter int unsigned CORDIC_ITER = 16,
  parameter int unsigned AVG_LOG2    = 10,
  parameter int unsigned KP_SH       = 21,
  parameter int unsigned KI_SH       = 26,
  parameter int unsigned LOCK_TH     = 1024,
  parameter int unsigned LOCK_N      = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic signed [ADC_W-1:0] adc,
  input  ftw_t                    ftw_prog,
  input  logic [15:0]             h_rf,
  output ftw_t                    ftw_master,
  output phase_t                  phase_master,
  output logic signed [FTW_W-1:0] corr,
  output logic                    locked
);

  localparam int unsigned ALIGN = CORDIC_ITER + 3;
  localparam int unsigned PW    = ADC_W + 16;         // product width
  localparam int unsigned SW    = PW + AVG_LOG2;      // sum width

  phase_t acc, rf_ph;
  logic signed [15:0] nco_cos, nco_sin;
  logic               nco_vld;
  logic signed [ADC_W-1:0] adc_dly [ALIGN];
  logic signed [PW-1:0]    prod;
  logic signed [SW-1:0]    psum, pd;
  logic [AVG_LOG2-1:0]     n;
  logic                    pd_valid;
  logic signed [FTW_W-1:0] integ;
  logic [$clog2(LOCK_N+1)-1:0] good;

  assign ftw_master   = ftw_prog + ftw_t'(corr);
  assign phase_master = acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      rf_ph <= '0;
    end else begin
      acc   <= acc + ftw_master;
      rf_ph <= phase_t'(acc * h_rf);
    end
  end

  cordic #(.PHASE_W(18), .OUT_W(16), .ITER(CORDIC_ITER)) u_cordic (
    .clk, .rst_n,
    .in_valid  (1'b1),
    .phase     (rf_ph[FTW_W-1 -: 18]),
    .out_valid (nco_vld),
    .cos_o     (nco_cos),
    .sin_o     (nco_sin)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ALIGN; i++) adc_dly[i] <= '0;
      prod     <= '0;
      psum     <= '0;
      pd       <= '0;
      n        <= '0;
      pd_valid <= 1'b0;
    end else begin
      adc_dly[0] <= adc;
      for (int i = 1; i < ALIGN; i++) adc_dly[i] <= adc_dly[i-1];
      prod     <= adc_dly[ALIGN-1] * nco_sin;
      pd_valid <= 1'b0;
      if (nco_vld) begin
        n <= n + 1'b1;
        if (n == '1) begin
          pd       <= psum + SW'(prod);
          psum     <= '0;
          pd_valid <= 1'b1;
        end else begin
          psum <= psum + SW'(prod);
        end
      end
    end
  end

  logic signed [SW-1:0] p_term, i_term;
  localparam logic signed [SW-1:0] LTH = SW'(LOCK_TH);
  assign p_term = pd >>> KP_SH;
  assign i_term = pd >>> KI_SH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ  <= '0;
      corr   <= '0;
      good   <= '0;
      locked <= 1'b0;
    end else if (!enable) begin
      integ  <= '0;
      corr   <= '0;
      good   <= '0;
      locked <= 1'b0;
    end else if (pd_valid) begin
      integ <= integ - FTW_W'(i_term);
      corr  <= integ - FTW_W'(i_term) - FTW_W'(p_term);
      if (p_term < LTH && p_term > -LTH) begin
        if (good != LOCK_N[$bits(good)-1:0]) good <= good + 1'b1;
        else locked <= 1'b1;
      end else begin
        good   <= '0;
        locked <= 1'b0;
      end
    end
  end

endmodule
