// rfnco: RF numerically controlled oscillator of a WR2RF receiver.
//
// The core is the harmonic-1 (H1) accumulator: a 48-bit phase that advances
// every 125 MHz clock by the revolution-frequency tuning word latched from
// the last frame (FTW latch, loaded by `load`), plus the small correction
// of the re-sync block. Its carry out marks a turn of the revolution phase
// (wrap detect, output frev); the RF phase is this phase times the harmonic
// number H_RF. The IF phase is the local-oscillator phase (lo_nco) minus
// the RF phase, and the CORDIC turns it into cos/sin(IF) for the modulator;
// mixing with the analog LO later gives back the RF.
//
// Phase recovery: at every `load` the H1 phase is latched and the
// transmitted reference phase is compared with it. The reference is first
// advanced by FTW_master * delay_cyc (delay compensation: known transmission
// delay and beam time-of-flight to this receiver, in clock cycles with 8
// fractional bits), so that the comparison holds during frequency ramps. The
// difference is phase_error; if the frame's NCO_resync flag is set, nco_resync
// removes it with a phase ramp. nco_reset clears the H1 and LO accumulators
// (the H1 phase reads 0 in the clock after the load; the comparison of that
// frame uses this reset phase), and fc_reset, the TAI-derived f_c pulse,
// restarts the LO accumulators.
//
// Timing: a FTW presented with `load` is used from the next clock on;
// phase_error and phase_error_valid follow `load` by two clocks; frev is high
// in the cycle in which phase_h1 shows the wrapped value; cos_if/sin_if lag
// phase_h1 by CORDIC_ITER + 4 cycles. The block structure follows the RFNCO
// block diagram; the extra pipeline register on the compensated reference,
// the delay format and the IF word width are this design's own choice.
module rfnco
  import llrf_pkg::*;
#(
  parameter int unsigned LO_DIV      = 5,
  parameter int unsigned IF_PHASE_W  = 18,
  parameter int unsigned IQ_W        = 16,
  parameter int unsigned CORDIC_ITER = 16,
  parameter logic [FTW_W-1:0] RESYNC_MAX_STEP = 48'd16777216
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // from the frame
  input  logic                    load,
  input  ftw_t                    ftw_master,
  input  phase_t                  phase_master,
  input  logic                    nco_resync,
  input  logic                    nco_reset,
  // configuration
  input  ftw_t                    ftw_lo_int,
  input  ftw_t                    ftw_lo_frac,
  input  logic [15:0]             h_rf,
  input  logic signed [31:0]      delay_cyc,    // Q24.8 clock cycles
  // cyclic TAI pulse
  input  logic                    fc_reset,
  // outputs
  output logic signed [FTW_W-1:0] phase_error,
  output logic                    phase_error_valid,
  output logic                    resync_busy,
  output logic                    frev,
  output phase_t                  phase_h1,
  output logic signed [IQ_W-1:0]  cos_if,
  output logic signed [IQ_W-1:0]  sin_if,
  output logic                    if_valid
);

  ftw_t   ftw_lat;
  phase_t acc;
  phase_t ph_lat, ref_lat;
  logic   resync_lat, cmp_pending;
  logic signed [FTW_W-1:0] freq_delta;

  // ---------------------------------------------------------------- H1 NCO
  logic [FTW_W:0] acc_sum;
  assign acc_sum = {1'b0, acc} + {1'b0, ftw_t'(ftw_lat + ftw_t'(freq_delta))};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ftw_lat    <= '0;
      acc        <= '0;
      frev       <= 1'b0;
      resync_lat <= 1'b0;
    end else begin
      if (load) begin
        ftw_lat    <= ftw_master;
        resync_lat <= nco_resync;
      end
      if (nco_reset) begin
        acc  <= '0;
        frev <= 1'b0;
      end else begin
        acc  <= acc_sum[FTW_W-1:0];
        frev <= acc_sum[FTW_W];          // wrap detect
      end
    end
  end
  assign phase_h1 = acc;

  // ------------------------------------------- delay compensation, compare
  logic signed [FTW_W+32:0] comp_prod;
  assign comp_prod = $signed({1'b0, ftw_master}) * delay_cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_lat            <= '0;
      ref_lat           <= '0;
      cmp_pending       <= 1'b0;
      phase_error       <= '0;
      phase_error_valid <= 1'b0;
    end else begin
      cmp_pending       <= load;
      phase_error_valid <= cmp_pending;
      if (load) begin
        // after a reset the accumulator reads 0 one clock after load, so
        // its phase in the load cycle counts as minus the new FTW
        ph_lat  <= nco_reset ? phase_t'(-ftw_master) : acc;
        ref_lat <= phase_master + comp_prod[FTW_W+7:8];
      end
      if (cmp_pending) phase_error <= $signed(ref_lat - ph_lat);
    end
  end

  nco_resync #(.MAX_STEP(RESYNC_MAX_STEP)) u_resync (
    .clk, .rst_n,
    .clear      (nco_reset),
    .err_valid  (phase_error_valid),
    .resync_en  (resync_lat),
    .phase_err  (phase_error),
    .freq_delta (freq_delta),
    .busy       (resync_busy)
  );

  // ------------------------------------------------------------ LO and IF
  phase_t lo_phase, lo_d, rf_ph, if_ph;

  lo_nco #(.DIV(LO_DIV)) u_lo (
    .clk, .rst_n,
    .fc_reset, .nco_reset,
    .ftw_lo_int, .ftw_lo_frac,
    .lo_phase
  );

  logic valid_d1, valid_d2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_d <= '0; rf_ph <= '0; if_ph <= '0;
      valid_d1 <= 1'b0; valid_d2 <= 1'b0;
    end else begin
      lo_d     <= lo_phase;
      rf_ph    <= phase_t'(acc * h_rf);        // RF phase = H_RF x H1 phase
      if_ph    <= lo_d - rf_ph;
      valid_d1 <= 1'b1;
      valid_d2 <= valid_d1;
    end
  end

  cordic #(.PHASE_W(IF_PHASE_W), .OUT_W(IQ_W), .ITER(CORDIC_ITER)) u_cordic (
    .clk, .rst_n,
    .in_valid  (valid_d2),
    .phase     (if_ph[FTW_W-1 -: IF_PHASE_W]),
    .out_valid (if_valid),
    .cos_o     (cos_if),
    .sin_o     (sin_if)
  );

endmodule
