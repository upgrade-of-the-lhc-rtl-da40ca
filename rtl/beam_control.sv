// beam_control: RF-frame source of the LHC Beam-Control (AFCZ firmware part).
//
// For each of the two beams:
//   fgen      plays the frequency program (table of interval/slope vectors)
//             plus the orbit-feedback correction: ftw_prog;
//   program NCO  accumulates ftw_prog: phase_prog, the reference program
//             phase;
//   dpll      locks the master NCO to the beam's VCXO sampled by the
//             125 MS/s ADC: ftw_master = ftw_prog + correction, phase_master.
// Once per revolution (the wrap of the beam-1 program NCO, `rev_tick`) the
// two FTWs, the control byte and the two phases of both beams are captured
// into one 50-byte payload and rf_frame_tx streams it to the WR core.
// Everything the receivers need to rebuild the program or master RF of
// either ring travels in that single frame.
//
// Timing: the payload holds the values of the rev_tick cycle; its first
// byte leaves one clock later. All phases are the accumulator values of
// that cycle, so a receiver that applies the frame D clocks after rev_tick
// should compensate D clocks of phase advance. Which NCO paces the frames
// and the shared table write port are this design's own choices.
module beam_control
  import llrf_pkg::*;
#(
  parameter int unsigned FGEN_DEPTH  = 4096,
  parameter int unsigned ADC_W       = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // function generator tables (tbl_beam selects the beam)
  input  logic                     tbl_we,
  input  logic                     tbl_beam,
  input  logic [$clog2(FGEN_DEPTH)-1:0] tbl_addr,
  input  logic [31:0]              tbl_interval,
  input  logic signed [47:0]       tbl_slope,
  input  logic [N_BEAMS-1:0]       fgen_start,
  input  logic [N_BEAMS-1:0]       fgen_stop,
  input  ftw_t                     f_start     [N_BEAMS],
  input  logic signed [31:0]       orbit_corr  [N_BEAMS],
  // master oscillators
  input  logic signed [ADC_W-1:0]  adc         [N_BEAMS],
  input  logic [N_BEAMS-1:0]       pll_enable,
  input  logic [15:0]              h_rf,
  // control flags sent with every frame
  input  ctrl_t                    ctrl        [N_BEAMS],
  // to the WR core
  output logic                     tx_valid,
  output logic                     tx_sof,
  output logic                     tx_eof,
  output logic [7:0]               tx_data,
  output logic                     tx_overrun,
  // status
  output logic                     rev_tick,
  output ftw_t                     ftw_prog     [N_BEAMS],
  output ftw_t                     ftw_master   [N_BEAMS],
  output phase_t                   phase_prog   [N_BEAMS],
  output phase_t                   phase_master [N_BEAMS],
  output logic [N_BEAMS-1:0]       fgen_running,
  output logic [N_BEAMS-1:0]       pll_locked
);

  payload_t payload;

  for (genvar b = 0; b < N_BEAMS; b++) begin : g_beam
    logic signed [FTW_W-1:0] corr;
    logic [$clog2(FGEN_DEPTH)-1:0] vec_idx;
    logic [FTW_W:0] psum;

    fgen #(.DEPTH(FGEN_DEPTH)) u_fgen (
      .clk, .rst_n,
      .tbl_we       (tbl_we && (tbl_beam == 1'(b))),
      .tbl_addr, .tbl_interval, .tbl_slope,
      .start        (fgen_start[b]),
      .stop         (fgen_stop[b]),
      .f_start      (f_start[b]),
      .orbit_corr   (orbit_corr[b]),
      .ftw          (ftw_prog[b]),
      .running      (fgen_running[b]),
      .vec_idx
    );

    dpll #(.ADC_W(ADC_W)) u_dpll (
      .clk, .rst_n,
      .enable       (pll_enable[b]),
      .adc          (adc[b]),
      .ftw_prog     (ftw_prog[b]),
      .h_rf,
      .ftw_master   (ftw_master[b]),
      .phase_master (phase_master[b]),
      .corr,
      .locked       (pll_locked[b])
    );

    // program NCO
    assign psum = {1'b0, phase_prog[b]} + {1'b0, ftw_prog[b]};
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) phase_prog[b] <= '0;
      else        phase_prog[b] <= psum[FTW_W-1:0];
    end
    if (b == 0) begin : g_tick
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) rev_tick <= 1'b0;
        else        rev_tick <= psum[FTW_W];
      end
    end

    assign payload[b] = '{ftw_prog:     ftw_prog[b],
                          ftw_master:   ftw_master[b],
                          ctrl:         ctrl[b],
                          phase_prog:   phase_prog[b],
                          phase_master: phase_master[b]};
  end

  rf_frame_tx u_tx (
    .clk, .rst_n,
    .send    (rev_tick),
    .payload,
    .tx_valid, .tx_sof, .tx_eof, .tx_data,
    .overrun (tx_overrun)
  );

endmodule
