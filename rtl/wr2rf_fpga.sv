// wr2rf_fpga: FPGA logic of a WR2RF receiver board.
//
// Rebuilds the RF of one beam from the RF frames that the White-Rabbit core
// delivers, with a phase that is reproducible whatever the start-up time:
//   rf_frame_rx    decodes the 50-byte payload and gives the `load` strobe;
//   beam/RF select picks the record of one beam (beam_sel) and either the
//                  program or the master FTW and reference phase (rf_sel);
//   rfnco          H1 NCO, phase compare and re-sync, LO NCO, IF cos/sin;
//   tai_to_fc      the cyclic f_c pulse from TAI, restarting the LO NCO and
//                  sent to the external DDS as dds_reset;
//   iq_modulator   IF carrier with the IQ set-point, to the DAC;
//   frev_upsampler revolution pulse with a fine-delay tap count, for an
//                  external delay line whose output returns on frev_sync_in;
//   bunch_divider  bunch clock from the RF output (rf_clk), aligned by the
//                  delayed revolution pulse.
// The frame flags NCO_reset and NCO_resync act at `load`; DDS_resync is
// passed on as a one-cycle pulse (dds_resync) to the DDS control.
//
// Clocks: clk is the 125 MHz WR-recovered clock; rf_clk is the RF output
// fed back from the mixer. Everything but bunch_divider runs on clk.
// The partition follows the WR2RF block diagram; the selection inputs and
// the way the DDS flags are brought out are this design's own choice.
module wr2rf_fpga
  import llrf_pkg::*;
#(
  parameter int unsigned IQ_W          = 16,
  parameter int unsigned BUNCH_DIV     = 10,
  parameter longint unsigned CLK_PER_SEC = 125_000_000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // RF frame from the WR core
  input  logic                    rx_valid,
  input  logic                    rx_sof,
  input  logic                    rx_eof,
  input  logic [7:0]              rx_data,
  // TAI from the WR core
  input  logic                    tai_valid,
  input  logic [39:0]             tai_sec,
  input  logic [27:0]             tai_cyc,
  // configuration
  input  logic                    beam_sel,      // 0: beam 1, 1: beam 2
  input  logic                    rf_sel,        // 0: program, 1: master
  input  ftw_t                    ftw_lo_int,
  input  ftw_t                    ftw_lo_frac,
  input  logic [15:0]             h_rf,
  input  logic signed [31:0]      delay_cyc,
  input  logic [31:0]             fc_val,
  input  logic signed [IQ_W-1:0]  i_set,
  input  logic signed [IQ_W-1:0]  q_set,
  // to DAC and DDS
  output logic signed [IQ_W-1:0]  dac,
  output logic                    dds_reset,
  output logic                    dds_resync,
  // revolution pulse to / from the fine delay line
  output logic                    frev_fine,
  output logic [6:0]              frev_tap,
  input  logic                    frev_sync_in,
  // bunch clock
  input  logic                    rf_clk,
  input  logic                    rf_rst_n,
  output logic                    bunch_clk,
  output logic                    bunch_aligned,
  output logic                    bunch_realign,
  // status
  output logic                    load,
  output logic                    frame_err,
  output logic                    fc_locked,
  output logic                    frev,
  output phase_t                  phase_h1,
  output logic signed [FTW_W-1:0] phase_error,
  output logic                    phase_error_valid,
  output logic                    resync_busy
);

  payload_t  payload;
  beam_rec_t rec;
  logic      fc_reset;
  logic signed [IQ_W-1:0] cos_if, sin_if;
  logic      if_valid;

  rf_frame_rx u_rx (
    .clk, .rst_n,
    .rx_valid, .rx_sof, .rx_eof, .rx_data,
    .payload, .load, .frame_err
  );

  assign rec        = payload[beam_sel];
  assign dds_resync = load && rec.ctrl.dds_resync;
  assign dds_reset  = fc_reset;

  tai_to_fc #(.CLK_PER_SEC(CLK_PER_SEC)) u_fc (
    .clk, .rst_n,
    .tai_valid, .tai_sec, .tai_cyc, .fc_val,
    .fc_reset, .locked(fc_locked)
  );

  rfnco #(.IQ_W(IQ_W)) u_nco (
    .clk, .rst_n,
    .load,
    .ftw_master   (rf_sel ? rec.ftw_master   : rec.ftw_prog),
    .phase_master (rf_sel ? rec.phase_master : rec.phase_prog),
    .nco_resync   (rec.ctrl.nco_resync),
    .nco_reset    (load && rec.ctrl.nco_reset),
    .ftw_lo_int, .ftw_lo_frac, .h_rf, .delay_cyc,
    .fc_reset,
    .phase_error, .phase_error_valid, .resync_busy,
    .frev, .phase_h1,
    .cos_if, .sin_if, .if_valid
  );

  iq_modulator #(.W(IQ_W)) u_mod (
    .clk, .rst_n,
    .i_set, .q_set,
    .cos_if (if_valid ? cos_if : '0),
    .sin_if (if_valid ? sin_if : '0),
    .dac
  );

  frev_upsampler u_up (
    .clk, .rst_n,
    .frev, .phase_h1,
    .frev_fine, .tap(frev_tap)
  );

  bunch_divider #(.DIV(BUNCH_DIV)) u_div (
    .rf_clk, .rst_n(rf_rst_n),
    .sync_in  (frev_sync_in),
    .bunch_clk,
    .aligned  (bunch_aligned),
    .realign  (bunch_realign)
  );

endmodule
