// llrf_wr_top: RF distribution over White Rabbit, source and one receiver.
//
// The Beam-Control (beam_control) plays the frequency programs of both
// rings, locks a master NCO per ring to its VCXO and sends, once per
// revolution, an RF frame with FTWs, reference phases and control flags.
// The White-Rabbit network between source and receivers (WR cores, switches,
// fibre) is not part of this RTL: the frame stream leaves on net_tx_* and a
// receiver's copy, delivered with a fixed latency, comes back on net_rx_*.
// The WR2RF receiver (wr2rf_fpga) rebuilds the RF of the selected ring as an
// IF for the DAC, the f_c pulse for its DDS, the fine revolution pulse and a
// bunch clock. Analog parts (ADC, VCXO, DAC, DDS, mixer) and the fine
// output delay line are outside too; their signals are ports.
//
// Clocks: clk is the WR-recovered 125 MHz clock, the same on both sides
// (WR clocks are phase-aligned); rf_clk is the receiver's RF output.
module llrf_wr_top
  import llrf_pkg::*;
#(
  parameter int unsigned FGEN_DEPTH  = 4096,
  parameter int unsigned ADC_W       = 16,
  parameter int unsigned IQ_W        = 16,
  parameter longint unsigned CLK_PER_SEC = 125_000_000
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ---- Beam-Control
  input  logic                     tbl_we,
  input  logic                     tbl_beam,
  input  logic [$clog2(FGEN_DEPTH)-1:0] tbl_addr,
  input  logic [31:0]              tbl_interval,
  input  logic signed [47:0]       tbl_slope,
  input  logic [N_BEAMS-1:0]       fgen_start,
  input  logic [N_BEAMS-1:0]       fgen_stop,
  input  ftw_t                     f_start     [N_BEAMS],
  input  logic signed [31:0]       orbit_corr  [N_BEAMS],
  input  logic signed [ADC_W-1:0]  vcxo_adc    [N_BEAMS],
  input  logic [N_BEAMS-1:0]       pll_enable,
  input  logic [15:0]              h_rf,
  input  ctrl_t                    ctrl        [N_BEAMS],
  output logic                     rev_tick,
  output ftw_t                     bc_ftw_prog     [N_BEAMS],
  output ftw_t                     bc_ftw_master   [N_BEAMS],
  output phase_t                   bc_phase_prog   [N_BEAMS],
  output phase_t                   bc_phase_master [N_BEAMS],
  output logic [N_BEAMS-1:0]       fgen_running,
  output logic [N_BEAMS-1:0]       pll_locked,
  output logic                     tx_overrun,
  // ---- WR network
  output logic                     net_tx_valid,
  output logic                     net_tx_sof,
  output logic                     net_tx_eof,
  output logic [7:0]               net_tx_data,
  input  logic                     net_rx_valid,
  input  logic                     net_rx_sof,
  input  logic                     net_rx_eof,
  input  logic [7:0]               net_rx_data,
  input  logic                     tai_valid,
  input  logic [39:0]              tai_sec,
  input  logic [27:0]              tai_cyc,
  // ---- WR2RF receiver
  input  logic                     rx_beam_sel,
  input  logic                     rx_rf_sel,
  input  ftw_t                     ftw_lo_int,
  input  ftw_t                     ftw_lo_frac,
  input  logic signed [31:0]       delay_cyc,
  input  logic [31:0]              fc_val,
  input  logic signed [IQ_W-1:0]   i_set,
  input  logic signed [IQ_W-1:0]   q_set,
  output logic signed [IQ_W-1:0]   dac,
  output logic                     dds_reset,
  output logic                     dds_resync,
  output logic                     frev_fine,
  output logic [6:0]               frev_tap,
  input  logic                     frev_sync_in,
  input  logic                     rf_clk,
  input  logic                     rf_rst_n,
  output logic                     bunch_clk,
  output logic                     bunch_aligned,
  output logic                     bunch_realign,
  output logic                     rx_load,
  output logic                     rx_frame_err,
  output logic                     fc_locked,
  output logic                     rx_frev,
  output phase_t                   rx_phase_h1,
  output logic signed [FTW_W-1:0]  rx_phase_error,
  output logic                     rx_phase_error_valid,
  output logic                     rx_resync_busy
);

  beam_control #(.FGEN_DEPTH(FGEN_DEPTH), .ADC_W(ADC_W)) u_bc (
    .clk, .rst_n,
    .tbl_we, .tbl_beam, .tbl_addr, .tbl_interval, .tbl_slope,
    .fgen_start, .fgen_stop, .f_start, .orbit_corr,
    .adc          (vcxo_adc),
    .pll_enable, .h_rf, .ctrl,
    .tx_valid     (net_tx_valid),
    .tx_sof       (net_tx_sof),
    .tx_eof       (net_tx_eof),
    .tx_data      (net_tx_data),
    .tx_overrun,
    .rev_tick,
    .ftw_prog     (bc_ftw_prog),
    .ftw_master   (bc_ftw_master),
    .phase_prog   (bc_phase_prog),
    .phase_master (bc_phase_master),
    .fgen_running, .pll_locked
  );

  wr2rf_fpga #(.IQ_W(IQ_W), .CLK_PER_SEC(CLK_PER_SEC)) u_wr2rf (
    .clk, .rst_n,
    .rx_valid (net_rx_valid), .rx_sof (net_rx_sof),
    .rx_eof   (net_rx_eof),   .rx_data(net_rx_data),
    .tai_valid, .tai_sec, .tai_cyc,
    .beam_sel (rx_beam_sel), .rf_sel (rx_rf_sel),
    .ftw_lo_int, .ftw_lo_frac, .h_rf, .delay_cyc, .fc_val,
    .i_set, .q_set,
    .dac, .dds_reset, .dds_resync,
    .frev_fine, .frev_tap, .frev_sync_in,
    .rf_clk, .rf_rst_n,
    .bunch_clk, .bunch_aligned, .bunch_realign,
    .load              (rx_load),
    .frame_err         (rx_frame_err),
    .fc_locked,
    .frev              (rx_frev),
    .phase_h1          (rx_phase_h1),
    .phase_error       (rx_phase_error),
    .phase_error_valid (rx_phase_error_valid),
    .resync_busy       (rx_resync_busy)
  );

endmodule
