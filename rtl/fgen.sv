// fgen: embedded function generator playing the frequency program.
//
// The program is a table of up to DEPTH vectors, each a time interval (in
// clock cycles) and a slope. After `start`, the output frequency begins at
// f_start and, vector after vector, grows by the vector's slope on every clock
// for the vector's interval: a piecewise-linear ramp. The frequency is kept
// with FRAC fractional bits, so a slope is given in units of 2**-FRAC FTW
// LSB per clock; this gives the resolution that slow ramps lasting tens of
// minutes need. A vector with interval 0 ends the program and the frequency
// then stays constant. The frequency correction written by the front-end
// computer (orbit feedback) is added to the output at any time, running or
// not.
//
// Table: one synchronous-read memory of {interval, slope} entries, written
// through the tbl_* port while the program is stopped. The next vector is
// always prefetched, so the output changes on every clock without gaps;
// this needs every interval but the last one before the end marker to be
// at least 2 clocks.
//
// Timing: ftw changes for the first time 3 clocks after `start`; a program
// of intervals n0..nk-1 has ftw settled at its end value 2 + sum(n) clocks
// after `start`, when `running` drops. Table size 4096 and the
// interval/slope interpolation follow the document; widths, the end marker
// and the FRAC resolution are this design's own choice.
module fgen
  import llrf_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned FRAC  = 32,
  parameter int unsigned IV_W  = 32,     // interval width
  parameter int unsigned SL_W  = 48,     // slope width (signed)
  parameter int unsigned COR_W = 32      // orbit correction width (signed)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // table write port
  input  logic                    tbl_we,
  input  logic [$clog2(DEPTH)-1:0] tbl_addr,
  input  logic [IV_W-1:0]         tbl_interval,
  input  logic signed [SL_W-1:0]  tbl_slope,
  // control
  input  logic                    start,
  input  logic                    stop,
  input  ftw_t                    f_start,
  input  logic signed [COR_W-1:0] orbit_corr,
  // output
  output ftw_t                    ftw,
  output logic                    running,
  output logic [$clog2(DEPTH)-1:0] vec_idx
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned EW = IV_W + SL_W;
  localparam int unsigned AccW = FTW_W + FRAC;

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_FIRST, S_RUN} state_t;

  logic [EW-1:0] mem [DEPTH];
  logic [EW-1:0] rdata;
  logic [AW-1:0] raddr;
  state_t        state;
  logic [IV_W-1:0] rem;
  logic signed [SL_W-1:0] slope;
  logic [AccW-1:0] acc;

  logic [IV_W-1:0]        rd_iv;
  logic signed [SL_W-1:0] rd_sl;
  assign rd_iv = rdata[EW-1 -: IV_W];
  assign rd_sl = signed'(rdata[SL_W-1:0]);

  assign raddr = (state == S_FETCH) ? '0 : vec_idx + 1'b1;

  always_ff @(posedge clk) begin
    if (tbl_we) mem[tbl_addr] <= {tbl_interval, tbl_slope};
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      rem     <= '0;
      slope   <= '0;
      acc     <= '0;
      vec_idx <= '0;
    end else if (stop) begin
      state <= S_IDLE;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          acc     <= {f_start, {FRAC{1'b0}}};
          vec_idx <= '0;
          state   <= S_FETCH;
        end
        S_FETCH: state <= S_FIRST;
        S_FIRST: begin
          if (rd_iv == '0) state <= S_IDLE;
          else begin
            rem   <= rd_iv;
            slope <= rd_sl;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          acc <= acc + AccW'(slope);
          if (rem <= 1) begin
            if (rd_iv == '0 || vec_idx == AW'(DEPTH - 1)) begin
              state <= S_IDLE;
            end else begin
              vec_idx <= vec_idx + 1'b1;
              rem     <= rd_iv;
              slope   <= rd_sl;
            end
          end else begin
            rem <= rem - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign running = (state != S_IDLE);
  assign ftw     = acc[AccW-1 -: FTW_W] + ftw_t'(orbit_corr);

endmodule
