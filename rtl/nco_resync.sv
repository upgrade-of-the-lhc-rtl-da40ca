// nco_resync: glitch-free phase correction of the harmonic-1 NCO.
//
// When a new phase error arrives (err_valid) while resynchronisation is
// requested (resync_en, the NCO_resync flag of the frame) and no correction
// is running, the error is taken as the remaining phase to correct. On every
// following clock a step of at most MAX_STEP phase units is moved from the
// remainder to `freq_delta`, which the RFNCO adds to the latched FTW. The NCO
// thus runs a little faster or slower until the full error has been absorbed:
// the phase follows a ramp instead of a jump, and the sum of all steps equals
// the error exactly. The error is read as a signed number, so the NCO always
// takes the shorter way round.
//
// Timing: freq_delta changes one cycle after err_valid; a correction of E
// units lasts ceil(|E| / MAX_STEP) cycles, during which busy is high and new
// errors are ignored. Correcting by a ramp follows the document; the clamped
// frequency step and its size are this design's own choice.
module nco_resync
  import llrf_pkg::*;
#(
  parameter logic [FTW_W-1:0] MAX_STEP = 48'd16777216   // 2**24 phase units / cycle
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,        // abort (NCO reset)
  input  logic                    err_valid,
  input  logic                    resync_en,
  input  logic signed [FTW_W-1:0] phase_err,
  output logic signed [FTW_W-1:0] freq_delta,
  output logic                    busy
);

  logic signed [FTW_W-1:0] rem;
  logic signed [FTW_W-1:0] step;
  localparam logic signed [FTW_W-1:0] SMAX = MAX_STEP;

  always_comb begin
    if (rem > SMAX)       step = SMAX;
    else if (rem < -SMAX) step = -SMAX;
    else                  step = rem;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem        <= '0;
      freq_delta <= '0;
      busy       <= 1'b0;
    end else if (clear) begin
      rem        <= '0;
      freq_delta <= '0;
      busy       <= 1'b0;
    end else if (!busy) begin
      freq_delta <= '0;
      if (err_valid && resync_en && phase_err != '0) begin
        rem  <= phase_err;
        busy <= 1'b1;
      end
    end else begin
      freq_delta <= step;
      rem        <= rem - step;
      if (rem == step) busy <= 1'b0;
    end
  end

endmodule
