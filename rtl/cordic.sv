// cordic: pipelined phase-to-cos/sin converter (CORDIC, rotation mode).
//
// The input is a phase word where 2**PHASE_W is one full turn (the upper bits
// of an NCO accumulator). A first stage folds the phase into [-1/4, +1/4)
// turn, remembering whether the result must be negated (half-turn
// rotation). ITER micro-rotation stages follow; stage i rotates the vector
// (x, y) by +-atan(2**-i), steered by the sign of the residual angle z. The
// start vector is (K*A, 0), where K = 0.60725 undoes the CORDIC gain and
// A = 2**(OUT_W-1)-1 is the output amplitude, so that x and y end as
// A*cos(phase) and A*sin(phase); x and y carry G = 4 extra fraction bits
// that are rounded away at the output (error within +-4 LSB). The angle table is in units of 2**-32 turn:
// atan(2**-i) / (2*pi) * 2**32, rounded.
//
// Interface: phase/in_valid in, cos_o/sin_o/out_valid out, two's complement.
// Timing: fully pipelined, one sample per clock, latency ITER + 2 cycles.
// The document names a CORDIC for the IF generation; its widths, depth and
// pipelining are this design's own choice.
module cordic #(
  parameter int unsigned PHASE_W = 18,
  parameter int unsigned OUT_W   = 16,
  parameter int unsigned ITER    = 16    // at most 24
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [PHASE_W-1:0]       phase,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  cos_o,
  output logic signed [OUT_W-1:0]  sin_o
);

  localparam int unsigned G  = 4;                  // fraction guard bits
  localparam int unsigned XW = OUT_W + 2 + G;      // plus growth margin
  localparam real         KINV = 0.6072529350088828;
  localparam int          AMP  = 2**(OUT_W-1) - 1;
  localparam logic signed [XW-1:0] X0 = XW'($rtoi(KINV * real'(AMP) * real'(2**G) + 0.5));

  function automatic logic [31:0] atan_turn(int unsigned i);
    case (i)
      0:  return 32'd536870912;  1:  return 32'd316933406;
      2:  return 32'd167458907;  3:  return 32'd85004756;
      4:  return 32'd42667331;   5:  return 32'd21354465;
      6:  return 32'd10679838;   7:  return 32'd5340245;
      8:  return 32'd2670163;    9:  return 32'd1335087;
      10: return 32'd667544;     11: return 32'd333772;
      12: return 32'd166886;     13: return 32'd83443;
      14: return 32'd41722;      15: return 32'd20861;
      16: return 32'd10430;      17: return 32'd5215;
      18: return 32'd2608;       19: return 32'd1304;
      20: return 32'd652;        21: return 32'd326;
      22: return 32'd163;        default: return 32'd81;
    endcase
  endfunction

  logic signed [XW-1:0] x   [ITER+1];
  logic signed [XW-1:0] y   [ITER+1];
  logic signed [31:0]   z   [ITER+1];
  logic                 neg [ITER+1];
  logic                 vld [ITER+1];

  // Stage 0: fold into [-1/4, 1/4) turn.
  logic signed [31:0] z_in;
  assign z_in = signed'({phase, {(32-PHASE_W){1'b0}}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; neg[0] <= 1'b0; vld[0] <= 1'b0;
    end else begin
      x[0]   <= X0;
      y[0]   <= '0;
      vld[0] <= in_valid;
      if (z_in[31] != z_in[30]) begin
        z[0]   <= z_in + 32'sh8000_0000;   // subtract half a turn
        neg[0] <= 1'b1;
      end else begin
        z[0]   <= z_in;
        neg[0] <= 1'b0;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    localparam logic signed [31:0] ANG = atan_turn(i);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[i+1] <= '0; y[i+1] <= '0; z[i+1] <= '0; neg[i+1] <= 1'b0; vld[i+1] <= 1'b0;
      end else begin
        neg[i+1] <= neg[i];
        vld[i+1] <= vld[i];
        if (!z[i][31]) begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - ANG;
        end else begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + ANG;
        end
      end
    end
  end

  function automatic logic signed [OUT_W-1:0] sat(logic signed [XW-1:0] v, logic n);
    logic signed [XW-1:0] w;
    w = ((n ? -v : v) + XW'(2**(G-1))) >>> G;     // round away the guard bits
    if (w > XW'(AMP))       return OUT_W'(AMP);
    else if (w < -XW'(AMP)) return OUT_W'(-AMP);
    else                    return w[OUT_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cos_o <= '0; sin_o <= '0; out_valid <= 1'b0;
    end else begin
      cos_o     <= sat(x[ITER], neg[ITER]);
      sin_o     <= sat(y[ITER], neg[ITER]);
      out_valid <= vld[ITER];
    end
  end

endmodule
