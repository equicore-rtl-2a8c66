// Shift-only quantizer: 16-bit full-precision word -> Int8.
//
// x_int = clip(round(x * 2^n), -128, 127), where x is a signed fixed-point
// word with FRAC fraction bits and n is the 3-bit number of shift sent with
// it. Because the scale is a power of two the conversion is a shift, a
// rounding add and a clip, with no multiplier. Rounding is to nearest, ties
// away from zero. Power-of-two scales and the clip follow the paper; the
// fixed-point input format is this design's choice.
// Purely combinational; sat flags that the clip was applied.
module quant_unit #(
  parameter int FIX_W = 16,
  parameter int FRAC  = 12,
  parameter int SH_W  = 3,
  parameter int INT_W = 8
) (
  input  logic signed [FIX_W-1:0] x,
  input  logic [SH_W-1:0]         n,
  output logic signed [INT_W-1:0] q,
  output logic                    sat
);
  localparam int WW = FIX_W + (1 << SH_W) + 2;
  localparam logic [WW-1:0] HALF = WW'(1) << (FRAC - 1);
  localparam logic [WW-1:0] QMAX = WW'((1 << (INT_W - 1)) - 1);
  localparam logic [WW-1:0] QMIN_MAG = WW'(1 << (INT_W - 1));

  logic          neg;
  logic [WW-1:0] mag, scaled, rounded;

  always_comb begin
    neg     = x[FIX_W-1];
    mag     = neg ? WW'(-{{(WW-FIX_W){x[FIX_W-1]}}, x}) : WW'(x);
    scaled  = mag << n;
    rounded = (scaled + HALF) >> FRAC;
    sat     = 1'b0;
    if (!neg && rounded > QMAX) begin
      q   = INT_W'(QMAX);
      sat = 1'b1;
    end else if (neg && rounded > QMIN_MAG) begin
      q   = INT_W'(-QMIN_MAG);
      sat = 1'b1;
    end else begin
      q = neg ? INT_W'(-rounded) : INT_W'(rounded);
    end
  end
endmodule
