// DSP array: NDSP weight multipliers working in parallel.
//
// Lane i multiplies a reduced sum t[i] (fixed point, FRAC fraction bits)
// by its Int8 weight w[i] and dequantizes the product by an arithmetic
// right shift of the weight's n_w, so prod[i] keeps the same fixed-point
// format. The 32-multiplier array and Int8 weights follow the paper; the
// per-element weight shift and the output register are this design's.
// Latency: one cycle from in_valid to out_valid.
module dsp_array #(
  parameter int NDSP  = 32,
  parameter int ACC_W = 40,
  parameter int INT_W = 8,
  parameter int SH_W  = 3,
  parameter int PW    = ACC_W + INT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ACC_W-1:0] t    [NDSP],
  input  logic signed [INT_W-1:0] w    [NDSP],
  input  logic [SH_W-1:0]         nw   [NDSP],
  output logic                    out_valid,
  output logic signed [PW-1:0]    prod [NDSP]
);
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    for (int i = 0; i < NDSP; i++)
      prod[i] <= (PW'(t[i]) * PW'(w[i])) >>> nw[i];
  end
endmodule
