// L-PE: two Int8 x Int8 products from one packed multiply.
//
// Two I_x elements of different multiplicity rows share one multiplier:
// P = (x1 * 2^SEP + x0) * y + C, with C = 2^(SEP-1). The constant at the
// C port keeps the lower field non-negative, so the upper field P >> SEP is
// exactly x1*y, and the lower field minus 2^(SEP-1) is exactly x0*y.
// Operand placement (x0 at D, x1 at A, y at B, correction at C) follows the
// paper's DSP48 mapping; the correction constant is this design's choice.
// The products are held in the output register (the oBRAM of the unit)
// until the next en, so overlapped CG elements can reuse them.
// Latency: one cycle from en to op0/op1.
module l_pe #(
  parameter int INT_W = 8,
  parameter int OP_W  = 16,
  parameter int SEP   = 18
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic signed [INT_W-1:0] x0,
  input  logic signed [INT_W-1:0] x1,
  input  logic signed [INT_W-1:0] y,
  output logic signed [OP_W-1:0]  op0,
  output logic signed [OP_W-1:0]  op1
);
  localparam int PW = SEP + OP_W + 2;

  logic signed [PW-1:0] pre, p;
  logic        [SEP-1:0] low;

  always_comb begin
    pre = (PW'(x1) <<< SEP) + PW'(x0);          // pre-adder, ports A and D
    p   = pre * PW'(y) + (PW'(1) <<< (SEP - 1)); // multiplier, port B; C
    low = p[SEP-1:0] ^ (SEP'(1) << (SEP - 1));  // remove the C offset
  end

  always_ff @(posedge clk) begin
    if (en) begin
      op0 <= OP_W'(signed'(low));
      op1 <= p[SEP+OP_W-1:SEP];
    end
  end
endmodule
