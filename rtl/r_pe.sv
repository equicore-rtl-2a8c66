// R-PE: packed multiply of two L-PE products by one CG value, then the
// merged-shift dequantization of each product.
//
// P = (op1 * 2^SEP + op0) * value + 2^(SEP-1) gives q1 = op1*value in the
// upper field and q0 = op0*value in the lower one (same correction as the
// L-PE). Each q is then brought to the accumulator's fixed-point format
// (FRAC fraction bits) by a shift: t = (q * 2^FRAC) >> n, where n is that
// lane's merged shift n_x + n_y + n_cg. The packing, the C-port correction
// and the merged shift follow the paper; SEP is wider than one DSP48 port
// because 16-bit products need it, and the format is this design's choice.
// Latency: one cycle; id_z and valid travel with the data.
module r_pe #(
  parameter int OP_W   = 16,
  parameter int INT_W  = 8,
  parameter int SEP    = 26,
  parameter int FRAC   = 12,
  parameter int NSUM_W = 5,
  parameter int ACC_W  = 40,
  parameter int ID_W   = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [OP_W-1:0]  op0,
  input  logic signed [OP_W-1:0]  op1,
  input  logic signed [INT_W-1:0] value,
  input  logic [NSUM_W-1:0]       n0,
  input  logic [NSUM_W-1:0]       n1,
  input  logic [ID_W-1:0]         idz_in,
  output logic                    out_valid,
  output logic [ID_W-1:0]         idz_out,
  output logic signed [ACC_W-1:0] t0,
  output logic signed [ACC_W-1:0] t1
);
  localparam int QW = OP_W + INT_W;
  localparam int PW = SEP + QW + 2;
  localparam int SW = QW + FRAC;

  logic signed [PW-1:0]  pre, p;
  logic        [SEP-1:0] low;
  logic signed [QW-1:0]  q0, q1;
  logic signed [SW-1:0]  s0, s1;

  always_comb begin
    pre = (PW'(op1) <<< SEP) + PW'(op0);
    p   = pre * PW'(value) + (PW'(1) <<< (SEP - 1));
    low = p[SEP-1:0] ^ (SEP'(1) << (SEP - 1));
    q0  = QW'(signed'(low));
    q1  = p[SEP+QW-1:SEP];
    s0  = (SW'(q0) <<< FRAC) >>> n0;
    s1  = (SW'(q1) <<< FRAC) >>> n1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    idz_out <= idz_in;
    t0      <= ACC_W'(s0);
    t1      <= ACC_W'(s1);
  end
endmodule
