// Adder tree: sums N signed inputs into one result, registered once.
//
// Balanced binary tree laid out as a heap (node i adds nodes 2i+1 and
// 2i+2); unused leaves are zero. The paper names an adder tree after the
// DSP array; its shape and single pipeline register are this design's.
// Latency: one cycle from in_valid to out_valid.
module adder_tree #(
  parameter int N  = 32,
  parameter int IW = 48,
  parameter int OW = IW + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data [N],
  output logic                 out_valid,
  output logic signed [OW-1:0] sum
);
  localparam int NP = 1 << $clog2(N);

  logic signed [OW-1:0] node [2*NP-1];

  always_comb begin
    for (int i = 0; i < NP; i++)
      node[NP-1+i] = (i < N) ? OW'(in_data[i]) : '0;
    for (int i = NP - 2; i >= 0; i--)
      node[i] = node[2*i+1] + node[2*i+2];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    sum <= node[0];
  end
endmodule
