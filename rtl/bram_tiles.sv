// BRAM tiles: accumulation memory of the reduced sums T[pair][k].
//
// A pair is one (I_x row, I_y row) combination; k = id_z is the output
// component. ROWS write lanes (two per R-PE) each add their value at
// (wr_pair[r], wr_k) in one read-modify-write cycle, or overwrite it with
// zero when clear is set. The read port returns NDSP consecutive pairs
// starting at rd_pair of component rd_k, combinationally, for the DSP
// array. Addressing the tiles by id_z follows the paper; the single-cycle
// read-modify-write (distributed-RAM style) is this design's choice.
// Lanes must write distinct pairs in a cycle.
module bram_tiles #(
  parameter int ROWS   = 8,
  parameter int PAIRS  = 2048,
  parameter int NE     = 11,
  parameter int NDSP   = 32,
  parameter int ACC_W  = 40,
  parameter int PAIR_W = $clog2(PAIRS + NDSP),
  parameter int K_W    = 8
) (
  input  logic                    clk,
  input  logic                    clear,
  input  logic [ROWS-1:0]         wr_en,
  input  logic [PAIR_W-1:0]       wr_pair [ROWS],
  input  logic [K_W-1:0]          wr_k,
  input  logic signed [ACC_W-1:0] wr_val  [ROWS],
  input  logic [PAIR_W-1:0]       rd_pair,
  input  logic [K_W-1:0]          rd_k,
  output logic signed [ACC_W-1:0] rd_data [NDSP]
);
  logic signed [ACC_W-1:0] mem [PAIRS][NE];

  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++) begin
      if (wr_en[r] && int'(wr_pair[r]) < PAIRS && int'(wr_k) < NE) begin
        if (clear) mem[wr_pair[r]][wr_k] <= '0;
        else       mem[wr_pair[r]][wr_k] <= mem[wr_pair[r]][wr_k] + wr_val[r];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NDSP; i++) begin
      if (int'(rd_pair) + i < PAIRS && int'(rd_k) < NE)
        rd_data[i] = mem[int'(rd_pair) + i][rd_k];
      else
        rd_data[i] = '0;
    end
  end
endmodule
