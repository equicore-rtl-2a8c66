// Hand-over of load words and start from the peripheral clock to the core
// clock.
//
// The core clock runs at twice the peripheral clock and both come from one
// source with aligned rising edges, so every peripheral-domain register is
// stable for two core cycles and needs no synchronizer. The peripheral side
// flips tgl with each new word; the bridge notices the flip at the next
// core edge, copies the bundle into its own registers and raises the write
// enables (and start) for exactly one core cycle. The two clock rates
// follow the paper; the toggle hand-over and the aligned-clock
// requirement are this design's choices.
// Latency: the word is usable in the core domain one to two core cycles
// after the peripheral edge that registered it.
module clk_bridge
  import equicore_pkg::*;
#(
  parameter int N_CORES = 96
) (
  input  logic               clk_core,
  input  logic               rst_n,
  // peripheral-domain registers
  input  logic               p_tgl,
  input  logic [N_CORES-1:0] p_wr_en,
  input  buf_sel_e           p_wr_buf,
  input  logic [ADDR_W-1:0]  p_wr_addr,
  input  logic [CGW_W-1:0]   p_wr_raw,
  input  logic [INT_W-1:0]   p_wr_q,
  input  logic [SH_W-1:0]    p_wr_n,
  input  logic               p_start,
  // core-domain copies
  output logic [N_CORES-1:0] c_wr_en,
  output buf_sel_e           c_wr_buf,
  output logic [ADDR_W-1:0]  c_wr_addr,
  output logic [CGW_W-1:0]   c_wr_raw,
  output logic [INT_W-1:0]   c_wr_q,
  output logic [SH_W-1:0]    c_wr_n,
  output logic               c_start
);
  logic tgl_seen;
  logic fresh;

  assign fresh = (p_tgl != tgl_seen);

  always_ff @(posedge clk_core) begin
    if (!rst_n) begin
      tgl_seen <= 1'b0;
      c_wr_en  <= '0;
      c_start  <= 1'b0;
    end else begin
      tgl_seen <= p_tgl;
      c_wr_en  <= fresh ? p_wr_en : '0;
      c_start  <= fresh && p_start;
    end
    if (fresh) begin
      c_wr_buf  <= p_wr_buf;
      c_wr_addr <= p_wr_addr;
      c_wr_raw  <= p_wr_raw;
      c_wr_q    <= p_wr_q;
      c_wr_n    <= p_wr_n;
    end
  end
endmodule
