// Memory controller between the off-chip load stream and the Equicore units.
//
// Each input word names a buffer (buf_sel_e), an address and either one
// unit (wr_core) or all units (wr_bcast; used for the CG list, weights and
// configuration, which every unit shares). Irrep and weight words pass
// through the shift-only quantizer (16-bit fixed point + 3-bit shift ->
// Int8) on the way; CG and configuration words pass unchanged. The word is
// registered once and presented to the units with a one-hot write enable.
// Output reads select one unit's read data (the units register it, so
// rd_data follows rd_core/rd_addr by one cycle). The role of the block and
// the quantize-on-load step follow the paper; the address map, broadcast
// and one-word-per-cycle protocol are this design's choices.
// sat_count counts quantizer clips since reset. The controller runs on the
// peripheral clock; c_tgl flips with every registered word or start so
// that clk_bridge can hand each one to the core clock exactly once.
module mem_ctrl
  import equicore_pkg::*;
#(
  parameter int N_CORES = 96,
  parameter int CORE_W  = (N_CORES > 1) ? $clog2(N_CORES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // load stream
  input  logic               wr_valid,
  input  logic               wr_bcast,
  input  logic [CORE_W-1:0]  wr_core,
  input  buf_sel_e           wr_buf,
  input  logic [ADDR_W-1:0]  wr_addr,
  input  logic [CGW_W-1:0]   wr_data,
  input  logic [SH_W-1:0]    wr_shift,
  input  logic               start,
  // to the units
  output logic [N_CORES-1:0] c_wr_en,
  output buf_sel_e           c_wr_buf,
  output logic [ADDR_W-1:0]  c_wr_addr,
  output logic [CGW_W-1:0]   c_wr_raw,
  output logic [INT_W-1:0]   c_wr_q,
  output logic [SH_W-1:0]    c_wr_n,
  output logic               c_start,
  output logic               c_tgl,
  // output irrep read
  input  logic [CORE_W-1:0]  rd_core,
  input  logic [FIX_W-1:0]   c_rd_data [N_CORES],
  output logic [FIX_W-1:0]   rd_data,
  output logic [31:0]        sat_count
);
  logic signed [INT_W-1:0] q;
  logic                    sat;
  logic                    quantize;

  assign quantize = (wr_buf == BUF_IX) || (wr_buf == BUF_IY) || (wr_buf == BUF_W);

  quant_unit #(.FIX_W(FIX_W), .FRAC(FRAC), .SH_W(SH_W), .INT_W(INT_W)) u_quant (
    .x(wr_data[FIX_W-1:0]), .n(wr_shift), .q(q), .sat(sat)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_wr_en   <= '0;
      c_start   <= 1'b0;
      c_tgl     <= 1'b0;
      sat_count <= '0;
    end else begin
      c_start <= start;
      if (wr_valid || start) c_tgl <= ~c_tgl;
      for (int c = 0; c < N_CORES; c++)
        c_wr_en[c] <= wr_valid && (wr_bcast || int'(wr_core) == c);
      if (wr_valid && quantize && sat) sat_count <= sat_count + 1;
    end
    c_wr_buf  <= wr_buf;
    c_wr_addr <= wr_addr;
    c_wr_raw  <= wr_data;
    c_wr_q    <= q;
    c_wr_n    <= wr_shift;
  end

  assign rd_data = (int'(rd_core) < N_CORES) ? c_rd_data[rd_core] : '0;

endmodule
