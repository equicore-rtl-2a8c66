// Equicore system: memory controller with quantizer and N_CORES Equicore
// units, each computing a Clebsch-Gordan tensor product on its own sample.
//
// The off-chip memory side is this module's ports: a load stream (one word
// per cycle, to one unit or broadcast to all), a start pulse, busy/done,
// and an output-irrep read port. A typical run: broadcast the
// configuration, CG list and weights; load I_x and I_y of each unit's
// sample; pulse start; wait for done; read I_z of each unit (rd_data one
// cycle after rd_core/rd_addr). All units share the schedule, so they
// finish together; done is the AND of the units' done flags.
// Two clocks, as in the paper: the memory controller and quantizer run on
// clk_periph, the units on clk_core at twice that rate (250 and 500 MHz).
// The clocks must come from one source with aligned rising edges; all
// ports except busy/done/rd_data/stat_* belong to clk_periph, and those
// are core-domain levels that are stable while they are read.
// clk_bridge hands each load word and start to the core clock once.
// N_CORES = 96 is derived from the paper's DSP count (3,840 DSPs at 40 per
// unit); the work split by sample, the clock hand-over and the port
// protocol are this design's choices. stat_lpe/stat_bypass show the L-PE firings and
// bypassed (reused) products of the unit selected by rd_core.
module equicore_top
  import equicore_pkg::*;
#(
  parameter int N_CORES  = 96,
  parameter int N_LPE    = 4,
  parameter int NDSP     = 32,
  parameter int L_MAX    = 5,
  parameter int MX_MAX   = 128,
  parameter int MY_MAX   = 16,
  parameter int MZ_MAX   = 128,
  parameter int CG_DEPTH = 512,
  parameter int CORE_W   = (N_CORES > 1) ? $clog2(N_CORES) : 1
) (
  input  logic              clk_core,
  input  logic              clk_periph,
  input  logic              rst_n,
  input  logic              wr_valid,
  input  logic              wr_bcast,
  input  logic [CORE_W-1:0] wr_core,
  input  buf_sel_e          wr_buf,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [CGW_W-1:0]  wr_data,
  input  logic [SH_W-1:0]   wr_shift,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [CORE_W-1:0] rd_core,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [FIX_W-1:0]  rd_data,
  output logic [31:0]       sat_count,
  output logic [31:0]       stat_lpe,
  output logic [31:0]       stat_bypass
);
  logic [N_CORES-1:0] p_wr_en, c_wr_en;
  buf_sel_e           p_wr_buf, c_wr_buf;
  logic [ADDR_W-1:0]  p_wr_addr, c_wr_addr;
  logic [CGW_W-1:0]   p_wr_raw, c_wr_raw;
  logic [INT_W-1:0]   p_wr_q, c_wr_q;
  logic [SH_W-1:0]    p_wr_n, c_wr_n;
  logic               p_start, p_tgl, c_start;
  logic [FIX_W-1:0]   c_rd_data [N_CORES];
  logic [N_CORES-1:0] c_busy, c_done;
  logic [31:0]        c_lpe [N_CORES];
  logic [31:0]        c_byp [N_CORES];

  mem_ctrl #(.N_CORES(N_CORES), .CORE_W(CORE_W)) u_mc (
    .clk(clk_periph), .rst_n,
    .wr_valid, .wr_bcast, .wr_core, .wr_buf, .wr_addr, .wr_data, .wr_shift, .start,
    .c_wr_en(p_wr_en), .c_wr_buf(p_wr_buf), .c_wr_addr(p_wr_addr), .c_wr_raw(p_wr_raw),
    .c_wr_q(p_wr_q), .c_wr_n(p_wr_n), .c_start(p_start), .c_tgl(p_tgl),
    .rd_core, .c_rd_data, .rd_data, .sat_count
  );

  clk_bridge #(.N_CORES(N_CORES)) u_bridge (
    .clk_core, .rst_n,
    .p_tgl, .p_wr_en, .p_wr_buf, .p_wr_addr, .p_wr_raw, .p_wr_q, .p_wr_n, .p_start,
    .c_wr_en, .c_wr_buf, .c_wr_addr, .c_wr_raw, .c_wr_q, .c_wr_n, .c_start
  );

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    equicore_unit #(.N_LPE(N_LPE), .NDSP(NDSP), .L_MAX(L_MAX), .MX_MAX(MX_MAX),
                    .MY_MAX(MY_MAX), .MZ_MAX(MZ_MAX), .CG_DEPTH(CG_DEPTH)) u_core (
      .clk(clk_core), .rst_n,
      .wr_en(c_wr_en[c]), .wr_buf(c_wr_buf), .wr_addr(c_wr_addr),
      .wr_raw(c_wr_raw), .wr_q(c_wr_q), .wr_n(c_wr_n),
      .start(c_start), .busy(c_busy[c]), .done(c_done[c]),
      .rd_addr, .rd_data(c_rd_data[c]),
      .stat_lpe(c_lpe[c]), .stat_bypass(c_byp[c])
    );
  end

  assign busy        = |c_busy;
  assign done        = &c_done;
  assign stat_lpe    = (int'(rd_core) < N_CORES) ? c_lpe[rd_core] : '0;
  assign stat_bypass = (int'(rd_core) < N_CORES) ? c_byp[rd_core] : '0;

endmodule
