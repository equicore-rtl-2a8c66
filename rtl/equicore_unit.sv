// Equicore unit: one Clebsch-Gordan tensor product (CGTP) engine.
//
// Computes, for output channel w and component k,
//   I_z[w][k] = sum_(u,v) W[u,v][w] * sum_(i,j) CG[i][j][k] * I_x[u][i] * I_y[v][j]
// without forming the outer product: only the non-zero CG elements, read
// as a reorganized Head/Body stream, select the I_x and I_y operands.
//
// Schedule (controller below):
//  * For each I_y row v and each group of ROWS = 2*N_LPE I_x rows:
//    CLEAR  - zero the nz tile entries of the group's pairs (nz cycles);
//    STREAM - one CG word per cycle. A Head fetches I_x[u][id_x] for the
//             ROWS rows (xReg) and I_y[v][id_y] (yReg) into the N_LPE
//             packed L-PEs; their products stay in the oBRAM registers.
//             Each Body sends those products with its Value to the R-PEs,
//             which dequantize by n_x[u] + n_y[v] + n_cg and accumulate
//             into the tile at id_z. Bodies after the first in a group
//             reuse the held products (bypass of the L-PE);
//    DRAIN  - 2 cycles for the last R-PE results to land.
//  * REDUCE - for each w, k and chunk of NDSP pairs, the DSP array
//             multiplies tiles by Int8 weights (shift n_w) and the adder
//             tree sums them; chunk sums accumulate and the saturated
//             16-bit result is written to the output buffer.
// Cycles from start to done: passes * (nz + cg_len + 2)
//                            + mz * nz * ceil(mx*my / NDSP) + 2,
// with passes = my * ceil(mx / ROWS).
// The structure (CG decode, L-PE, oBRAM, R-PE, BRAM tiles addressed by
// id_z, DSP array, adder tree, one I_y row and several I_x rows per pass)
// follows the paper; the loop order, buffer depths, address map and
// number formats are this design's choices.
//
// Load port: wr_en with wr_buf/wr_addr; irreps and weights come already
// quantized (wr_q, wr_n), CG words and config values in wr_raw. Output
// read: rd_addr = {w, k}, rd_data one cycle later. start is taken in IDLE
// or DONE; busy is high until done rises (done stays until next start).
module equicore_unit
  import equicore_pkg::*;
#(
  parameter int N_LPE    = 4,
  parameter int NDSP     = 32,
  parameter int L_MAX    = 5,
  parameter int MX_MAX   = 128,
  parameter int MY_MAX   = 16,
  parameter int MZ_MAX   = 128,
  parameter int CG_DEPTH = 512
) (
  input  logic               clk,
  input  logic               rst_n,
  // load port
  input  logic               wr_en,
  input  buf_sel_e           wr_buf,
  input  logic [ADDR_W-1:0]  wr_addr,
  input  logic [CGW_W-1:0]   wr_raw,
  input  logic [INT_W-1:0]   wr_q,
  input  logic [SH_W-1:0]    wr_n,
  // control
  input  logic               start,
  output logic               busy,
  output logic               done,
  // output irrep read port
  input  logic [ADDR_W-1:0]  rd_addr,
  output logic [FIX_W-1:0]   rd_data,
  // event counters of the last run
  output logic [31:0]        stat_lpe,
  output logic [31:0]        stat_bypass
);
  localparam int ROWS   = 2 * N_LPE;
  localparam int NE     = 2 * L_MAX + 1;
  localparam int EW     = $clog2(NE);
  localparam int ZW     = $clog2(MZ_MAX);
  localparam int PAIRS  = MX_MAX * MY_MAX;
  localparam int PAIR_W = $clog2(PAIRS + NDSP);
  localparam int UW     = $clog2(MX_MAX + ROWS);
  localparam int VW     = $clog2(MY_MAX + 1);
  localparam int CW     = $clog2(CG_DEPTH + 1);
  localparam int PW     = ACC_W + INT_W;
  localparam int TW     = PW + $clog2(NDSP);
  localparam int SUMW   = TW + 8;

  typedef struct packed {
    logic [SH_W-1:0]         n;
    logic signed [INT_W-1:0] q;
  } qword_t;

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_STREAM, S_DRAIN, S_REDUCE, S_RDRAIN, S_DONE} state_e;

  // ---------------- buffers ----------------
  logic signed [INT_W-1:0] ix_mem [MX_MAX][NE];
  logic [SH_W-1:0]         ix_n   [MX_MAX];
  logic signed [INT_W-1:0] iy_mem [MY_MAX][NE];
  logic [SH_W-1:0]         iy_n   [MY_MAX];
  cg_word_t                cg_mem [CG_DEPTH];
  qword_t                  w_mem  [PAIRS][MZ_MAX];
  logic [FIX_W-1:0]        oz_mem [MZ_MAX][NE];

  logic [UW-1:0]   cfg_mx;
  logic [VW-1:0]   cfg_my;
  logic [ZW:0]     cfg_mz;
  logic [EW:0]     cfg_nz;
  logic [CW-1:0]   cfg_cg_len;

  logic [ADDR_W-EW-1:0] a_row;
  logic [EW-1:0]        a_e;
  logic [ADDR_W-ZW-1:0] a_pair;
  logic [ZW-1:0]        a_w;
  assign a_row  = wr_addr[ADDR_W-1:EW];
  assign a_e    = wr_addr[EW-1:0];
  assign a_pair = wr_addr[ADDR_W-1:ZW];
  assign a_w    = wr_addr[ZW-1:0];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      unique case (wr_buf)
        BUF_IX: if (int'(a_row) < MX_MAX && int'(a_e) < NE) begin
          ix_mem[a_row][a_e] <= wr_q;
          ix_n[a_row]        <= wr_n;
        end
        BUF_IY: if (int'(a_row) < MY_MAX && int'(a_e) < NE) begin
          iy_mem[a_row][a_e] <= wr_q;
          iy_n[a_row]        <= wr_n;
        end
        BUF_W: if (int'(a_pair) < PAIRS)
          w_mem[a_pair][a_w] <= '{n: wr_n, q: wr_q};
        BUF_CG: if (int'(wr_addr) < CG_DEPTH)
          cg_mem[wr_addr] <= cg_word_t'(wr_raw);
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_mx     <= '0;
      cfg_my     <= '0;
      cfg_mz     <= '0;
      cfg_nz     <= '0;
      cfg_cg_len <= '0;
    end else if (wr_en && wr_buf == BUF_CFG) begin
      case (int'(wr_addr))
        CFG_MX:     cfg_mx     <= UW'(wr_raw);
        CFG_MY:     cfg_my     <= VW'(wr_raw);
        CFG_MZ:     cfg_mz     <= (ZW+1)'(wr_raw);
        CFG_NZ:     cfg_nz     <= (EW+1)'(wr_raw);
        CFG_CG_LEN: cfg_cg_len <= CW'(wr_raw);
        default: ;
      endcase
    end
  end

  // ---------------- controller state ----------------
  state_e         state;
  logic [VW-1:0]  v;            // current I_y row
  logic [UW-1:0]  g_base;       // first I_x row of the current group
  logic [EW:0]    kc;           // clear index
  logic [CW-1:0]  ptr;          // CG stream pointer
  logic [1:0]     drain;
  logic [ZW:0]    rw;           // reduce: output channel
  logic [EW:0]    rk;           // reduce: component
  logic [PAIR_W-1:0] rc;        // reduce: first pair of the chunk
  logic [PAIR_W-1:0] npairs;
  logic [PAIR_W-1:0] pass_base; // pair index of row g_base, I_y row v

  assign npairs    = PAIR_W'(cfg_mx) * PAIR_W'(cfg_my);
  assign pass_base = PAIR_W'(v) * PAIR_W'(cfg_mx) + PAIR_W'(g_base);

  // ---------------- CG decode ----------------
  logic            dec_head, dec_body, dec_fresh;
  logic [ID_W-1:0] dec_idx, dec_idy;
  cg_body_t        dec_bd;

  cg_decoder u_dec (
    .clk, .rst_n,
    .in_valid (state == S_STREAM),
    .in_word  (cg_mem[ptr]),
    .head_fire(dec_head), .idx(dec_idx), .idy(dec_idy),
    .body_fire(dec_body), .body(dec_bd), .fresh(dec_fresh)
  );

  // ---------------- operand fetch (xReg / yReg) and L-PEs ----------------
  logic [ROWS-1:0]         row_ok;
  logic signed [INT_W-1:0] xsel [ROWS];
  logic signed [INT_W-1:0] ysel;
  logic [SH_W-1:0]         nx_row [ROWS];

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      row_ok[r] = (int'(g_base) + r) < int'(cfg_mx);
      if (row_ok[r] && int'(g_base) + r < MX_MAX && int'(dec_idx) < NE)
        xsel[r] = ix_mem[int'(g_base) + r][dec_idx];
      else
        xsel[r] = '0;
      nx_row[r] = (int'(g_base) + r < MX_MAX) ? ix_n[int'(g_base) + r] : '0;
    end
    if (int'(v) < MY_MAX && int'(dec_idy) < NE) ysel = iy_mem[v][dec_idy];
    else                                        ysel = '0;
  end

  logic signed [OP_W-1:0] op [ROWS];   // oBRAM: held L-PE products

  for (genvar p = 0; p < N_LPE; p++) begin : g_lpe
    l_pe #(.INT_W(INT_W), .OP_W(OP_W)) u_lpe (
      .clk, .en(dec_head),
      .x0(xsel[2*p]), .x1(xsel[2*p+1]), .y(ysel),
      .op0(op[2*p]), .op1(op[2*p+1])
    );
  end

  // ---------------- R-PEs ----------------
  logic                    rpe_valid [N_LPE];
  logic [ID_W-1:0]         rpe_idz   [N_LPE];
  logic signed [ACC_W-1:0] rpe_t     [ROWS];
  logic [NSUM_W-1:0]       nsum      [ROWS];
  logic [SH_W-1:0]         ny_cur;

  assign ny_cur = (int'(v) < MY_MAX) ? iy_n[v] : '0;

  always_comb
    for (int r = 0; r < ROWS; r++)
      nsum[r] = NSUM_W'(nx_row[r]) + NSUM_W'(ny_cur) + NSUM_W'(dec_bd.ncg);

  for (genvar p = 0; p < N_LPE; p++) begin : g_rpe
    r_pe #(.OP_W(OP_W), .INT_W(INT_W), .FRAC(FRAC), .NSUM_W(NSUM_W),
           .ACC_W(ACC_W), .ID_W(ID_W)) u_rpe (
      .clk, .rst_n,
      .in_valid(dec_body),
      .op0(op[2*p]), .op1(op[2*p+1]),
      .value(dec_bd.value),
      .n0(nsum[2*p]), .n1(nsum[2*p+1]),
      .idz_in(dec_bd.idz),
      .out_valid(rpe_valid[p]), .idz_out(rpe_idz[p]),
      .t0(rpe_t[2*p]), .t1(rpe_t[2*p+1])
    );
  end

  // ---------------- BRAM tiles ----------------
  logic                    tl_clear;
  logic [ROWS-1:0]         tl_wr_en;
  logic [PAIR_W-1:0]       tl_pair [ROWS];
  logic [7:0]              tl_k;
  logic signed [ACC_W-1:0] tl_rd [NDSP];

  always_comb begin
    tl_clear = (state == S_CLEAR);
    tl_k     = tl_clear ? 8'(kc) : rpe_idz[0];
    for (int r = 0; r < ROWS; r++) begin
      tl_pair[r]  = pass_base + PAIR_W'(r);
      tl_wr_en[r] = row_ok[r] && (tl_clear || rpe_valid[r/2]);
    end
  end

  bram_tiles #(.ROWS(ROWS), .PAIRS(PAIRS), .NE(NE), .NDSP(NDSP), .ACC_W(ACC_W),
               .PAIR_W(PAIR_W), .K_W(8)) u_tiles (
    .clk, .clear(tl_clear), .wr_en(tl_wr_en), .wr_pair(tl_pair), .wr_k(tl_k),
    .wr_val(rpe_t), .rd_pair(rc), .rd_k(8'(rk)), .rd_data(tl_rd)
  );

  // ---------------- DSP array and adder tree ----------------
  logic                    red_issue;
  logic signed [INT_W-1:0] wsel  [NDSP];
  logic [SH_W-1:0]         nwsel [NDSP];
  logic signed [PW-1:0]    prod  [NDSP];
  logic                    prod_valid, tree_valid;
  logic signed [TW-1:0]    tree_sum;

  assign red_issue = (state == S_REDUCE);

  always_comb
    for (int i = 0; i < NDSP; i++) begin
      if (int'(rc) + i < int'(npairs) && int'(rc) + i < PAIRS && int'(rw) < MZ_MAX) begin
        wsel[i]  = w_mem[int'(rc) + i][rw[ZW-1:0]].q;
        nwsel[i] = w_mem[int'(rc) + i][rw[ZW-1:0]].n;
      end else begin
        wsel[i]  = '0;
        nwsel[i] = '0;
      end
    end

  dsp_array #(.NDSP(NDSP), .ACC_W(ACC_W), .INT_W(INT_W), .SH_W(SH_W)) u_dsp (
    .clk, .rst_n, .in_valid(red_issue), .t(tl_rd), .w(wsel), .nw(nwsel),
    .out_valid(prod_valid), .prod(prod)
  );

  adder_tree #(.N(NDSP), .IW(PW), .OW(TW)) u_tree (
    .clk, .rst_n, .in_valid(prod_valid), .in_data(prod),
    .out_valid(tree_valid), .sum(tree_sum)
  );

  // tags travelling with the two pipeline stages
  typedef struct packed {
    logic          first;
    logic          last;
    logic [ZW:0]   w;
    logic [EW:0]   k;
  } tag_t;
  tag_t tag_in, tag_d1, tag_d2;
  logic signed [SUMW-1:0] acc, acc_next;

  assign tag_in = '{first: (rc == '0),
                    last:  (rc + PAIR_W'(NDSP) >= npairs),
                    w: rw, k: rk};

  always_ff @(posedge clk) begin
    tag_d1 <= tag_in;
    tag_d2 <= tag_d1;
  end

  localparam logic signed [SUMW-1:0] OMAX = SUMW'((1 << (FIX_W - 1)) - 1);
  localparam logic signed [SUMW-1:0] OMIN = -SUMW'(1 << (FIX_W - 1));

  assign acc_next = (tag_d2.first ? '0 : acc) + SUMW'(tree_sum);

  always_ff @(posedge clk) begin
    if (tree_valid) begin
      acc <= acc_next;
      if (tag_d2.last && int'(tag_d2.w) < MZ_MAX && int'(tag_d2.k) < NE) begin
        if (acc_next > OMAX)      oz_mem[tag_d2.w[ZW-1:0]][tag_d2.k] <= OMAX[FIX_W-1:0];
        else if (acc_next < OMIN) oz_mem[tag_d2.w[ZW-1:0]][tag_d2.k] <= OMIN[FIX_W-1:0];
        else                      oz_mem[tag_d2.w[ZW-1:0]][tag_d2.k] <= acc_next[FIX_W-1:0];
      end
    end
  end

  // ---------------- output read ----------------
  logic [ZW-1:0] ra_w;
  logic [EW-1:0] ra_k;
  assign ra_w = rd_addr[EW+ZW-1:EW];
  assign ra_k = rd_addr[EW-1:0];

  always_ff @(posedge clk)
    rd_data <= (int'(ra_k) < NE) ? oz_mem[ra_w][ra_k] : '0;

  // ---------------- controller ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      v           <= '0;
      g_base      <= '0;
      kc          <= '0;
      ptr         <= '0;
      drain       <= '0;
      rw          <= '0;
      rk          <= '0;
      rc          <= '0;
      stat_lpe    <= '0;
      stat_bypass <= '0;
    end else begin
      if (dec_head)                stat_lpe    <= stat_lpe + 1;
      if (dec_body && !dec_fresh)  stat_bypass <= stat_bypass + 1;
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          v           <= '0;
          g_base      <= '0;
          kc          <= '0;
          stat_lpe    <= '0;
          stat_bypass <= '0;
          state       <= S_CLEAR;
        end
        S_CLEAR: begin
          if (kc + 1 >= cfg_nz) begin
            kc    <= '0;
            ptr   <= '0;
            state <= (cfg_cg_len == '0) ? S_DRAIN : S_STREAM;
            drain <= '0;
          end else begin
            kc <= kc + 1;
          end
        end
        S_STREAM: begin
          if (ptr + 1 >= cfg_cg_len) begin
            drain <= '0;
            state <= S_DRAIN;
          end else begin
            ptr <= ptr + 1;
          end
        end
        S_DRAIN: begin
          if (drain == 2'd1) begin
            if (g_base + UW'(ROWS) < cfg_mx) begin
              g_base <= g_base + UW'(ROWS);
              state  <= S_CLEAR;
            end else if (v + 1 < cfg_my) begin
              g_base <= '0;
              v      <= v + 1;
              state  <= S_CLEAR;
            end else begin
              rw    <= '0;
              rk    <= '0;
              rc    <= '0;
              state <= S_REDUCE;
            end
          end else begin
            drain <= drain + 1;
          end
        end
        S_REDUCE: begin
          if (rc + PAIR_W'(NDSP) < npairs) begin
            rc <= rc + PAIR_W'(NDSP);
          end else begin
            rc <= '0;
            if (rk + 1 < cfg_nz) begin
              rk <= rk + 1;
            end else begin
              rk <= '0;
              if (rw + 1 < cfg_mz) rw <= rw + 1;
              else begin
                drain <= '0;
                state <= S_RDRAIN;
              end
            end
          end
        end
        S_RDRAIN: begin
          if (drain == 2'd1) state <= S_DONE;
          else               drain <= drain + 1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);

endmodule
