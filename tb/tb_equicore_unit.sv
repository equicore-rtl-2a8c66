// Self-checking test of equicore_unit (reduced buffer sizes).
//
// Random Int8 irreps, weights and a random sparse CG tensor packed into the
// Head/Body stream (groups of 1 to 3 overlapped non-zeros) are loaded, the
// unit is started, and every I_z element is compared with a direct
// evaluation of sum_(u,v) W * sum_(i,j) CG * I_x * I_y with the same
// shift-based dequantization. Also checks the cycle count against the
// schedule, the L-PE/bypass counters, and covers a partial row group
// (m_x not a multiple of 8), several I_y rows, more than 32 pairs (several
// DSP-array chunks) and output saturation.
module tb_equicore_unit;
  import equicore_pkg::*;
  localparam int MX_MAX = 24, MY_MAX = 3, MZ_MAX = 8, CG_DEPTH = 128, L_MAX = 3;
  localparam int NE = 2 * L_MAX + 1, EW = $clog2(NE), ZW = $clog2(MZ_MAX);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, start, busy, done;
  buf_sel_e wr_buf;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [CGW_W-1:0] wr_raw;
  logic [INT_W-1:0] wr_q;
  logic [SH_W-1:0] wr_n;
  logic [FIX_W-1:0] rd_data;
  logic [31:0] stat_lpe, stat_bypass;
  int checks = 0, failures = 0;
  int n_unsat = 0, n_partial = 0, n_multi_y = 0, n_chunks = 0, n_bypass = 0, n_sat = 0;

  equicore_unit #(.MX_MAX(MX_MAX), .MY_MAX(MY_MAX), .MZ_MAX(MZ_MAX),
                  .CG_DEPTH(CG_DEPTH), .L_MAX(L_MAX)) dut (
    .clk, .rst_n, .wr_en, .wr_buf, .wr_addr, .wr_raw, .wr_q, .wr_n,
    .start, .busy, .done, .rd_addr, .rd_data, .stat_lpe, .stat_bypass);

  // test data
  int ix [MX_MAX][NE]; int nx [MX_MAX];
  int iy [MY_MAX][NE]; int ny [MY_MAX];
  int wq [MX_MAX*MY_MAX][MZ_MAX]; int wn [MX_MAX*MY_MAX][MZ_MAX];
  logic [CGW_W-1:0] cg [CG_DEPTH];
  int cg_len, n_heads, n_bodies;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input buf_sel_e b, input int a, input logic [CGW_W-1:0] raw,
                    input int q, input int n);
    @(negedge clk);
    wr_en = 1; wr_buf = b; wr_addr = ADDR_W'(a); wr_raw = raw; wr_q = INT_W'(q); wr_n = SH_W'(n);
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic run_case(input int mx, input int my, input int mz, input int nz,
                          input int nx_dim, input int ny_dim, input bit big);
    longint T [MX_MAX*MY_MAX][NE];
    longint acc, expv;
    int cycles, passes, chunks, exp_cycles, np;
    cg_body_t b;
    int nb, used;
    // ---- data ----
    for (int u = 0; u < mx; u++) begin
      nx[u] = $urandom_range(6, 7);
      for (int e = 0; e < NE; e++) ix[u][e] = big ? 127 : int'($urandom_range(0, 127)) - 64;
    end
    for (int v = 0; v < my; v++) begin
      ny[v] = $urandom_range(6, 7);
      for (int e = 0; e < NE; e++) iy[v][e] = big ? 127 : int'($urandom_range(0, 127)) - 64;
    end
    for (int p = 0; p < mx*my; p++)
      for (int w = 0; w < mz; w++) begin
        wq[p][w] = big ? 127 : int'($urandom_range(0, 127)) - 64;
        wn[p][w] = big ? 0 : $urandom_range(6, 7);
      end
    // sparse CG: each (i,j) present with probability 1/2, 1..3 distinct id_z
    cg_len = 0; n_heads = 0; n_bodies = 0;
    for (int i = 0; i < nx_dim; i++)
      for (int j = 0; j < ny_dim; j++) begin
        if ($urandom_range(0, 1) == 0 && !(i == 0 && j == 0)) continue;
        if (cg_len + 4 > CG_DEPTH) continue;
        cg[cg_len++] = {1'b1, 3'b0, 8'(i), 8'(j)};
        n_heads++;
        nb = $urandom_range(1, (nz < 3) ? nz : 3);
        used = 0;
        for (int m = 0; m < nb; m++) begin
          int z;
          do z = $urandom_range(0, nz - 1); while (used[z]);
          used[z] = 1;
          b.value = big ? 8'sd127 : 8'(int'($urandom_range(1, 127)) - 64);
          b.ncg   = big ? 3'd0 : 3'($urandom_range(6, 7));
          b.idz   = 8'(z);
          cg[cg_len++] = {1'b0, b};
          n_bodies++;
        end
      end
    // ---- load ----
    wr(BUF_CFG, CFG_MX, CGW_W'(mx), 0, 0);
    wr(BUF_CFG, CFG_MY, CGW_W'(my), 0, 0);
    wr(BUF_CFG, CFG_MZ, CGW_W'(mz), 0, 0);
    wr(BUF_CFG, CFG_NZ, CGW_W'(nz), 0, 0);
    wr(BUF_CFG, CFG_CG_LEN, CGW_W'(cg_len), 0, 0);
    for (int u = 0; u < mx; u++) for (int e = 0; e < nx_dim; e++) wr(BUF_IX, (u << EW) | e, '0, ix[u][e], nx[u]);
    for (int v = 0; v < my; v++) for (int e = 0; e < ny_dim; e++) wr(BUF_IY, (v << EW) | e, '0, iy[v][e], ny[v]);
    for (int p = 0; p < mx*my; p++) for (int w = 0; w < mz; w++) wr(BUF_W, (p << ZW) | w, '0, wq[p][w], wn[p][w]);
    for (int a = 0; a < cg_len; a++) wr(BUF_CG, a, cg[a], 0, 0);
    // ---- reference ----
    for (int p = 0; p < MX_MAX*MY_MAX; p++) for (int k = 0; k < NE; k++) T[p][k] = 0;
    begin
      int hi, hj;
      hi = 0; hj = 0;
      for (int a = 0; a < cg_len; a++) begin
        if (cg[a][19]) begin hi = int'(cg[a][15:8]); hj = int'(cg[a][7:0]); end
        else begin
          b = cg_body_t'(cg[a][18:0]);
          for (int v = 0; v < my; v++)
            for (int u = 0; u < mx; u++)
              T[v*mx+u][b.idz] += (longint'(ix[u][hi]) * iy[v][hj] * int'(b.value) * 4096)
                                   >>> (nx[u] + ny[v] + int'(b.ncg));
        end
      end
    end
    // ---- run ----
    @(negedge clk);
    start = 1;
    @(posedge clk);
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(posedge clk); #1; if (!done) cycles++; end
    passes = my * ((mx + 7) / 8);
    np = mx * my;
    chunks = (np + 31) / 32;
    exp_cycles = passes * (nz + cg_len + 2) + mz * nz * chunks + 2;
    chk(cycles == exp_cycles, $sformatf("cycle count %0d expected %0d", cycles, exp_cycles));
    chk(stat_lpe == 32'(n_heads * passes), $sformatf("L-PE count %0d", stat_lpe));
    chk(stat_bypass == 32'((n_bodies - n_heads) * passes), $sformatf("bypass count %0d", stat_bypass));
    if (mx % 8 != 0) n_partial++;
    if (my > 1) n_multi_y++;
    if (chunks > 1) n_chunks++;
    if (stat_bypass > 0) n_bypass++;
    // ---- compare ----
    for (int w = 0; w < mz; w++)
      for (int k = 0; k < nz; k++) begin
        acc = 0;
        for (int p = 0; p < np; p++) acc += (T[p][k] * wq[p][w]) >>> wn[p][w];
        expv = acc;
        if (expv > 32767) begin expv = 32767; n_sat++; end
        if (expv < -32768) begin expv = -32768; n_sat++; end
        if (expv > -32768 && expv < 32767 && expv != 0) n_unsat++;
        @(negedge clk);
        rd_addr = ADDR_W'((w << EW) | k);
        @(negedge clk);
        chk(longint'(signed'(rd_data)) == expv,
            $sformatf("I_z[%0d][%0d] = %0d expected %0d", w, k, signed'(rd_data), expv));
      end
  endtask

  initial begin
    wr_en = 0; start = 0; wr_buf = BUF_IX; wr_addr = '0; wr_raw = '0; wr_q = '0; wr_n = '0; rd_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_case(13, 2, 5, 3, 3, 3, 0);   // l=1 x l=1 -> l=1, partial group, two I_y rows
    run_case(16, 1, 8, 5, 5, 3, 0);   // l=2 x l=1 -> l=2
    run_case(24, 3, 4, 7, 7, 7, 0);   // l=3, 72 pairs: three DSP-array chunks
    run_case(8, 1, 2, 3, 3, 3, 1);    // large values: output saturates
    chk(n_unsat > 70 && n_partial > 0 && n_multi_y > 0 && n_chunks > 0 && n_bypass > 0 && n_sat > 0,
        $sformatf("coverage unsaturated=%0d partial=%0d multi_y=%0d chunks=%0d bypass=%0d sat=%0d",
                  n_unsat, n_partial, n_multi_y, n_chunks, n_bypass, n_sat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
