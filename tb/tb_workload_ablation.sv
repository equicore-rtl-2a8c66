// Ablation workloads on one equicore_unit at its default sizes.
//
// Order sweep: l_x = l_y = l_z = l for l = 0..5 with every multiplicity 8.
// Multiplicity sweep: l = 3 with m_x = m_y = m_z = 4, 8, 16 (larger m need
// more I_y rows than the unit holds). The CG non-zero pattern is that of
// real spherical harmonics: (m1, m2) can couple to m3 only when
// |m3| = |m1| + |m2| or |m3| = ||m1| - |m2||, so one (i, j) feeds up to two
// k and the stream has overlapped bodies. Values are random Int8.
// Every output is compared with a direct evaluation, the cycle count with
// the schedule, and the cycles, L-PE firings and bypasses are printed.
module tb_workload_ablation;
  import equicore_pkg::*;
  localparam int MX_MAX = 128, MY_MAX = 16, MZ_MAX = 128, CG_DEPTH = 512, L_MAX = 5;
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

  equicore_unit dut (
    .clk, .rst_n, .wr_en, .wr_buf, .wr_addr, .wr_raw, .wr_q, .wr_n,
    .start, .busy, .done, .rd_addr, .rd_data, .stat_lpe, .stat_bypass);

  // test data
  int ix [MX_MAX][NE]; int nx [MX_MAX];
  int iy [MY_MAX][NE]; int ny [MY_MAX];
  int wq [MX_MAX*MY_MAX][MZ_MAX]; int wn [MX_MAX*MY_MAX][MZ_MAX];
  logic [CGW_W-1:0] cg [CG_DEPTH];
  int cg_len, n_heads, n_bodies;

  initial begin
    repeat (2000000) @(posedge clk);
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
    // CG pattern of the real basis (see header); l = (dim - 1) / 2
    cg_len = 0; n_heads = 0; n_bodies = 0;
    for (int i = 0; i < nx_dim; i++)
      for (int j = 0; j < ny_dim; j++) begin
        int a1, a2, first;
        a1 = (i > (nx_dim-1)/2) ? i - (nx_dim-1)/2 : (nx_dim-1)/2 - i;
        a2 = (j > (ny_dim-1)/2) ? j - (ny_dim-1)/2 : (ny_dim-1)/2 - j;
        first = 1;
        for (int z = 0; z < nz; z++) begin
          int a3 = (z > (nz-1)/2) ? z - (nz-1)/2 : (nz-1)/2 - z;
          if (a3 != a1 + a2 && a3 != ((a1 > a2) ? a1 - a2 : a2 - a1)) continue;
          if (first) begin
            cg[cg_len++] = {1'b1, 3'b0, 8'(i), 8'(j)};
            n_heads++;
            first = 0;
          end
          b.value = 8'(int'($urandom_range(1, 127)) - 64);
          b.ncg   = 3'($urandom_range(6, 7));
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
    $display("l=(%0d,%0d,%0d) m=(%0d,%0d,%0d): %0d CG words, %0d L-PE, %0d bypassed, %0d cycles",
             (nx_dim-1)/2, (ny_dim-1)/2, (nz-1)/2, mx, my, mz, cg_len, stat_lpe, stat_bypass, cycles);
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
    for (int l = 0; l <= 5; l++) run_case(8, 8, 8, 2*l+1, 2*l+1, 2*l+1, 0);
    run_case(4, 4, 4, 7, 7, 7, 0);
    run_case(16, 16, 16, 7, 7, 7, 0);
    chk(n_unsat > 300 && n_bypass > 0, $sformatf("unsaturated=%0d bypass runs=%0d", n_unsat, n_bypass));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
