// End-to-end test of equicore_top at reduced sizes (3 units).
//
// Each case broadcasts the configuration, a CG stream and the weights to
// all units, loads different 16-bit fixed-point irreps into each unit
// (quantized on the way in, some large enough to clip), runs all units,
// and compares every output element of every unit with a reference that
// quantizes with real arithmetic and evaluates the CGTP directly. The
// cycle count is checked against the schedule. Cases: the l=1 x l=1 -> l=1
// product with quantized CG values (+-1/sqrt(6) -> +-52 with n_cg = 7),
// and random sparse CG tensors with overlapped non-zeros at l = 2 and 3.
// Mechanisms counted (each must occur): broadcast and unicast loads,
// quantizer clipping, L-PE firing, L-PE bypass on overlapped CG entries,
// partial row group, several I_y rows, several DSP-array chunks.
module tb_equicore_top;
  import equicore_pkg::*;
  localparam int NC = 3, MX_MAX = 24, MY_MAX = 3, MZ_MAX = 8, CG_DEPTH = 160, L_MAX = 3;
  localparam int CORE_W = 2;
  localparam int NE = 2 * L_MAX + 1, EW = $clog2(NE), ZW = $clog2(MZ_MAX);

  // core clock at twice the peripheral clock, rising edges aligned
  logic clk_core = 0, clk_periph = 0, rst_n = 0;
  always #5 clk_core = ~clk_core;
  always @(posedge clk_core) clk_periph <= ~clk_periph;
  logic wr_valid, wr_bcast, start, busy, done;
  logic [CORE_W-1:0] wr_core, rd_core;
  buf_sel_e wr_buf;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [CGW_W-1:0] wr_data;
  logic [SH_W-1:0] wr_shift;
  logic [FIX_W-1:0] rd_data;
  logic [31:0] sat_count, stat_lpe, stat_bypass;

  equicore_top #(.N_CORES(NC), .MX_MAX(MX_MAX), .MY_MAX(MY_MAX), .MZ_MAX(MZ_MAX),
                 .CG_DEPTH(CG_DEPTH), .L_MAX(L_MAX)) dut (
    .clk_core, .clk_periph, .rst_n, .wr_valid, .wr_bcast, .wr_core, .wr_buf, .wr_addr, .wr_data, .wr_shift,
    .start, .busy, .done, .rd_core, .rd_addr, .rd_data, .sat_count, .stat_lpe, .stat_bypass);

  int checks = 0, failures = 0;
  int m_unsat = 0, m_bcast = 0, m_ucast = 0, m_clip = 0, m_lpe = 0, m_bypass = 0, m_partial = 0, m_multi_y = 0, m_chunks = 0;

  // quantized copies, as the reference sees them
  int ix [NC][MX_MAX][NE]; int nx [NC][MX_MAX];
  int iy [NC][MY_MAX][NE]; int ny [NC][MY_MAX];
  int wq [MX_MAX*MY_MAX][MZ_MAX]; int wn [MX_MAX*MY_MAX][MZ_MAX];
  logic [CGW_W-1:0] cg [CG_DEPTH];
  int cg_len, n_heads, n_bodies;

  initial begin
    repeat (400000) @(posedge clk_periph);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // round(x * 2^n / 2^12) to nearest, ties away from zero, clipped to Int8
  function automatic int quant(input int x, input int n);
    real r = real'(x) * real'(1 << n) / 4096.0;
    int e = (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
    if (e > 127) e = 127;
    if (e < -128) e = -128;
    return e;
  endfunction

  task automatic put(input bit bc, input int core, input buf_sel_e b, input int a,
                     input logic [CGW_W-1:0] d, input int n);
    @(negedge clk_periph);
    wr_valid = 1; wr_bcast = bc; wr_core = CORE_W'(core); wr_buf = b;
    wr_addr = ADDR_W'(a); wr_data = d; wr_shift = SH_W'(n);
    if (bc) m_bcast++; else m_ucast++;
  endtask

  task automatic idle();
    @(negedge clk_periph);
    wr_valid = 0;
  endtask

  // random fixed-point value; one in 16 is large enough to clip
  function automatic int rnd_fix();
    if ($urandom_range(0, 15) == 0) return int'($urandom_range(0, 65535)) - 32768;
    return int'($urandom_range(0, 4095)) - 2048;
  endfunction

  task automatic run_case(input int mx, input int my, input int mz,
                          input int lx, input int ly, input int lz, input bit levi);
    int nxd, nyd, nz, np, passes, chunks, exp_cycles, cycles;
    int sat0;
    cg_body_t b;
    longint T [MX_MAX*MY_MAX][NE];
    longint acc;
    nxd = 2*lx + 1; nyd = 2*ly + 1; nz = 2*lz + 1; np = mx * my;
    // ---- CG stream ----
    cg_len = 0; n_heads = 0; n_bodies = 0;
    for (int i = 0; i < nxd; i++)
      for (int j = 0; j < nyd; j++) begin
        if (levi) begin
          // l=1 x l=1 -> l=1: non-zero where i, j, k are all different
          if (i == j) continue;
          cg[cg_len++] = {1'b1, 3'b0, 8'(i), 8'(j)};
          n_heads++;
          b.idz = 8'(3 - i - j);
          b.value = (((i + 1) % 3) == j) ? 8'sd52 : -8'sd52;
          b.ncg = 3'd7;
          cg[cg_len++] = {1'b0, b};
          n_bodies++;
        end else begin
          int nb, used;
          if ($urandom_range(0, 2) == 0 && !(i == 0 && j == 0)) continue;
          if (cg_len + 4 > CG_DEPTH) continue;
          cg[cg_len++] = {1'b1, 3'b0, 8'(i), 8'(j)};
          n_heads++;
          nb = $urandom_range(1, 3);
          used = 0;
          for (int m = 0; m < nb; m++) begin
            int z;
            do z = $urandom_range(0, nz - 1); while (used[z]);
            used[z] = 1;
            b.value = 8'($urandom_range(1, 255));
            b.ncg = 3'($urandom_range(6, 7));
            b.idz = 8'(z);
            cg[cg_len++] = {1'b0, b};
            n_bodies++;
          end
        end
      end
    // ---- broadcast: config, CG, weights ----
    sat0 = int'(sat_count);
    put(1, 0, BUF_CFG, CFG_MX, CGW_W'(mx), 0);
    put(1, 0, BUF_CFG, CFG_MY, CGW_W'(my), 0);
    put(1, 0, BUF_CFG, CFG_MZ, CGW_W'(mz), 0);
    put(1, 0, BUF_CFG, CFG_NZ, CGW_W'(nz), 0);
    put(1, 0, BUF_CFG, CFG_CG_LEN, CGW_W'(cg_len), 0);
    for (int a = 0; a < cg_len; a++) put(1, 0, BUF_CG, a, cg[a], 0);
    for (int p = 0; p < np; p++)
      for (int w = 0; w < mz; w++) begin
        int x, n;
        x = rnd_fix(); n = $urandom_range(0, 7);
        wq[p][w] = quant(x, n); wn[p][w] = n;
        put(1, 0, BUF_W, (p << ZW) | w, CGW_W'(x), n);
      end
    // ---- per unit: irreps ----
    for (int c = 0; c < NC; c++) begin
      for (int u = 0; u < mx; u++) begin
        nx[c][u] = $urandom_range(0, 7);
        for (int e = 0; e < nxd; e++) begin
          int x = rnd_fix();
          ix[c][u][e] = quant(x, nx[c][u]);
          put(0, c, BUF_IX, (u << EW) | e, CGW_W'(x), nx[c][u]);
        end
      end
      for (int v = 0; v < my; v++) begin
        ny[c][v] = $urandom_range(0, 7);
        for (int e = 0; e < nyd; e++) begin
          int x = rnd_fix();
          iy[c][v][e] = quant(x, ny[c][v]);
          put(0, c, BUF_IY, (v << EW) | e, CGW_W'(x), ny[c][v]);
        end
      end
    end
    idle();
    @(negedge clk_periph);
    if (int'(sat_count) > sat0) m_clip++;
    // ---- run ----
    start = 1;
    @(posedge clk_periph);
    @(negedge clk_periph);
    start = 0;
    // count core cycles from the falling peripheral edge after start was
    // registered; the clock hand-over adds one core cycle to the unit's count
    cycles = 0;
    do begin @(posedge clk_core); #1; cycles++; end while (!done || cycles < 2);
    passes = my * ((mx + 7) / 8);
    chunks = (np + 31) / 32;
    exp_cycles = passes * (nz + cg_len + 2) + mz * nz * chunks + 2 + 1;
    chk(cycles == exp_cycles, $sformatf("cycles %0d expected %0d", cycles, exp_cycles));
    if (mx % 8 != 0) m_partial++;
    if (my > 1) m_multi_y++;
    if (chunks > 1) m_chunks++;
    // ---- compare every unit ----
    for (int c = 0; c < NC; c++) begin
      int hi, hj;
      for (int p = 0; p < np; p++) for (int k = 0; k < NE; k++) T[p][k] = 0;
      hi = 0; hj = 0;
      for (int a = 0; a < cg_len; a++) begin
        if (cg[a][19]) begin hi = int'(cg[a][15:8]); hj = int'(cg[a][7:0]); end
        else begin
          b = cg_body_t'(cg[a][18:0]);
          for (int v = 0; v < my; v++)
            for (int u = 0; u < mx; u++)
              T[v*mx+u][b.idz] += (longint'(ix[c][u][hi]) * iy[c][v][hj] * int'(b.value) * 4096)
                                   >>> (nx[c][u] + ny[c][v] + int'(b.ncg));
        end
      end
      @(negedge clk_periph);
      rd_core = CORE_W'(c);
      @(negedge clk_periph);
      chk(stat_lpe == 32'(n_heads * passes), $sformatf("unit %0d L-PE count %0d", c, stat_lpe));
      chk(stat_bypass == 32'((n_bodies - n_heads) * passes), $sformatf("unit %0d bypass count %0d", c, stat_bypass));
      if (stat_lpe > 0) m_lpe++;
      if (stat_bypass > 0) m_bypass++;
      for (int w = 0; w < mz; w++)
        for (int k = 0; k < nz; k++) begin
          acc = 0;
          for (int p = 0; p < np; p++) acc += (T[p][k] * wq[p][w]) >>> wn[p][w];
          if (acc > 32767) acc = 32767;
          if (acc < -32768) acc = -32768;
          if (acc > -32768 && acc < 32767 && acc != 0) m_unsat++;
          @(negedge clk_periph);
          rd_addr = ADDR_W'((w << EW) | k);
          @(negedge clk_periph);
          chk(longint'(signed'(rd_data)) == acc,
              $sformatf("unit %0d I_z[%0d][%0d] = %0d expected %0d", c, w, k, signed'(rd_data), acc));
        end
    end
  endtask

  initial begin
    wr_valid = 0; wr_bcast = 0; wr_core = '0; wr_buf = BUF_IX; wr_addr = '0; wr_data = '0;
    wr_shift = '0; start = 0; rd_core = '0; rd_addr = '0;
    repeat (3) @(posedge clk_periph);
    rst_n = 1;
    run_case(16, 2, 8, 1, 1, 1, 1);   // l=1 x l=1 -> l=1, exact CG signs
    run_case(13, 1, 5, 2, 1, 2, 0);   // partial group, random sparse CG
    run_case(24, 3, 4, 3, 3, 3, 0);   // l=3, 72 pairs
    chk(m_unsat > 150, $sformatf("%0d outputs in range and non-zero", m_unsat));
    chk(m_bcast > 0,   "mechanism: broadcast load");
    chk(m_ucast > 0,   "mechanism: unicast load");
    chk(m_clip > 0,    "mechanism: quantizer clip");
    chk(m_lpe > 0,     "mechanism: L-PE product");
    chk(m_bypass > 0,  "mechanism: L-PE bypass on overlapped CG");
    chk(m_partial > 0, "mechanism: partial row group");
    chk(m_multi_y > 0, "mechanism: several I_y rows");
    chk(m_chunks > 0,  "mechanism: several DSP-array chunks");
    $display("mechanisms: bcast=%0d ucast=%0d clip=%0d lpe=%0d bypass=%0d partial=%0d multi_y=%0d chunks=%0d",
             m_bcast, m_ucast, m_clip, m_lpe, m_bypass, m_partial, m_multi_y, m_chunks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
