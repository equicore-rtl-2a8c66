// Self-checking test of clk_bridge with a core clock at twice the
// peripheral clock (aligned rising edges): every word or start registered
// on the peripheral side must appear once, for one core cycle, with its
// fields intact; back-to-back words and idle gaps are both exercised.
module tb_clk_bridge;
  import equicore_pkg::*;
  localparam int NC = 4;
  logic clk_core = 0, clk_periph = 0, rst_n = 0;
  always #5 clk_core = ~clk_core;
  always @(posedge clk_core) clk_periph <= ~clk_periph;

  logic p_tgl, p_start, c_start;
  logic [NC-1:0] p_wr_en, c_wr_en;
  buf_sel_e p_wr_buf, c_wr_buf;
  logic [ADDR_W-1:0] p_wr_addr, c_wr_addr;
  logic [CGW_W-1:0] p_wr_raw, c_wr_raw;
  logic [INT_W-1:0] p_wr_q, c_wr_q;
  logic [SH_W-1:0] p_wr_n, c_wr_n;
  int checks = 0, failures = 0;
  int sent = 0, seen = 0, starts_sent = 0, starts_seen = 0;
  logic [ADDR_W-1:0] fifo [$];
  logic sfifo [$];

  clk_bridge #(.N_CORES(NC)) dut (.clk_core, .rst_n, .p_tgl, .p_wr_en, .p_wr_buf, .p_wr_addr,
    .p_wr_raw, .p_wr_q, .p_wr_n, .p_start, .c_wr_en, .c_wr_buf, .c_wr_addr, .c_wr_raw,
    .c_wr_q, .c_wr_n, .c_start);

  initial begin
    repeat (100000) @(posedge clk_core);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // peripheral side: a register bank like the memory controller's
  initial begin
    p_tgl = 0; p_start = 0; p_wr_en = '0; p_wr_buf = BUF_IX; p_wr_addr = '0;
    p_wr_raw = '0; p_wr_q = '0; p_wr_n = '0;
    repeat (4) @(posedge clk_periph);
    rst_n <= 1;
    repeat (2) @(posedge clk_periph);
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk_periph);
      if ($urandom_range(0, 2) != 0) begin
        logic [ADDR_W-1:0] a;
        a = ADDR_W'($urandom);
        p_tgl     <= ~p_tgl;
        begin
          logic st = $urandom_range(0, 7) == 0;
          p_start <= st;
          sfifo.push_back(st);
          if (st) starts_sent++;
        end
        p_wr_en   <= NC'($urandom_range(1, (1 << NC) - 1));
        p_wr_buf  <= buf_sel_e'($urandom_range(0, 4));
        p_wr_addr <= a;
        p_wr_raw  <= CGW_W'(a) ^ 20'h5a5a5;
        p_wr_q    <= a[7:0];
        p_wr_n    <= a[10:8];
        fifo.push_back(a);
        sent++;
      end
    end
    repeat (4) @(posedge clk_periph);
    checks++;
    if (seen != sent || fifo.size() != 0 || sent < 1000 || starts_seen != starts_sent || starts_sent == 0) begin
      failures++;
      $display("FAIL sent %0d seen %0d", sent, seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // core side: each word exactly once, in order, with matching fields
  always @(posedge clk_core) begin
    #1;
    if (rst_n && c_wr_en != '0) begin
      logic [ADDR_W-1:0] a;
      checks++;
      if (fifo.size() == 0) begin
        failures++;
        $display("FAIL extra word");
      end else begin
        a = fifo.pop_front();
        seen++;
        if (sfifo.pop_front() != c_start) begin
          failures++;
          $display("FAIL start flag");
        end
        if (c_start) starts_seen++;
        if (c_wr_addr != a || c_wr_raw != (CGW_W'(a) ^ 20'h5a5a5) || c_wr_q != a[7:0] || c_wr_n != a[10:8]) begin
          failures++;
          $display("FAIL word %0h got %0h", a, c_wr_addr);
        end
      end
    end
  end
endmodule
