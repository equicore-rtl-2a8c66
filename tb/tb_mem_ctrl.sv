// Self-checking test of mem_ctrl: unicast and broadcast write enables,
// quantization of irrep/weight words (and pass-through of CG/config
// words), the registered one-cycle write path, the clip counter and the
// read multiplexer, and the hand-over toggle that flips with each word or
// start.
module tb_mem_ctrl;
  import equicore_pkg::*;
  localparam int NC = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_valid, wr_bcast, start, c_start, c_tgl, tgl_before;
  logic [2:0] wr_core, rd_core;
  buf_sel_e wr_buf, c_wr_buf;
  logic [ADDR_W-1:0] wr_addr, c_wr_addr;
  logic [CGW_W-1:0] wr_data, c_wr_raw;
  logic [SH_W-1:0] wr_shift, c_wr_n;
  logic [NC-1:0] c_wr_en;
  logic [INT_W-1:0] c_wr_q;
  logic [FIX_W-1:0] c_rd_data [NC];
  logic [FIX_W-1:0] rd_data;
  logic [31:0] sat_count;
  int checks = 0, failures = 0, clips = 0;

  mem_ctrl #(.N_CORES(NC)) dut (.clk, .rst_n, .wr_valid, .wr_bcast, .wr_core, .wr_buf,
    .wr_addr, .wr_data, .wr_shift, .start, .c_wr_en, .c_wr_buf, .c_wr_addr, .c_wr_raw, .c_wr_q,
    .c_wr_n, .c_start, .c_tgl, .rd_core, .c_rd_data, .rd_data, .sat_count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int qref(input logic signed [15:0] x, input int n, output bit c);
    real r = real'(x) * real'(1 << n) / 4096.0;
    int e = (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
    c = 0;
    if (e > 127) begin e = 127; c = 1; end
    if (e < -128) begin e = -128; c = 1; end
    return e;
  endfunction

  initial begin
    bit c;
    int e;
    logic [NC-1:0] exp_en;
    wr_valid = 0; start = 0; wr_bcast = 0; wr_core = 0; wr_buf = BUF_IX; wr_addr = 0; wr_data = 0; wr_shift = 0; rd_core = 0;
    for (int i = 0; i < NC; i++) c_rd_data[i] = FIX_W'(1000 + i);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      wr_valid = $urandom_range(0, 4) != 0;
      wr_bcast = $urandom_range(0, 2) == 0;
      wr_core  = 3'($urandom_range(0, NC - 1));
      wr_buf   = buf_sel_e'($urandom_range(0, 4));
      wr_addr  = ADDR_W'($urandom);
      wr_data  = CGW_W'($urandom);
      wr_shift = 3'($urandom);
      start    = $urandom_range(0, 9) == 0;
      tgl_before = c_tgl;
      e = qref(wr_data[15:0], wr_shift, c);
      exp_en = '0;
      for (int i = 0; i < NC; i++) exp_en[i] = wr_valid && (wr_bcast || wr_core == 3'(i));
      if (wr_valid && wr_buf inside {BUF_IX, BUF_IY, BUF_W} && c) clips++;
      @(negedge clk);
      chk(c_wr_en == exp_en, "write enable");
      chk(c_start == start && c_tgl == (tgl_before ^ (wr_valid | start)), "start and toggle");
      chk(c_wr_buf == wr_buf && c_wr_addr == wr_addr && c_wr_raw == wr_data && c_wr_n == wr_shift, "fields");
      chk(int'(signed'(c_wr_q)) == e, $sformatf("quantized %0d expected %0d", signed'(c_wr_q), e));
      wr_valid = 0; start = 0;
    end
    chk(sat_count == 32'(clips) && clips > 0, $sformatf("clip count %0d expected %0d", sat_count, clips));
    for (int i = 0; i < NC; i++) begin
      rd_core = 3'(i); #1;
      chk(rd_data == FIX_W'(1000 + i), "read mux");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
