// Self-checking test of bram_tiles: clears, concurrent accumulations from
// 8 lanes (including repeated hits on one entry in back-to-back cycles) and
// wide reads, against a shadow array.
module tb_bram_tiles;
  localparam int PAIRS = 64, NE = 11, ROWS = 8, NDSP = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic clear;
  logic [ROWS-1:0] wr_en;
  logic [6:0] wr_pair [ROWS];
  logic [7:0] wr_k, rd_k;
  logic signed [39:0] wr_val [ROWS];
  logic [6:0] rd_pair;
  logic signed [39:0] rd_data [NDSP];
  longint shadow [PAIRS][NE];
  int checks = 0, failures = 0;

  bram_tiles #(.ROWS(ROWS), .PAIRS(PAIRS), .NE(NE), .NDSP(NDSP), .PAIR_W(7)) dut (
    .clk, .clear, .wr_en, .wr_pair, .wr_k, .wr_val, .rd_pair, .rd_k, .rd_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int c = 0; c < PAIRS; c += NDSP)
      for (int k = 0; k < NE; k++) begin
        @(negedge clk);
        wr_en = '0; rd_pair = 7'(c); rd_k = 8'(k);
        #1;
        for (int i = 0; i < NDSP; i++) begin
          checks++;
          if (longint'(rd_data[i]) != shadow[c+i][k]) begin
            failures++;
            $display("FAIL pair %0d k %0d: %0d exp %0d", c+i, k, rd_data[i], shadow[c+i][k]);
          end
        end
      end
  endtask

  initial begin
    int base;
    clear = 0; wr_en = '0; wr_k = 0; rd_k = 0; rd_pair = 0;
    for (int r = 0; r < ROWS; r++) begin wr_pair[r] = '0; wr_val[r] = '0; end
    // clear everything
    for (int b = 0; b < PAIRS; b += ROWS)
      for (int k = 0; k < NE; k++) begin
        @(negedge clk);
        clear = 1; wr_en = '1; wr_k = 8'(k);
        for (int r = 0; r < ROWS; r++) begin wr_pair[r] = 7'(b + r); shadow[b+r][k] = 0; end
      end
    @(negedge clk); clear = 0; wr_en = '0;
    read_all();
    // accumulate
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      base = $urandom_range(0, PAIRS/ROWS - 1) * ROWS;
      wr_k = 8'($urandom_range(0, (t % 3 == 0) ? 0 : NE - 1));
      for (int r = 0; r < ROWS; r++) begin
        wr_en[r]   = $urandom_range(0, 3) != 0;
        wr_pair[r] = 7'(base + r);
        wr_val[r]  = 40'(int'($urandom) >>> 8);
        if (wr_en[r]) shadow[base+r][wr_k] += longint'(wr_val[r]);
      end
    end
    @(negedge clk); wr_en = '0;
    read_all();
    // clear one group again
    for (int k = 0; k < NE; k++) begin
      @(negedge clk);
      clear = 1; wr_en = '1; wr_k = 8'(k);
      for (int r = 0; r < ROWS; r++) begin wr_pair[r] = 7'(8 + r); shadow[8+r][k] = 0; end
    end
    @(negedge clk); clear = 0; wr_en = '0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
