// Self-checking test of dsp_array: each lane's (t * w) >> n_w against
// integer math, one-cycle latency.
module tb_dsp_array;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic signed [39:0] t [32];
  logic signed [7:0]  w [32];
  logic [2:0]         nw [32];
  logic signed [47:0] prod [32];
  int checks = 0, failures = 0;

  dsp_array dut (.clk, .rst_n, .in_valid, .t, .w, .nw, .out_valid, .prod);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e [32];
    in_valid = 0;
    for (int i = 0; i < 32; i++) begin t[i] = '0; w[i] = '0; nw[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 500; r++) begin
      @(negedge clk);
      for (int i = 0; i < 32; i++) begin
        t[i]  = 40'(signed'({$urandom, $urandom}) >>> 24);
        w[i]  = 8'($urandom);
        nw[i] = 3'($urandom);
        e[i]  = (longint'(t[i]) * longint'(w[i])) >>> nw[i];
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (!out_valid || longint'(prod[i]) != e[i]) begin
          failures++;
          $display("FAIL lane %0d: %0d exp %0d", i, prod[i], e[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
