// Self-checking test of adder_tree: random signed inputs summed by a loop,
// one-cycle latency, with N = 32 (the paper's DSP count) and N = 5.
module tb_adder_tree;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, ov32, ov5;
  logic signed [47:0] d32 [32];
  logic signed [47:0] d5 [5];
  logic signed [52:0] s32;
  logic signed [50:0] s5;
  int checks = 0, failures = 0;

  adder_tree #(.N(32), .IW(48)) dut32 (.clk, .rst_n, .in_valid, .in_data(d32), .out_valid(ov32), .sum(s32));
  adder_tree #(.N(5),  .IW(48)) dut5  (.clk, .rst_n, .in_valid, .in_data(d5),  .out_valid(ov5),  .sum(s5));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e32, e5;
    in_valid = 0;
    foreach (d32[i]) d32[i] = '0;
    foreach (d5[i]) d5[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      e32 = 0; e5 = 0;
      for (int i = 0; i < 32; i++) begin
        d32[i] = 48'(signed'({$urandom, $urandom}) >>> 20);
        e32 += longint'(d32[i]);
      end
      for (int i = 0; i < 5; i++) begin
        d5[i] = (t == 0) ? -48'sd140737488355328 : 48'(signed'({$urandom, $urandom}) >>> 16);
        e5 += longint'(d5[i]);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!ov32 || !ov5 || longint'(s32) != e32 || longint'(s5) != e5) begin
        failures++;
        $display("FAIL sum %0d/%0d exp %0d/%0d", s32, s5, e32, e5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
