// Self-checking test of l_pe: the packed multiply must give x0*y and x1*y
// exactly for all sign combinations, one cycle after en, and hold its
// products while en is low.
module tb_l_pe;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  logic signed [7:0] x0, x1, y;
  logic signed [15:0] op0, op1;
  int checks = 0, failures = 0;

  l_pe dut (.clk, .en, .x0, .x1, .y, .op0, .op1);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic signed [7:0] a0, input logic signed [7:0] a1,
                     input logic signed [7:0] b);
    int e0, e1;
    @(negedge clk);
    en = 1; x0 = a0; x1 = a1; y = b;
    e0 = int'(a0) * int'(b); e1 = int'(a1) * int'(b);
    @(negedge clk);
    en = 0; x0 = 8'($urandom); x1 = 8'($urandom); y = 8'($urandom);
    checks++;
    if (int'(op0) != e0 || int'(op1) != e1) begin
      failures++;
      $display("FAIL %0d,%0d x %0d -> %0d,%0d", a0, a1, b, op0, op1);
    end
    @(negedge clk);   // held while en is low
    checks++;
    if (int'(op0) != e0 || int'(op1) != e1) begin
      failures++;
      $display("FAIL hold");
    end
  endtask

  initial begin
    en = 0; x0 = 0; x1 = 0; y = 0;
    run(-128, -128, -128);
    run(127, -128, 127);
    run(-1, 1, -1);
    run(-1, 0, 1);
    run(0, -1, 1);
    for (int i = 0; i < 3000; i++) run(8'($urandom), 8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
