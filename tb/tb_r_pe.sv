// Self-checking test of r_pe: packed product by the CG value and merged
// shift, t = floor(op * value * 2^12 / 2^n), against plain integer math;
// latency one cycle, id_z and valid carried along.
module tb_r_pe;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic signed [15:0] op0, op1;
  logic signed [7:0] value;
  logic [4:0] n0, n1;
  logic [7:0] idz_in, idz_out;
  logic signed [39:0] t0, t1;
  int checks = 0, failures = 0;

  r_pe dut (.clk, .rst_n, .in_valid, .op0, .op1, .value, .n0, .n1, .idz_in,
            .out_valid, .idz_out, .t0, .t1);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_t(input longint o, input longint v, input int n);
    longint s = o * v * 4096;
    return s >>> n;   // floor division by 2^n
  endfunction

  task automatic run(input logic signed [15:0] a0, input logic signed [15:0] a1,
                     input logic signed [7:0] v, input logic [4:0] s0, input logic [4:0] s1);
    longint e0, e1;
    logic [7:0] z;
    z = 8'($urandom);
    @(negedge clk);
    in_valid = 1; op0 = a0; op1 = a1; value = v; n0 = s0; n1 = s1; idz_in = z;
    e0 = ref_t(a0, v, s0); e1 = ref_t(a1, v, s1);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || idz_out != z || longint'(t0) != e0 || longint'(t1) != e1) begin
      failures++;
      $display("FAIL %0d,%0d x %0d >> %0d,%0d -> %0d,%0d exp %0d,%0d", a0, a1, v, s0, s1, t0, t1, e0, e1);
    end
  endtask

  initial begin
    in_valid = 0; op0 = 0; op1 = 0; value = 0; n0 = 0; n1 = 0; idz_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(16384, -16384, -128, 0, 21);
    run(-16256, 16384, 127, 21, 0);
    run(-1, -1, 1, 3, 5);
    for (int i = 0; i < 3000; i++)
      run(16'(int'($urandom_range(0, 32768)) - 16384), 16'(int'($urandom_range(0, 32768)) - 16384),
          8'($urandom), 5'($urandom_range(0, 21)), 5'($urandom_range(0, 21)));
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
