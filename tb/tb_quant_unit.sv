// Self-checking test of quant_unit: random and corner inputs against
// round(x * 2^n / 2^12) with ties away from zero, clipped to Int8.
module tb_quant_unit;
  logic signed [15:0] x;
  logic [2:0]         n;
  logic signed [7:0]  q;
  logic               sat;
  int checks = 0, failures = 0;

  quant_unit dut (.x, .n, .q, .sat);

  task automatic check(input logic signed [15:0] xi, input logic [2:0] ni);
    real    r;
    int     e;
    logic   es;
    x = xi; n = ni;
    #1;
    r = real'(xi) * real'(1 << ni) / 4096.0;
    e = (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
    es = 0;
    if (e > 127)  begin e = 127;  es = 1; end
    if (e < -128) begin e = -128; es = 1; end
    checks++;
    if (int'(q) != e || sat != es) begin
      failures++;
      $display("FAIL x=%0d n=%0d q=%0d sat=%0d expected %0d/%0d", xi, ni, q, sat, e, es);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'sd0, 3'd0);
    check(16'sd2048, 3'd0);   // 0.5 -> 1 (tie away from zero)
    check(-16'sd2048, 3'd0);  // -0.5 -> -1
    check(-16'sd3277, 3'd4);  // -0.8 * 16
    check(16'sd1229, 3'd4);   // 0.3 * 16
    check(16'sd32767, 3'd7);  // clip high
    check(-16'sd32768, 3'd7); // clip low
    for (int i = 0; i < 3000; i++) check(16'($urandom), 3'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
