// Self-checking test of cg_decoder: a stream of heads each followed by a
// random number of bodies; checks head_fire/idx/idy, body fields and the
// fresh (first body) / bypass (reused) marking.
module tb_cg_decoder;
  import equicore_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid;
  cg_word_t in_word;
  logic head_fire, body_fire, fresh;
  logic [7:0] idx, idy;
  cg_body_t body;
  int checks = 0, failures = 0;
  int n_fresh = 0, n_reuse = 0;

  cg_decoder dut (.clk, .rst_n, .in_valid, .in_word, .head_fire, .idx, .idy,
                  .body_fire, .body, .fresh);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] hx, hy;
    cg_body_t   b;
    int         nb;
    in_valid = 0; in_word = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int h = 0; h < 200; h++) begin
      hx = 8'($urandom_range(0, 10)); hy = 8'($urandom_range(0, 10));
      @(negedge clk);
      in_valid = 1;
      in_word  = '{is_head: 1'b1, payload: 19'({hx, hy})};
      #1;
      chk(head_fire && !body_fire && idx == hx && idy == hy, "head");
      nb = $urandom_range(1, 4);
      for (int j = 0; j < nb; j++) begin
        @(negedge clk);
        // an idle cycle in between must not disturb the group
        if ($urandom_range(0, 3) == 0) begin
          in_valid = 0; #1;
          chk(!head_fire && !body_fire, "idle");
          @(negedge clk);
        end
        b = '{value: 8'($urandom), ncg: 3'($urandom), idz: 8'($urandom_range(0, 10))};
        in_valid = 1;
        in_word  = '{is_head: 1'b0, payload: 19'(b)};
        #1;
        chk(body_fire && !head_fire && body == b && idx == hx && idy == hy, "body fields");
        chk(fresh == (j == 0), "fresh flag");
        if (fresh) n_fresh++; else n_reuse++;
      end
    end
    @(negedge clk); in_valid = 0;
    chk(n_fresh == 200 && n_reuse > 0, "fresh and reuse both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
