// Decoder of the reorganized CG stream (sparse-bypass format).
//
// Non-zero CG elements that share the same (id_x, id_y) position but differ
// in id_z are packed behind one Head word; each carries a Body word with
// the Int8 Value, its shift n_cg and id_z. On a Head the decoder latches
// (id_x, id_y) and raises head_fire so the operands are fetched and the
// L-PE product is formed once. On each Body it raises body_fire together
// with the body fields; fresh is 1 for the first body after a head and 0
// for the following ones, which reuse the held L-PE product (bypass).
// The Head/Body split, field widths and reuse follow the paper; the 20-bit
// word encoding and the Head-first order are this design's choice.
// Combinational outputs; the latched head and fresh flag update on clk.
module cg_decoder
  import equicore_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  cg_word_t        in_word,
  output logic            head_fire,
  output logic [ID_W-1:0] idx,
  output logic [ID_W-1:0] idy,
  output logic            body_fire,
  output cg_body_t        body,
  output logic            fresh
);
  cg_head_t head_q, head_w;
  logic     fresh_q;

  assign head_w    = cg_head_t'(in_word.payload);
  assign head_fire = in_valid && in_word.is_head;
  assign body_fire = in_valid && !in_word.is_head;
  assign body      = cg_body_t'(in_word.payload);
  assign idx       = head_fire ? head_w.idx : head_q.idx;
  assign idy       = head_fire ? head_w.idy : head_q.idy;
  assign fresh     = fresh_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_q  <= '0;
      fresh_q <= 1'b0;
    end else if (head_fire) begin
      head_q  <= head_w;
      fresh_q <= 1'b1;
    end else if (body_fire) begin
      fresh_q <= 1'b0;
    end
  end
endmodule
