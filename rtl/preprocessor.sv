// preprocessor: converts the host's polygon stream into coefficient sets.
//
// Two units in a row: requeue splits each convex n-sided polygon into n-2
// triangles sharing the first vertex, and coef_calc turns every triangle
// into three edge sets, a depth-plane set and three colour-plane sets
// (A, B, C', C''), passing scene control words through in order.
// Both ends use valid/ready. The split into these two units is the
// document's.
module preprocessor
  import pp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  host_item_t in_item,
  output logic       out_valid,
  input  logic       out_ready,
  output coef_word_t out_word,
  output logic       busy     // a word is held somewhere inside
);
  logic      t_valid, t_ready;
  tri_item_t t_item;

  requeue u_requeue (
    .clk, .rst_n, .in_valid, .in_ready, .in_item,
    .out_valid(t_valid), .out_ready(t_ready), .out_item(t_item)
  );

  coef_calc u_coef (
    .clk, .rst_n, .in_valid(t_valid), .in_ready(t_ready), .in_item(t_item),
    .out_valid, .out_ready, .out_word
  );

  always_comb busy = t_valid || !t_ready;

endmodule
