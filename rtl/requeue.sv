// requeue: input unit of the pre-processor. It turns the host's vertex
// stream into triangles that share the polygon's first vertex.
//
// The host sends the vertices of each convex polygon in counter-clockwise
// order, without repeating the first one, and marks the last with `last`.
// The unit keeps the first vertex and the previous one; from the third
// vertex on, every vertex v_k yields the triangle (v_1, v_{k-1}, v_k), so an
// n-sided polygon becomes n-2 triangles. Scene control words (new scene,
// end of scene) pass through in order. Polygons of fewer than three
// vertices yield nothing.
//
// Interface: valid/ready on both sides; one registered output slot, so a
// triangle appears the clock after its last vertex is accepted. The
// fan-of-triangles order is the document's; emitting each triangle as one
// parallel word is this design's choice.
module requeue
  import pp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  host_item_t in_item,
  output logic       out_valid,
  input  logic       out_ready,
  output tri_item_t  out_item
);
  vertex_t    first_q, prev_q;
  logic [1:0] cnt_q;   // vertices of the current polygon seen, saturating at 2

  always_comb in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (in_item.kind == HOST_VERTEX) begin
          if (cnt_q == 2'd0) first_q <= in_item.v;
          prev_q <= in_item.v;
          if (cnt_q == 2'd2) begin
            out_valid     <= 1'b1;
            out_item.kind <= HOST_VERTEX;
            out_item.v1   <= first_q;
            out_item.v2   <= prev_q;
            out_item.v3   <= in_item.v;
          end
          if (in_item.last)        cnt_q <= 2'd0;
          else if (cnt_q != 2'd2)  cnt_q <= cnt_q + 2'd1;
        end else begin
          out_valid     <= 1'b1;
          out_item      <= '0;
          out_item.kind <= in_item.kind;
          cnt_q         <= 2'd0;
        end
      end
    end
  end

endmodule
