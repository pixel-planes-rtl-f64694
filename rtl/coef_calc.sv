// coef_calc: coefficient unit of the pre-processor. It turns one triangle
// into the seven coefficient sets the memory system needs.
//
// For a counter-clockwise triangle (v1, v2, v3) it emits, in order:
//   three edges 1-2, 2-3, 3-1, each with
//       A = -(y_j - y_i),  B = x_j - x_i,  C' = -x_i*A,  C'' = -y_i*B,
//     so that F(x,y) >= 0 on the inner side (the first edge carries
//     OP_EDGE_FIRST, which also re-enables every cell);
//   the depth plane and the red, green and blue planes, each from the cross
//   product of the edges v1->v2 and v2->v3:
//       a = dy1*dq2 - dy2*dq1,  b = dq1*dx2 - dq2*dx1,  c = dx1*dy2 - dx2*dy1,
//       A = -a/c,  B = -b/c,  C' = -A*x1,  C'' = -B*y1 + q1,
//     q standing for z, R, G or B in turn; c is shared by all four planes.
// A new-scene word becomes OP_CLEAR_Z and an end-of-scene word OP_SWAP.
//
// The eight divisions run in parallel in serial dividers, started when the
// triangle is taken and finished (NW clocks) while the three edges are
// being sent, so the unit does not slow the memory system down. Triangles
// with c <= 0 (clockwise or degenerate) cover no pixel and are dropped.
// The formulas are the document's. Integer coefficients (slopes rounded
// toward zero), the parallel dividers and the dropping of empty triangles
// are this design's choices.
//
// Interface: valid/ready on both sides. A triangle is taken only when the
// unit is idle; its first word is offered two clocks later.
module coef_calc
  import pp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  tri_item_t  in_item,
  output logic       out_valid,
  input  logic       out_ready,
  output coef_word_t out_word
);
  localparam int unsigned DIW = L_BITS + 2;           // width of a difference
  localparam int unsigned NW  = COEF_W;               // divider numerator
  localparam int unsigned DW  = 2 * SCREEN_BITS + 3;  // divider denominator

  typedef enum logic [3:0] {
    S_IDLE, S_CMD, S_START, S_EDGE0, S_EDGE1, S_EDGE2,
    S_PLANE0, S_PLANE1, S_PLANE2, S_PLANE3
  } state_t;

  state_t    st_q;
  tri_item_t t_q;

  // Vertex attributes as signed numbers: [vertex][0:x 1:y 2:z 3:r 4:g 5:b]
  logic signed [DIW-1:0] va [3][6];
  always_comb begin
    for (int v = 0; v < 3; v++) begin
      vertex_t vx;
      vx = (v == 0) ? t_q.v1 : (v == 1) ? t_q.v2 : t_q.v3;
      va[v][0] = DIW'(vx.x);
      va[v][1] = DIW'(vx.y);
      va[v][2] = DIW'(vx.z);
      va[v][3] = DIW'(vx.r);
      va[v][4] = DIW'(vx.g);
      va[v][5] = DIW'(vx.b);
    end
  end

  // Sign-extend a difference to the coefficient width before multiplying.
  function automatic logic signed [COEF_W-1:0] wide(logic signed [DIW-1:0] v);
    return COEF_W'(v);
  endfunction

  // Cross-product terms.
  logic signed [DIW-1:0]    dx1, dy1, dx2, dy2;
  logic signed [DIW-1:0]    dq1 [4], dq2 [4];
  logic signed [COEF_W-1:0] pa [4], pb [4], pc;
  always_comb begin
    dx1 = va[1][0] - va[0][0];
    dy1 = va[1][1] - va[0][1];
    dx2 = va[2][0] - va[1][0];
    dy2 = va[2][1] - va[1][1];
    pc  = wide(dx1) * wide(dy2) - wide(dx2) * wide(dy1);
    for (int q = 0; q < 4; q++) begin
      dq1[q] = va[1][q+2] - va[0][q+2];
      dq2[q] = va[2][q+2] - va[1][q+2];
      pa[q]  = wide(dy1) * wide(dq2[q]) - wide(dy2) * wide(dq1[q]);
      pb[q]  = wide(dq1[q]) * wide(dx2) - wide(dq2[q]) * wide(dx1);
    end
  end

  // Dividers: [2q] gives A = -a/c, [2q+1] gives B = -b/c.
  logic                     div_start;
  logic [7:0]               div_busy, div_done_unused;
  logic signed [NW-1:0]     quot [8];
  for (genvar d = 0; d < 8; d++) begin : g_div
    serial_divider #(.NW(NW), .DW(DW)) u_div (
      .clk, .rst_n, .start(div_start),
      .num((d % 2 == 0) ? -pa[d/2] : -pb[d/2]),
      .den(pc[DW-1:0]),
      .busy(div_busy[d]), .done(div_done_unused[d]), .quot(quot[d])
    );
  end

  always_comb div_start = (st_q == S_START) && (pc > 0);

  // Output word of the current state.
  always_comb begin
    int unsigned i, j, q;
    out_word = '0;
    out_valid = 1'b0;
    i = 0; j = 1; q = 0;
    case (st_q)
      S_CMD: begin
        out_valid   = 1'b1;
        out_word.op = (t_q.kind == HOST_NEW_SCENE) ? OP_CLEAR_Z : OP_SWAP;
      end
      S_EDGE0, S_EDGE1, S_EDGE2: begin
        out_valid = 1'b1;
        i = (st_q == S_EDGE0) ? 0 : (st_q == S_EDGE1) ? 1 : 2;
        j = (i == 2) ? 0 : i + 1;
        out_word.op = (st_q == S_EDGE0) ? OP_EDGE_FIRST : OP_EDGE;
        out_word.a  = COEF_W'(va[i][1]) - COEF_W'(va[j][1]);
        out_word.b  = COEF_W'(va[j][0]) - COEF_W'(va[i][0]);
        out_word.c1 = -(COEF_W'(va[i][0]) * out_word.a);
        out_word.c2 = -(COEF_W'(va[i][1]) * out_word.b);
      end
      S_PLANE0, S_PLANE1, S_PLANE2, S_PLANE3: begin
        q = int'(st_q) - int'(S_PLANE0);
        out_valid   = (div_busy == '0);
        out_word.op = op_t'(int'(OP_ZPLANE) + q);
        out_word.a  = quot[2*q];
        out_word.b  = quot[2*q+1];
        out_word.c1 = -(quot[2*q] * COEF_W'(va[0][0]));
        out_word.c2 = -(quot[2*q+1] * COEF_W'(va[0][1])) + COEF_W'(va[0][q+2]);
      end
      default: ;
    endcase
  end

  always_comb in_ready = (st_q == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q <= S_IDLE;
    end else begin
      case (st_q)
        S_IDLE:
          if (in_valid) begin
            t_q  <= in_item;
            st_q <= (in_item.kind == HOST_VERTEX) ? S_START : S_CMD;
          end
        S_CMD:    if (out_ready) st_q <= S_IDLE;
        S_START:  st_q <= (pc > 0) ? S_EDGE0 : S_IDLE;
        S_PLANE3: if (out_valid && out_ready) st_q <= S_IDLE;
        default:  if (out_valid && out_ready) st_q <= state_t'(int'(st_q) + 1);
      endcase
    end
  end

endmodule
