// coef_broadcast: puts coefficient sets on the memory grid bit-serially.
//
// Each coefficient set is sent as four parallel bit streams, A, B, C' and
// C'', least significant bit first, with the control lines of
// pp_pkg::grid_ctl_t: the operation, sof on the first bit, eof on the last
// (sign) bit, and keep on the low bits that the cell stores (L for depth, M
// for colour). The stream length is the document's: K+N+2 clocks for an
// edge, L+N+2 for depth, M+N+2 for each colour; control words (CLEAR_Z,
// SWAP) take one clock. The next set is taken during the last bit of the
// current one, so sets follow without gaps and a triangle takes exactly
// 3(K+N+2) + (L+N+2) + 3(M+N+2) clocks. Sending only the low bits of each
// coefficient is exact because the cells compute modulo 2^length.
//
// Interface: in_valid/in_ready from the pre-processor; outputs are
// registered and go to every memory chip.
module coef_broadcast
  import pp_pkg::*;
#(
  parameter int unsigned N = pp_pkg::SCREEN_BITS,
  parameter int unsigned K = pp_pkg::K_BITS,
  parameter int unsigned L = pp_pkg::L_BITS,
  parameter int unsigned M = pp_pkg::M_BITS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  coef_word_t in_word,
  output logic       a_out,
  output logic       b_out,
  output logic       c1_out,
  output logic       c2_out,
  output grid_ctl_t  ctl_out,
  output logic       busy
);
  localparam int unsigned CW = $clog2(COEF_W + 1);

  coef_word_t    w_q;
  logic [CW-1:0] idx_q;    // index of the bit on the outputs
  logic [CW-1:0] len_q;
  logic [CW-1:0] keep_q;
  logic          act_q;
  logic          last;

  function automatic logic [CW-1:0] len_of(op_t op);
    case (op)
      OP_EDGE_FIRST, OP_EDGE:    return CW'(K + N + 2);
      OP_ZPLANE:                 return CW'(L + N + 2);
      OP_RED, OP_GREEN, OP_BLUE: return CW'(M + N + 2);
      default:                   return CW'(1);
    endcase
  endfunction

  function automatic logic [CW-1:0] keep_of(op_t op);
    case (op)
      OP_ZPLANE:                 return CW'(L);
      OP_RED, OP_GREEN, OP_BLUE: return CW'(M);
      default:                   return '0;
    endcase
  endfunction

  always_comb begin
    last     = act_q && (idx_q == len_q - 1'b1);
    in_ready = !act_q || last;
    busy     = act_q;
    a_out    = act_q && w_q.a[0];
    b_out    = act_q && w_q.b[0];
    c1_out   = act_q && w_q.c1[0];
    c2_out   = act_q && w_q.c2[0];
    ctl_out.op   = act_q ? w_q.op : OP_NOP;
    ctl_out.sof  = act_q && idx_q == '0;
    ctl_out.eof  = last;
    ctl_out.keep = act_q && idx_q < keep_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      act_q <= 1'b0;
      idx_q <= '0;
    end else if (in_valid && in_ready) begin
      act_q  <= 1'b1;
      w_q    <= in_word;
      idx_q  <= '0;
      len_q  <= len_of(in_word.op);
      keep_q <= keep_of(in_word.op);
    end else if (act_q) begin
      if (last) act_q <= 1'b0;
      idx_q <= idx_q + 1'b1;
      w_q.a  <= w_q.a  >>> 1;
      w_q.b  <= w_q.b  >>> 1;
      w_q.c1 <= w_q.c1 >>> 1;
      w_q.c2 <= w_q.c2 >>> 1;
    end
  end

endmodule
