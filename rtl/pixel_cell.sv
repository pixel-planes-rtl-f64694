// pixel_cell: one pixel of the smart frame buffer, with its own bit-serial
// arithmetic.
//
// Every clock the cell receives one bit of Ax+C' on its column line and one
// bit of By+C'' on its row line (least significant bit first) together with
// the broadcast control lines of pp_pkg::grid_ctl_t. A one-bit adder forms
// F(x,y) = Ax + By + C' + C'' bit by bit. A second one-bit adder, the
// comparator, forms F - Z against the depth stored in the cell, Z being
// read out bit by bit from the circulating Z register.
//
// Registers: Z (depth, L bits, all ones = farthest), F (depth of the current
// polygon, L bits), I (image being painted: red, green, blue portions of M
// bits), P (image on display, loaded from I) and the one-bit enable En.
// What each operation does, at the last (sign) bit of its stream:
//   OP_EDGE_FIRST  En <= (F >= 0)          (all cells re-enabled, then edge)
//   OP_EDGE        En <= En & (F >= 0)
//   OP_ZPLANE      if En and F < Z: Z <= F, else En <= 0
//   OP_RED/GREEN/BLUE  enabled cells shift the low M bits of F into I
//   OP_CLEAR_Z     Z <= all ones            (one-cycle control word)
//   OP_SWAP        P <= I                   (one-cycle control word)
// F and the colour portion take the low stream bits while `keep` is high;
// Z circulates during the same bits so that it lines up with F.
//
// The register set, the two adders, the sign tests and the sequence of
// operations are the document's. Folding "set all enables" into the first
// edge word, the tie rule (F = Z counts as hidden) and the encodings are
// this design's choices. There is no reset: CLEAR_Z and the first edge of
// every polygon initialise what is read.
module pixel_cell
  import pp_pkg::*;
#(
  parameter int unsigned L = pp_pkg::L_BITS,
  parameter int unsigned M = pp_pkg::M_BITS
) (
  input  logic            clk,
  input  grid_ctl_t       ctl,
  input  logic            xin,    // serial Ax + C'
  input  logic            yin,    // serial By + C''
  output logic [3*M-1:0]  p_out,  // displayed colour {B, G, R}
  output logic            en_out
);
  logic [L-1:0]          z_q, f_q;
  logic [2:0][M-1:0]     i_q;     // [0] red, [1] green, [2] blue
  logic [2:0][M-1:0]     p_q;
  logic                  en_q;

  logic f_bit, z_bit, d_bit;

  // F = (Ax + C') + (By + C'')
  serial_adder #(.CIN0(1'b0)) u_fadd (
    .clk(clk), .first(ctl.sof), .a(xin), .b(yin), .s(f_bit)
  );

  // Comparator: F - Z = F + ~Z + 1, Z zero-extended beyond its L bits.
  always_comb z_bit = ctl.keep ? z_q[0] : 1'b0;
  serial_adder #(.CIN0(1'b1)) u_cmp (
    .clk(clk), .first(ctl.sof), .a(f_bit), .b(~z_bit), .s(d_bit)
  );

  always_ff @(posedge clk) begin
    unique case (ctl.op)
      OP_EDGE_FIRST: if (ctl.eof) en_q <= ~f_bit;
      OP_EDGE:       if (ctl.eof) en_q <= en_q & ~f_bit;
      OP_ZPLANE: begin
        if (ctl.keep) begin
          z_q <= {z_q[0], z_q[L-1:1]};
          f_q <= {f_bit, f_q[L-1:1]};
        end
        if (ctl.eof) begin
          if (en_q && d_bit) z_q  <= f_q;   // F < Z: visible, update depth
          else               en_q <= 1'b0;  // hidden
        end
      end
      OP_RED, OP_GREEN, OP_BLUE: begin
        if (ctl.keep && en_q) begin
          for (int c = 0; c < 3; c++)
            if (ctl.op == op_t'(int'(OP_RED) + c))
              i_q[c] <= {f_bit, i_q[c][M-1:1]};
        end
      end
      OP_CLEAR_Z:    z_q <= '1;
      OP_SWAP:       p_q <= i_q;
      default: ;
    endcase
  end

  always_comb begin
    p_out  = p_q;
    en_out = en_q;
  end

endmodule
