// memory_chip: one smart-memory chip of the Pixel-planes frame buffer.
//
// A chip holds a 2^X_LSB by 2^Y_LSB block of pixel cells, its own copy of
// the part of the x and y multiplier trees that serves that block, the
// address registers that say where the block lies on the screen, and the
// row read-out for display refresh. All chips are identical and receive the
// same broadcast: four coefficient bit streams (A, B, C', C'') and the
// control lines.
//
// Data path: the x-multiplier (chain of X_MSB stages set by the chip's x
// address, then a tree of X_LSB levels) puts A*x + C' on each pixel column,
// the y-multiplier puts B*y + C'' on each pixel row, and every cell adds the
// two. The control lines are delayed by the multiplier latency (TOTAL+1
// clocks) so that each cell sees them aligned with its bits; a broadcast
// word therefore takes effect in the cells TOTAL+1 clocks after it enters
// the chip, and words may follow back to back.
//
// Addressing: two addr_init links take the x address from the left
// neighbour and the y address from the neighbour below and pass address+1
// on to the right and upwards. The same registers set the multiplier chains
// and are compared with the broadcast refresh address.
//
// Read-out: when scan_load is high and scan_xchip / the high bits of scan_y
// match this chip, row scan_y[Y_LSB-1:0] is loaded into the shift register
// and the chip becomes the one driving `video` (zero otherwise) until the
// next scan_load. The x and y trees must have the same total depth, as on
// the document's 512 x 512 layout (5+4 and 4+5 levels).
module memory_chip
  import pp_pkg::*;
#(
  parameter int unsigned X_MSB = 5,   // x address bits of the chip (32 chips across)
  parameter int unsigned X_LSB = 4,   // 16 pixel columns per chip
  parameter int unsigned Y_MSB = 4,   // y address bits of the chip (16 chips up)
  parameter int unsigned Y_LSB = 5,   // 32 pixel rows per chip
  parameter int unsigned L     = pp_pkg::L_BITS,
  parameter int unsigned M     = pp_pkg::M_BITS,
  localparam int unsigned TOTAL = X_MSB + X_LSB,
  localparam int unsigned COLS  = 1 << X_LSB,
  localparam int unsigned ROWS  = 1 << Y_LSB,
  localparam int unsigned PW    = 3 * M
) (
  input  logic               clk,
  input  logic               rst_n,
  // coefficient broadcast
  input  logic               a_in,
  input  logic               b_in,
  input  logic               c1_in,
  input  logic               c2_in,
  input  grid_ctl_t          ctl_in,
  // address chain: R = row direction (x address), C = column direction (y)
  input  logic               r_start_in,
  input  logic               r_bit_in,
  output logic               r_start_out,
  output logic               r_bit_out,
  input  logic               c_start_in,
  input  logic               c_bit_in,
  output logic               c_start_out,
  output logic               c_bit_out,
  output logic [X_MSB-1:0]   x_addr,
  output logic [Y_MSB-1:0]   y_addr,
  // display refresh
  input  logic               scan_load,
  input  logic               scan_shift,
  input  logic [X_MSB-1:0]   scan_xchip,
  input  logic [Y_MSB+Y_LSB-1:0] scan_y,
  output logic [PW-1:0]      video
);
  logic x_valid, y_valid;

  addr_init #(.ABITS(X_MSB)) u_xaddr (
    .clk, .rst_n, .start_in(r_start_in), .bit_in(r_bit_in),
    .start_out(r_start_out), .bit_out(r_bit_out), .addr(x_addr), .valid(x_valid)
  );
  addr_init #(.ABITS(Y_MSB)) u_yaddr (
    .clk, .rst_n, .start_in(c_start_in), .bit_in(c_bit_in),
    .start_out(c_start_out), .bit_out(c_bit_out), .addr(y_addr), .valid(y_valid)
  );

  // Multiplier trees.
  logic [COLS-1:0] xline;
  logic [ROWS-1:0] yline;

  mult_tree #(.MSB_BITS(X_MSB), .LSB_BITS(X_LSB)) u_xmul (
    .clk, .sof(ctl_in.sof), .a_in(a_in), .c_in(c1_in), .addr(x_addr), .out(xline)
  );
  mult_tree #(.MSB_BITS(Y_MSB), .LSB_BITS(Y_LSB)) u_ymul (
    .clk, .sof(ctl_in.sof), .a_in(b_in), .c_in(c2_in), .addr(y_addr), .out(yline)
  );

  // Control lines delayed to match the multiplier latency.
  grid_ctl_t ctl_d [TOTAL+2];
  always_comb ctl_d[0] = ctl_in;
  for (genvar k = 1; k <= TOTAL + 1; k++) begin : g_ctl
    always_ff @(posedge clk) begin
      if (!rst_n) ctl_d[k] <= '{op: OP_NOP, default: 1'b0};
      else        ctl_d[k] <= ctl_d[k-1];
    end
  end

  // Pixel array.
  logic [ROWS-1:0][COLS-1:0][PW-1:0] pix;
  for (genvar j = 0; j < ROWS; j++) begin : g_row
    for (genvar i = 0; i < COLS; i++) begin : g_col
      logic en_unused;
      pixel_cell #(.L(L), .M(M)) u_cell (
        .clk, .ctl(ctl_d[TOTAL+1]), .xin(xline[i]), .yin(yline[j]),
        .p_out(pix[j][i]), .en_out(en_unused)
      );
    end
  end

  // Display read-out.
  logic          sel_q;
  logic [PW-1:0] row_pix;

  row_scan #(.ROW_BITS(Y_LSB), .COLS(COLS), .PW(PW)) u_scan (
    .clk, .pix(pix), .row(scan_y[Y_LSB-1:0]), .load(scan_load),
    .shift(scan_shift), .dout(row_pix)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) sel_q <= 1'b0;
    else if (scan_load)
      sel_q <= x_valid && y_valid && scan_xchip == x_addr &&
               scan_y[Y_MSB+Y_LSB-1:Y_LSB] == y_addr;
  end

  always_comb video = sel_q ? row_pix : '0;

  if (X_MSB + X_LSB != Y_MSB + Y_LSB) begin : g_bad
    $error("memory_chip: x and y multiplier trees must have the same depth");
  end

endmodule
