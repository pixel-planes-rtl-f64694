// pixel_planes: the Pixel-planes raster engine, from polygon vertices to
// displayable frame buffer.
//
// The host (which has already transformed, clipped, perspective-scaled and
// lit the polygons) sends vertices in display coordinates with their colour.
// The pre-processor turns every polygon into triangles and every triangle
// into coefficient sets (A, B, C', C''); the broadcast unit sends each set
// bit-serially to all memory chips at once. In every chip, the multiplier
// trees evaluate Ax + C' and By + C'' for all columns and rows, and each
// pixel cell adds them to get F(x,y) = Ax + By + C' + C'' for its own (x,y),
// all pixels in parallel. Three edge sets leave only the pixels inside the
// triangle enabled, the depth set runs the z-buffer test, and the three
// colour sets paint the surviving pixels. At the end of a scene every
// pixel's painted image is copied into its display register, which the
// refresh controller reads through the scan port.
//
// Array: CHIPS_X x CHIPS_Y identical chips, each of 2^CELL_XBITS x
// 2^CELL_YBITS cells. The document's 512 x 512 example is 32 x 16 chips of
// 16 x 32 cells; the default here keeps its 16 x 32 chip but has 8 x 4
// chips (a 128 x 128 screen), because linting the full array needs far
// more memory than common machines have. Chip addresses are set at start-up by the
// serial address chain (start with addr_start; the chain outputs of the
// right-hand column and the top row are brought out so that they can be
// checked: they carry CHIPS_X and CHIPS_Y).
//
// Refresh: on scan_load the chip holding row scan_y of chip column
// scan_xchip loads that row of its pixels; each scan_shift then moves the
// next pixel (left to right) onto `video`. The refresh controller and the
// display are outside this design.
//
// Timing: a triangle occupies the grid for 3(K+N+2) + (L+N+2) + 3(M+N+2)
// clocks; its effect reaches the cells TOTAL+1 clocks after it leaves the
// broadcast unit, where TOTAL is the screen's address width.
module pixel_planes
  import pp_pkg::*;
#(
  parameter int unsigned CHIP_XBITS = 3,  // 8 chips across (document: 32)
  parameter int unsigned CHIP_YBITS = 2,  // 4 chips up (document: 16)
  parameter int unsigned CELL_XBITS = 4,  // 16 cells across a chip
  parameter int unsigned CELL_YBITS = 5,  // 32 cells up a chip
  localparam int unsigned CHIPS_X   = 1 << CHIP_XBITS,
  localparam int unsigned CHIPS_Y   = 1 << CHIP_YBITS,
  localparam int unsigned YBITS     = CHIP_YBITS + CELL_YBITS,
  localparam int unsigned PW        = 3 * M_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host polygon stream
  input  logic                  host_valid,
  output logic                  host_ready,
  input  host_item_t            host_item,
  output logic                  busy,        // work still on its way to the grid
  // chip address chain
  input  logic                  addr_start,
  output logic [CHIPS_Y-1:0]    xchain_start_out,  // right-hand edge
  output logic [CHIPS_Y-1:0]    xchain_bit_out,
  output logic [CHIPS_X-1:0]    ychain_start_out,  // top edge
  output logic [CHIPS_X-1:0]    ychain_bit_out,
  // display refresh
  input  logic                  scan_load,
  input  logic                  scan_shift,
  input  logic [CHIP_XBITS-1:0] scan_xchip,
  input  logic [YBITS-1:0]      scan_y,
  output logic [PW-1:0]         video
);
  // Pre-processor and broadcast.
  logic       cw_valid, cw_ready, pre_busy, bc_busy;
  coef_word_t cw;

  preprocessor u_pre (
    .clk, .rst_n, .in_valid(host_valid), .in_ready(host_ready), .in_item(host_item),
    .out_valid(cw_valid), .out_ready(cw_ready), .out_word(cw), .busy(pre_busy)
  );

  logic      g_a, g_b, g_c1, g_c2;
  grid_ctl_t g_ctl;

  coef_broadcast #(.N(CHIP_XBITS + CELL_XBITS)) u_bc (
    .clk, .rst_n, .in_valid(cw_valid), .in_ready(cw_ready), .in_word(cw),
    .a_out(g_a), .b_out(g_b), .c1_out(g_c1), .c2_out(g_c2), .ctl_out(g_ctl),
    .busy(bc_busy)
  );

  always_comb busy = pre_busy || cw_valid || bc_busy;

  // Chip array: [row j][column i]; chain links run right (x) and up (y).
  logic xs [CHIPS_Y][CHIPS_X+1];
  logic xb [CHIPS_Y][CHIPS_X+1];
  logic ys [CHIPS_Y+1][CHIPS_X];
  logic yb [CHIPS_Y+1][CHIPS_X];
  logic [PW-1:0] vid [CHIPS_Y][CHIPS_X];

  for (genvar j = 0; j < CHIPS_Y; j++) begin : g_y
    always_comb begin
      xs[j][0] = addr_start;
      xb[j][0] = 1'b0;
      xchain_start_out[j] = xs[j][CHIPS_X];
      xchain_bit_out[j]   = xb[j][CHIPS_X];
    end
    for (genvar i = 0; i < CHIPS_X; i++) begin : g_x
      logic [CHIP_XBITS-1:0] xa;
      logic [CHIP_YBITS-1:0] ya;
      memory_chip #(
        .X_MSB(CHIP_XBITS), .X_LSB(CELL_XBITS),
        .Y_MSB(CHIP_YBITS), .Y_LSB(CELL_YBITS)
      ) u_chip (
        .clk, .rst_n,
        .a_in(g_a), .b_in(g_b), .c1_in(g_c1), .c2_in(g_c2), .ctl_in(g_ctl),
        .r_start_in(xs[j][i]), .r_bit_in(xb[j][i]),
        .r_start_out(xs[j][i+1]), .r_bit_out(xb[j][i+1]),
        .c_start_in(ys[j][i]), .c_bit_in(yb[j][i]),
        .c_start_out(ys[j+1][i]), .c_bit_out(yb[j+1][i]),
        .x_addr(xa), .y_addr(ya),
        .scan_load, .scan_shift, .scan_xchip, .scan_y,
        .video(vid[j][i])
      );
    end
  end

  for (genvar i = 0; i < CHIPS_X; i++) begin : g_ybot
    always_comb begin
      ys[0][i] = addr_start;
      yb[0][i] = 1'b0;
      ychain_start_out[i] = ys[CHIPS_Y][i];
      ychain_bit_out[i]   = yb[CHIPS_Y][i];
    end
  end

  // Video bus: only the selected chip drives a non-zero value.
  always_comb begin
    video = '0;
    for (int j = 0; j < CHIPS_Y; j++)
      for (int i = 0; i < CHIPS_X; i++)
        video |= vid[j][i];
  end

endmodule
