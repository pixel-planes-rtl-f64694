// row_scan: display read-out of one memory chip's P registers.
//
// A row-select decoder picks one row of pixel cells; on `load` the P values
// of that row are copied in parallel into a shift register, which then
// moves them out one pixel per `shift`, leftmost pixel (x LSBs = 0) first.
// `dout` shows the pixel at the head of the register. Because the P
// registers are separate from the I registers being painted, read-out runs
// independently of polygon processing.
//
// Timing: `dout` holds the pixel of column 0 the clock after `load`, and
// column k after k further `shift` clocks. The row select and shift
// register are the document's; the load/shift handshake is this design's.
module row_scan #(
  parameter int unsigned ROW_BITS = 5,
  parameter int unsigned COLS     = 16,
  parameter int unsigned PW       = 24,
  localparam int unsigned ROWS    = 1 << ROW_BITS
) (
  input  logic                          clk,
  input  logic [ROWS-1:0][COLS-1:0][PW-1:0] pix,  // P of every cell, [y][x]
  input  logic [ROW_BITS-1:0]           row,
  input  logic                          load,
  input  logic                          shift,
  output logic [PW-1:0]                 dout
);
  logic [COLS-1:0][PW-1:0] sr_q;

  always_ff @(posedge clk) begin
    if (load)
      sr_q <= pix[row];
    else if (shift) begin
      for (int k = 0; k < COLS - 1; k++) sr_q[k] <= sr_q[k+1];
      sr_q[COLS-1] <= '0;
    end
  end

  always_comb dout = sr_q[0];

endmodule
