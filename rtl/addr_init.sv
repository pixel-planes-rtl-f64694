// addr_init: one link of the chain that gives every memory chip its x or y
// address at power-up.
//
// A chip receives a number serially (least significant bit first, bit 0
// marked by start_in), keeps it as its address (which is also the content
// of its multiplier register), and passes the number plus one on to its
// neighbour, one clock later. The chip at the array's edge receives zeros,
// so chip k of a row (or column) ends up with address k, and the far edge of
// the array sees the chip count, which can be checked there.
//
// Timing: bit_out/start_out are bit_in/start_in delayed one clock, with +1
// added serially; `addr` is complete ABITS clocks after start_in. `valid`
// rises then and stays high until the next start. The document gives the
// scheme; its double-rail, self-timed signalling between chips is replaced
// here by a synchronous start marker.
module addr_init #(
  parameter int unsigned ABITS = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_in,
  input  logic             bit_in,
  output logic             start_out,
  output logic             bit_out,
  output logic [ABITS-1:0] addr,
  output logic             valid
);
  localparam int unsigned CW = $clog2(ABITS + 1);

  logic [CW-1:0]    cnt_q;   // bits still to receive
  logic             carry_q;
  logic [ABITS-1:0] addr_q;
  logic             valid_q;
  logic             active, cin;

  always_comb begin
    active = start_in || (cnt_q != '0);
    cin    = start_in ? 1'b1 : carry_q;   // adding one: carry-in of bit 0
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      carry_q   <= 1'b0;
      valid_q   <= 1'b0;
      start_out <= 1'b0;
      bit_out   <= 1'b0;
    end else begin
      start_out <= start_in;
      bit_out   <= active ? (bit_in ^ cin) : 1'b0;
      if (active) begin
        carry_q <= bit_in & cin;
        addr_q  <= (addr_q >> 1) | (ABITS'(bit_in) << (ABITS - 1));
        cnt_q   <= start_in ? CW'(ABITS - 1) : cnt_q - 1'b1;
      end
      // valid rises when the last address bit has been taken in
      if (start_in)                 valid_q <= (ABITS == 1);
      else if (cnt_q == CW'(1))     valid_q <= 1'b1;
    end
  end

  always_comb begin
    addr  = addr_q;
    valid = valid_q;
  end

endmodule
