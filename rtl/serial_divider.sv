// serial_divider: restoring divider producing one quotient bit per clock,
// used by the pre-processor for the plane slopes A = -a/c and B = -b/c.
//
// `num` is a signed NW-bit numerator, `den` a positive DW-bit divisor. On
// `start` both are captured; NW clocks later `done` pulses for one clock and
// `quot` holds num/den rounded toward zero (it stays valid until the next
// start). The document names serial dividers for this job; the restoring
// algorithm and the rounding are this design's choices. den = 0 gives an
// all-ones magnitude and must be avoided by the caller.
module serial_divider #(
  parameter int unsigned NW = 32,
  parameter int unsigned DW = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic        [DW-1:0] den,
  output logic                 busy,
  output logic                 done,
  output logic signed [NW-1:0] quot
);
  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] n_q;     // remaining numerator bits, MSB first
  logic [NW-1:0] q_q;
  logic [DW-1:0] rem_q;   // always below d_q
  logic [DW-1:0] d_q;
  logic          neg_q;
  logic [CW-1:0] cnt_q;
  logic [DW:0]   trial;
  logic [DW+1:0] diff;

  always_comb begin
    trial = {rem_q, n_q[NW-1]};
    diff  = {1'b0, trial} - {2'b00, d_q};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n_q   <= num[NW-1] ? -num : num;
        neg_q <= num[NW-1];
        d_q   <= den;
        rem_q <= '0;
        q_q   <= '0;
        cnt_q <= CW'(NW);
      end else if (cnt_q != '0) begin
        n_q <= n_q << 1;
        if (!diff[DW+1]) begin
          rem_q <= diff[DW-1:0];
          q_q   <= {q_q[NW-2:0], 1'b1};
        end else begin
          rem_q <= trial[DW-1:0];
          q_q   <= {q_q[NW-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) done <= 1'b1;
      end
    end
  end

  always_comb begin
    busy = (cnt_q != '0);
    quot = neg_q ? -$signed(q_q) : $signed(q_q);
  end

endmodule
