// mult_tree: bit-serial multiplier tree producing A*x + C for every x of a
// chip's range at once.
//
// Coefficients A and C enter bit-serially, least significant bit first,
// marked by `sof` on bit 0. Every node of the structure is a one-bit storage
// element; going down one level, the left child copies its parent and the
// right child stores parent + A*2^w, where w = TOTAL-1-level, through a
// one-bit adder with carry. A binary tree of depth LSB_BITS therefore yields
// A*i + C at its 2^LSB_BITS leaves, leaf i = 0 .. 2^LSB_BITS-1.
//
// On a chip that covers only part of the screen, the top MSB_BITS levels of
// the full tree are replaced by a single chain: at each chain stage A is
// either added or not, according to one bit of the chip's `addr` register
// (most significant first). The chain is a standard serial multiplier by
// addr, and the leaves become A*(addr*2^LSB_BITS + i) + C. MSB_BITS = 0 gives
// the full tree.
//
// Multiplying by 2^w bit-serially is a delay of w cycles; since level l is
// itself delayed by l+1 cycles, every adder uses the same copy of A delayed
// by TOTAL cycles. The first w bits of each word, which would otherwise pick
// up the tail of the previous word's A, are masked to zero, so words may
// follow each other without gaps.
//
// Timing: leaf outputs carry bit j of the result TOTAL+1 cycles after bit j
// of the inputs (registered outputs). Results are exact modulo 2^(word length).
// The tree and the chain of ADD / NO-ADD stages are the document's; the
// masking of A between words and the per-level bit counters are this
// design's.
module mult_tree #(
  parameter int unsigned MSB_BITS = 0,   // chain stages set by addr
  parameter int unsigned LSB_BITS = 9,   // full tree levels (2^LSB_BITS leaves)
  localparam int unsigned TOTAL   = MSB_BITS + LSB_BITS,
  localparam int unsigned LEAVES  = 1 << LSB_BITS,
  localparam int unsigned AW      = (MSB_BITS > 0) ? MSB_BITS : 1
) (
  input  logic              clk,
  input  logic              sof,   // marks bit 0 of the input words
  input  logic              a_in,  // coefficient A, serial
  input  logic              c_in,  // coefficient C, serial
  input  logic [AW-1:0]     addr,  // chain multiplier register (x MSBs)
  output logic [LEAVES-1:0] out    // serial A*x + C for each leaf
);
  localparam int unsigned CW = $clog2(TOTAL + 1) + 1;

  // sof_d[k] is sof delayed k cycles; a_d is A delayed TOTAL cycles.
  logic [TOTAL:0]   sof_d;
  logic [TOTAL:0]   a_sr;
  logic             a_d;

  always_comb begin
    sof_d[0] = sof;
    a_sr[0]  = a_in;
    a_d      = a_sr[TOTAL];
  end
  for (genvar k = 1; k <= TOTAL; k++) begin : g_dly
    always_ff @(posedge clk) begin
      sof_d[k] <= sof_d[k-1];
      a_sr[k]  <= a_sr[k-1];
    end
  end

  // Root storage element.
  logic root_q;
  always_ff @(posedge clk) root_q <= c_in;

  // Per-level bit index, used to mask A for the first w bits of a word.
  logic [TOTAL-1:0] a_lvl;  // masked A seen by the adders of level l
  logic [TOTAL-1:0] first_lvl;
  for (genvar l = 0; l < TOTAL; l++) begin : g_lvl
    logic [CW-1:0] cnt_q, idx;
    always_comb begin
      idx = sof_d[l+1] ? '0 : cnt_q;
      first_lvl[l] = sof_d[l+1];
    end
    if (l == TOTAL - 1) begin : g_w0
      always_comb a_lvl[l] = a_d;
    end else begin : g_wn
      always_comb a_lvl[l] = (idx >= CW'(TOTAL - 1 - l)) ? a_d : 1'b0;
    end
    always_ff @(posedge clk)
      cnt_q <= (idx == '1) ? idx : idx + 1'b1;
  end

  // Chain part: one node per stage.
  logic [MSB_BITS:0] chain;
  always_comb chain[0] = root_q;
  for (genvar s = 0; s < MSB_BITS; s++) begin : g_chain
    logic sum;
    serial_adder u_add (
      .clk(clk), .first(first_lvl[s]), .a(chain[s]), .b(a_lvl[s]), .s(sum)
    );
    logic q;
    always_ff @(posedge clk) q <= addr[MSB_BITS-1-s] ? sum : chain[s];
    always_comb chain[s+1] = q;
  end

  // Tree part: level k has 2^k nodes, node n of level k feeds 2n and 2n+1.
  for (genvar k = 0; k < LSB_BITS; k++) begin : g_tree
    localparam int unsigned LV = MSB_BITS + k;
    logic [(1<<k)-1:0]     parent;
    logic [(2<<k)-1:0]     child;
    if (k == 0) begin : g_top
      always_comb parent[0] = chain[MSB_BITS];
    end else begin : g_inner
      always_comb parent = g_tree[k-1].child;
    end
    for (genvar n = 0; n < (1 << k); n++) begin : g_node
      logic sum;
      serial_adder u_add (
        .clk(clk), .first(first_lvl[LV]), .a(parent[n]), .b(a_lvl[LV]), .s(sum)
      );
      always_ff @(posedge clk) begin
        child[2*n]   <= parent[n];
        child[2*n+1] <= sum;
      end
    end
  end

  if (LSB_BITS == 0) begin : g_noleaf
    always_comb out = chain[MSB_BITS];
  end else begin : g_leaf
    always_comb out = g_tree[LSB_BITS-1].child;
  end

endmodule
