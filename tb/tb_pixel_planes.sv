// tb_pixel_planes: end-to-end test of the engine on a small array.
//
// Builds 2 x 2 chips of 2 x 2 cells (a 4 x 4 screen), initialises the chip
// addresses through the serial chain, renders a scene of a quadrilateral
// (split into two triangles) and a triangle that partly hides it, swaps
// buffers, reads every pixel back through the scan port and compares with
// a reference computed here from the same integer formulas. It also checks
// the grid time of one triangle, 3(K+N+2) + (L+N+2) + 3(M+N+2) clocks, and
// counts that edge rejection, depth rejection, depth update, painting, the
// Z preset and the buffer swap each happened.
module tb_pixel_planes;
  import pp_pkg::*;
  localparam int CXB = 1, CYB = 1, LXB = 1, LYB = 1;
  localparam int W = 1 << (CXB + LXB), H = 1 << (CYB + LYB);
  localparam int NB = CXB + LXB;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_valid, host_ready, busy;
  host_item_t host_item;
  logic addr_start;
  logic [(1<<CYB)-1:0] xs_out, xb_out;
  logic [(1<<CXB)-1:0] ys_out, yb_out;
  logic scan_load, scan_shift;
  logic [CXB-1:0] scan_xchip;
  logic [CYB+LYB-1:0] scan_y;
  logic [3*M_BITS-1:0] video;

  pixel_planes #(.CHIP_XBITS(CXB), .CHIP_YBITS(CYB), .CELL_XBITS(LXB), .CELL_YBITS(LYB)) dut (
    .clk, .rst_n, .host_valid, .host_ready, .host_item, .busy, .addr_start,
    .xchain_start_out(xs_out), .xchain_bit_out(xb_out),
    .ychain_start_out(ys_out), .ychain_bit_out(yb_out),
    .scan_load, .scan_shift, .scan_xchip, .scan_y, .video
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference frame buffer.
  int zref [W][H];
  int iref [W][H][3];
  int pref [W][H][3];
  int n_edge_rej = 0, n_z_rej = 0, n_z_upd = 0;

  typedef struct { int x, y, z, r, g, b; } v_t;

  function automatic int attr(v_t v, int q);
    return q == 0 ? v.z : q == 1 ? v.r : q == 2 ? v.g : v.b;
  endfunction

  // Truncating division, as in hardware.
  function automatic int tdiv(int n, int d);
    int q;
    q = (n < 0 ? -n : n) / d;
    return n < 0 ? -q : q;
  endfunction

  task automatic ref_tri(v_t v[3]);
    int c, en, f, wz;
    int a[4], b[4];
    c = (v[1].x - v[0].x) * (v[2].y - v[1].y) - (v[2].x - v[1].x) * (v[1].y - v[0].y);
    if (c <= 0) return;
    for (int q = 0; q < 4; q++) begin
      int d1, d2;
      d1 = attr(v[1], q) - attr(v[0], q);
      d2 = attr(v[2], q) - attr(v[1], q);
      a[q] = tdiv(-((v[1].y - v[0].y) * d2 - (v[2].y - v[1].y) * d1), c);
      b[q] = tdiv(-(d1 * (v[2].x - v[1].x) - d2 * (v[1].x - v[0].x)), c);
    end
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++) begin
        en = 1;
        for (int e = 0; e < 3; e++) begin
          int j;
          j = (e + 1) % 3;
          f = (v[j].x - v[e].x) * (y - v[e].y) - (v[j].y - v[e].y) * (x - v[e].x);
          if (f < 0) en = 0;
        end
        if (!en) begin n_edge_rej++; continue; end
        wz = a[0] * (x - v[0].x) + b[0] * (y - v[0].y) + v[0].z;
        if (wz >= zref[x][y]) begin n_z_rej++; continue; end
        n_z_upd++;
        zref[x][y] = wz;
        for (int q = 1; q < 4; q++)
          iref[x][y][q-1] = (a[q] * (x - v[0].x) + b[q] * (y - v[0].y) + attr(v[0], q)) & 255;
      end
  endtask

  task automatic send(host_item_t it);
    bit taken;
    #1;
    host_item = it;
    host_valid = 1;
    taken = 0;
    while (!taken) begin
      @(negedge clk);
      taken = host_ready;
      @(posedge clk);
    end
    #1 host_valid = 0;
  endtask

  task automatic send_vertex(v_t v, bit last);
    host_item_t it;
    it = '0;
    it.kind = HOST_VERTEX;
    it.last = last;
    it.v.x = v.x[SCREEN_BITS-1:0]; it.v.y = v.y[SCREEN_BITS-1:0];
    it.v.z = v.z[L_BITS-1:0];
    it.v.r = v.r[7:0]; it.v.g = v.g[7:0]; it.v.b = v.b[7:0];
    send(it);
  endtask

  task automatic send_cmd(host_kind_t k);
    host_item_t it;
    it = '0;
    it.kind = k;
    send(it);
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (NB + 4) @(posedge clk);
  endtask

  // Grid-time measurement of triangles: count cycles with a plane op.
  int grid_cycles = 0;
  always @(posedge clk)
    if (dut.g_ctl.op inside {OP_EDGE_FIRST, OP_EDGE, OP_ZPLANE, OP_RED, OP_GREEN, OP_BLUE})
      grid_cycles++;

  int swaps = 0, clears = 0;

  always @(posedge clk) begin
    if (rst_n && dut.g_ctl.op == OP_SWAP) swaps++;
    if (rst_n && dut.g_ctl.op == OP_CLEAR_Z) clears++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v_t quad [4];
    v_t front [3];
    v_t t [3];
    int tri_len;
    host_valid = 0; host_item = '0; addr_start = 0;
    scan_load = 0; scan_shift = 0; scan_xchip = '0; scan_y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // Address chain.
    #1 addr_start = 1;
    @(posedge clk);
    #1 addr_start = 0;
    repeat (8) @(posedge clk);
    check(dut.g_y[0].g_x[0].xa == 1'd0 && dut.g_y[0].g_x[0].ya == 1'd0, "chip (0,0) address");
    check(dut.g_y[0].g_x[1].xa == 1'd1 && dut.g_y[0].g_x[1].ya == 1'd0, "chip (1,0) address");
    check(dut.g_y[1].g_x[0].xa == 1'd0 && dut.g_y[1].g_x[0].ya == 1'd1, "chip (0,1) address");
    check(dut.g_y[1].g_x[1].xa == 1'd1 && dut.g_y[1].g_x[1].ya == 1'd1, "chip (1,1) address");

    for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) zref[x][y] = 65535;

    // Scene: far quad over most of the screen, nearer triangle in a corner.
    quad[0] = '{0, 0, 4000, 200, 10, 30};
    quad[1] = '{3, 0, 4000, 100, 20, 60};
    quad[2] = '{3, 3, 4300, 50, 30, 90};
    quad[3] = '{0, 3, 4300, 10, 40, 120};
    front[0] = '{0, 0, 1000, 255, 255, 0};
    front[1] = '{2, 0, 5000, 255, 0, 255};
    front[2] = '{0, 2, 5000, 0, 255, 255};

    send_cmd(HOST_NEW_SCENE);
    wait_idle();
    grid_cycles = 0;
    for (int k = 0; k < 3; k++) send_vertex(front[k], k == 2);
    wait_idle();
    tri_len = 3 * (K_BITS + NB + 2) + (L_BITS + NB + 2) + 3 * (M_BITS + NB + 2);
    check(grid_cycles == tri_len, $sformatf("triangle grid time %0d, expected %0d", grid_cycles, tri_len));
    t = front; ref_tri(t);
    for (int k = 0; k < 4; k++) send_vertex(quad[k], k == 3);
    t[0] = quad[0]; t[1] = quad[1]; t[2] = quad[2]; ref_tri(t);
    t[0] = quad[0]; t[1] = quad[2]; t[2] = quad[3]; ref_tri(t);
    send_cmd(HOST_END_SCENE);
    wait_idle();
    for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) for (int c = 0; c < 3; c++)
      pref[x][y][c] = iref[x][y][c];

    // Read back every row through the scan port.
    for (int y = 0; y < H; y++)
      for (int xc = 0; xc < (1 << CXB); xc++) begin
        @(posedge clk);
        #1 scan_y = (CYB+LYB)'(y); scan_xchip = CXB'(xc); scan_load = 1;
        @(posedge clk);
        #1 scan_load = 0;
        for (int k = 0; k < (1 << LXB); k++) begin
          int x;
          logic [23:0] exp_p;
          x = xc * (1 << LXB) + k;
          exp_p = {pref[x][y][2][7:0], pref[x][y][1][7:0], pref[x][y][0][7:0]};
          @(posedge clk);
          check(video == exp_p, $sformatf("pixel (%0d,%0d) = %h, expected %h", x, y, video, exp_p));
          #1 scan_shift = 1;
          @(posedge clk);
          #1 scan_shift = 0;
        end
      end

    check(n_edge_rej > 0, "edge rejection never happened");
    check(n_z_rej > 0, "depth rejection never happened");
    check(n_z_upd > 0, "depth update never happened");
    check(clears == 1, "Z preset count");
    check(swaps == 1, "buffer swap count");
    $display("edge_rej=%0d z_rej=%0d z_upd=%0d clears=%0d swaps=%0d", n_edge_rej, n_z_rej, n_z_upd, clears, swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
