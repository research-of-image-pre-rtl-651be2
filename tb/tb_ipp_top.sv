// End-to-end testbench of ipp_top at its default size (360x280 frames, 100
// histogram bins, 50 Hough stages, 102 accumulator RAMs); no parameter is
// overridden. Three synthetic camera frames (dark noisy background, a bright
// rectangle, a disc and a diagonal bar; chroma sweeping the full range) are
// sent with the frame protocol. Checked against models computed here:
//  - every RGB pixel against the shift-add conversion formulas;
//  - every edge bit and address against a model of the whole Canny chain
//    (Gaussian, directional gradient, suppression, histogram threshold
//    search, dual threshold with the previous frame's thresholds);
//  - the thresholds after each frame;
//  - every Hough row written to the external RAM against a model of the
//    rotation pipeline and 3x3 peak rule applied to the frame's edge image.
// Mechanisms that must each occur at least once: RGB clamping at 0 and at
// 255, the window flush between frames, a threshold found by the difference
// search, new thresholds differing from the previous frame's, weak edges
// promoted and weak edges dropped, the accumulator bypass, Hough peaks.
module tb_ipp_top;
  localparam int W = 360, H = 280, NS = 50, NRAM = 102;
  localparam int RHO_MAX = ipp_pkg::hough_rho_max(W, H);
  localparam int NRHO = 2 * RHO_MAX + 1;
  localparam int LAW = $clog2(NRHO);
  localparam int EAW = $clog2(W * H);
  localparam int NFRAMES = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic [7:0] in_y = 0, in_u = 0, in_v = 0;
  logic busy, rgb_valid, edge_valid, edge_bit, edge_last, th_valid, line_we, hough_done;
  logic [7:0] rgb_r, rgb_g, rgb_b, th_h, th_l;
  logic [EAW-1:0] edge_addr;
  logic [7:0] peak_th = 8'd40;
  logic [LAW-1:0] line_addr;
  logic [NRAM-1:0] line_data;
  logic [31:0] hough_bypass_cnt;

  ipp_top dut (.*);

  localparam int G [5][5] = '{'{1,2,3,2,1}, '{2,4,6,4,2}, '{3,6,7,6,3}, '{2,4,6,4,2}, '{1,2,3,2,1}};
  localparam int T [4][5][5] = '{
    '{'{ 0, 0, 0, 0, 0}, '{-1,-1, 0, 1, 1}, '{-2,-2, 0, 2, 2}, '{-1,-1, 0, 1, 1}, '{ 0, 0, 0, 0, 0}},
    '{'{ 0,-1,-2,-1, 0}, '{ 0,-1,-2,-1, 0}, '{ 0, 0, 0, 0, 0}, '{ 0, 1, 2, 1, 0}, '{ 0, 1, 2, 1, 0}},
    '{'{-2,-1, 0, 0, 0}, '{-1,-2,-1, 0, 0}, '{ 0,-1, 0, 1, 0}, '{ 0, 0, 1, 2, 1}, '{ 0, 0, 0, 1, 2}},
    '{'{ 0, 0, 0,-1,-2}, '{ 0, 0,-1,-2,-1}, '{ 0, 1, 0,-1, 0}, '{ 1, 2, 1, 0, 0}, '{ 2, 1, 0, 0, 0}}};
  // neighbour offsets (dr, dc) along each direction: H, V, DL, DR
  localparam int NB [4][2] = '{'{0, 1}, '{1, 0}, '{1, 1}, '{1, -1}};

  int img [H][W], gs [H][W], mag [H][W], dir [H][W], nm [H][W], edge_exp [H][W];
  int cur_h = 100, cur_l = 50, new_h;
  int n_promoted = 0, n_dropped = 0;

  function automatic bit border(int r, int c, int R);
    return r < R || r >= H - R || c < R || c >= W - R;
  endfunction

  task automatic model();
    int hist [0:101];
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      int s;
      if (border(r, c, 2)) gs[r][c] = img[r][c];
      else begin
        s = 0;
        for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) s += G[i][j] * img[r+i-2][c+j-2];
        gs[r][c] = s * 830 / 65536;
      end
    end
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      int s, best, bd;
      best = 0; bd = 0;
      if (!border(r, c, 2)) begin
        best = -1;
        for (int t = 0; t < 4; t++) begin
          s = 0;
          for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) s += T[t][i][j] * gs[r+i-2][c+j-2];
          if (s < 0) s = -s;
          if (s > best) begin best = s; bd = t; end
        end
      end
      mag[r][c] = best / 8; dir[r][c] = bd;
    end
    for (int i = 0; i <= 101; i++) hist[i] = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      int dr, dc;
      nm[r][c] = 0;
      if (!border(r, c, 1)) begin
        dr = NB[dir[r][c]][0]; dc = NB[dir[r][c]][1];
        if (mag[r][c] > mag[r-dr][c-dc] && mag[r][c] >= mag[r+dr][c+dc]) nm[r][c] = mag[r][c];
      end
      if (nm[r][c] >= 1 && nm[r][c] <= 100) hist[nm[r][c]]++;
    end
    new_h = 100;
    for (int i = 1; i <= 99; i++) if (hist[i] == hist[i+1]) begin new_h = i; break; end
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      bit nb;
      nb = 0;
      for (int i = -1; i <= 1; i++) for (int j = -1; j <= 1; j++)
        if (!(i == 0 && j == 0) && r + i >= 0 && r + i < H && c + j >= 0 && c + j < W)
          if (nm[r+i][c+j] > cur_h) nb = 1;
      if (nm[r][c] > cur_h) edge_exp[r][c] = 1;
      else if (nm[r][c] > cur_l && nm[r][c] < cur_h) begin
        edge_exp[r][c] = nb;
        if (nb) n_promoted++; else n_dropped++;
      end else edge_exp[r][c] = 0;
    end
  endtask

  int uimg [H][W], vimg [H][W];
  int n_clamp_lo = 0, n_clamp_hi = 0, n_flush = 0, n_found = 0, n_changed = 0, n_peaks = 0;
  int nrgb = 0, nout = 0, nrows = 0, n_edges = 0;
  bit got_edge [H][W];
  logic [NRAM-1:0] rows [NRHO];

  function automatic int fl8(int p);   // floor(p / 256)
    return (p >= 0) ? p / 256 : -((-p + 255) / 256);
  endfunction
  function automatic int clampc(int v);
    if (v < 0) begin n_clamp_lo++; return 0; end
    if (v > 255) begin n_clamp_hi++; return 255; end
    return v;
  endfunction

  // RGB stream.
  always @(negedge clk) if (rst_n && rgb_valid) begin
    int r, c, y, u, v, er, eg, eb;
    r = nrgb / W; c = nrgb % W;
    y = img[r][c]; u = uimg[r][c] - 128; v = vimg[r][c] - 128;
    er = clampc(y + v + fl8(v * 103));
    eg = clampc(y - fl8(u * 88) - fl8(v * 183));
    eb = clampc(y + u + fl8(u * 198));
    checks++;
    if (int'(rgb_r) != er || int'(rgb_g) != eg || int'(rgb_b) != eb) begin
      failures++;
      if (failures < 20) $display("rgb %0d,%0d: got %0d %0d %0d expected %0d %0d %0d", r, c, rgb_r, rgb_g, rgb_b, er, eg, eb);
    end
    nrgb++;
  end

  // Edge stream.
  always @(negedge clk) if (rst_n && edge_valid) begin
    int r, c;
    r = nout / W; c = nout % W;
    got_edge[r][c] = edge_bit;
    checks++;
    if (int'(edge_bit) != edge_exp[r][c] || int'(edge_addr) != nout || edge_last != (nout == W*H-1)) begin
      failures++;
      if (failures < 20) $display("edge %0d,%0d: got %0b expected %0d addr %0d", r, c, edge_bit, edge_exp[r][c], edge_addr);
    end
    if (edge_bit) n_edges++;
    nout++;
  end

  // Hough rows.
  always @(negedge clk) if (rst_n && line_we) begin
    rows[line_addr] = line_data;
    nrows++;
  end

  // Window flush: busy with no input pixels.
  always @(negedge clk) if (rst_n && busy && !in_valid && nout > 0 && nout < W*H) n_flush++;

  function automatic int floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return int'(q);
  endfunction
  function automatic int col_ram(int col);
    return (col < NRAM / 2) ? 2 * col : 2 * (col - NRAM / 2) + 1;
  endfunction

  task automatic check_hough(int f);
    int acc [NRAM][NRHO];
    int np;
    for (int k = 0; k < NRAM; k++) for (int p = 0; p < NRHO; p++) acc[k][p] = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) if (got_edge[r][c]) begin
      longint fx, fy, nx, ny;
      fx = longint'(c - W / 2) * 256; fy = longint'(r - H / 2) * 256;
      for (int s = 0; s <= NS; s++) begin
        acc[2*s][floor_div(fx + 128, 256) + RHO_MAX]++;
        acc[2*s+1][floor_div(fy + 128, 256) + RHO_MAX]++;
        nx = fx + floor_div(fy, 32);
        ny = fy - floor_div(fx, 32);
        fx = nx; fy = ny;
      end
    end
    np = 0;
    for (int p = 0; p < NRHO; p++) begin
      logic [NRAM-1:0] e;
      e = '0;
      for (int col = 0; col < NRAM; col++) begin
        bit ge;
        int cv, a;
        cv = acc[col_ram(col)][p];
        if (cv > 255) cv = 255;
        ge = 1;
        for (int dr = -1; dr <= 1; dr++) for (int dc = -1; dc <= 1; dc++)
          if (p + dr >= 0 && p + dr < NRHO && col + dc >= 0 && col + dc < NRAM) begin
            a = acc[col_ram(col+dc)][p+dr];
            if (a > 255) a = 255;
            if (a > cv) ge = 0;
          end
        e[col_ram(col)] = ge && (cv > int'(peak_th));
      end
      np += $countones(e);
      checks++;
      if (rows[p] != e) begin
        failures++;
        if (failures < 20) $display("frame %0d hough rho %0d: got %h expected %h", f, p, rows[p], e);
      end
    end
    n_peaks += np;
    $display("frame %0d: %0d edge pixels, thresholds %0d/%0d, %0d Hough peaks", f, n_edges, th_h, th_l, np);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (busy) @(negedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      int x0;
      x0 = 60 + 25 * f;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        int v;
        v = 30 + $urandom_range(0, 10);
        if (r >= 50 && r < 200 && c >= x0 && c < x0 + 110) v = 190 + $urandom_range(0, 10);
        if ((r - 150) * (r - 150) + (c - 270) * (c - 270) <= 1600) v = 140 + 20 * f;
        if (r - c / 2 >= 220 - f * 5 && r - c / 2 < 230 - f * 5) v = 240;
        img[r][c] = v;
        uimg[r][c] = (c * 255) / (W - 1);
        vimg[r][c] = (r * 255) / (H - 1);
      end
      model();
      nrgb = 0; nout = 0; nrows = 0; n_edges = 0;
      for (int i = 0; i < W*H; i++) begin
        in_valid = 1;
        in_y = 8'(img[i / W][i % W]); in_u = 8'(uimg[i / W][i % W]); in_v = 8'(vimg[i / W][i % W]);
        @(negedge clk);
        in_valid = 0;
      end
      @(negedge clk);
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
      checks++;
      if (nrgb != W*H || nout != W*H || nrows != NRHO || int'(th_h) != new_h || int'(th_l) != new_h / 2) begin
        failures++;
        $display("frame %0d: rgb %0d edge %0d rows %0d, th %0d/%0d expected %0d", f, nrgb, nout, nrows, th_h, th_l, new_h);
      end
      check_hough(f);
      if (new_h != 100) n_found++;
      if (new_h != cur_h) n_changed++;
      cur_h = new_h; cur_l = new_h / 2;
    end
    checks++;
    if (n_clamp_lo == 0 || n_clamp_hi == 0 || n_flush == 0 || n_found == 0 || n_changed == 0 ||
        n_promoted == 0 || n_dropped == 0 || hough_bypass_cnt == 0 || n_peaks == 0) begin
      failures++;
      $display("mechanism never seen: clamp %0d/%0d flush %0d found %0d changed %0d promoted %0d dropped %0d bypass %0d peaks %0d",
               n_clamp_lo, n_clamp_hi, n_flush, n_found, n_changed, n_promoted, n_dropped, hough_bypass_cnt, n_peaks);
    end
    $display("mechanisms: clamp low %0d, clamp high %0d, flush clocks %0d, thresholds found %0d, changed %0d, weak promoted %0d, weak dropped %0d, bypass %0d, peaks %0d",
             n_clamp_lo, n_clamp_hi, n_flush, n_found, n_changed, n_promoted, n_dropped, hough_bypass_cnt, n_peaks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
