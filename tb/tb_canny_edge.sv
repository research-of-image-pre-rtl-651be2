// End-to-end testbench for canny_edge on 32x24 frames: a bright rectangle and
// a bright disc on a dark, noisy background. A reference model of the whole
// chain runs here on the stored frame: 5x5 Gaussian (/79), four directional
// templates, non-maxima suppression, the gradient histogram with its
// first-zero difference search, and the dual-threshold decision using the
// thresholds found on the previous frame (100/50 before the first). Every
// edge bit, its storage address, the frame-last flag and the thresholds after
// each frame are checked, as is the latency from a pixel to its edge bit
// (edge bit of pixel n registered 7 clocks after pixel n + 6*W + 6 is taken).
module tb_canny_edge;
  localparam int W = 32, H = 24, AW = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0;
  logic [7:0] in_pix = 0;
  logic       busy, edge_valid, edge_bit, edge_last, th_valid;
  logic [AW-1:0] edge_addr;
  logic [7:0] th_h, th_l;

  canny_edge #(.IMG_W(W), .IMG_H(H), .AW(AW)) dut (.*);

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
  int cycle = 0, nin = 0, nout = 0, n_edges = 0, n_promoted = 0;
  int in_cycle [W*H];

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
        if (nb) n_promoted++;
      end else edge_exp[r][c] = 0;
    end
  endtask

  always @(posedge clk) begin
    cycle++;
    if (in_valid) begin in_cycle[nin] = cycle; nin++; end
  end

  always @(negedge clk) if (rst_n && edge_valid) begin
    int r, c;
    r = nout / W; c = nout % W;
    checks++;
    if (int'(edge_bit) != edge_exp[r][c] || int'(edge_addr) != nout || edge_last != (nout == W*H-1)) begin
      failures++; $display("pixel %0d,%0d: edge %0b exp %0d addr %0d last %0b", r, c, edge_bit, edge_exp[r][c], edge_addr, edge_last);
    end
    if (edge_bit) n_edges++;
    if (nout + 6*W + 6 < W*H) begin
      checks++;
      if (cycle != in_cycle[nout + 6*W + 6] + 7) begin
        failures++; $display("latency at %0d: %0d", nout, cycle - in_cycle[nout + 6*W + 6]);
      end
    end
    nout++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      int cx, cy;
      cx = 20 + $urandom_range(0, 4); cy = 12 + $urandom_range(0, 3);
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        int v;
        v = 30 + $urandom_range(0, 12);
        if (r >= 4 && r < 19 && c >= 4 && c < 13 + f) v = 200 + $urandom_range(0, 12);
        if ((r - cy) * (r - cy) + (c - cx) * (c - cx) <= 20) v = 150 + (f * 20);
        img[r][c] = v;
      end
      model();
      nin = 0; nout = 0;
      for (int i = 0; i < W*H; i++) begin
        while (f == 2 && $urandom_range(0, 3) == 0) @(negedge clk);
        in_valid = 1; in_pix = 8'(img[i / W][i % W]);
        @(negedge clk);
        in_valid = 0;
      end
      @(negedge clk);
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
      checks++;
      if (nout != W*H || int'(th_h) != new_h || int'(th_l) != new_h / 2) begin
        failures++; $display("frame %0d: %0d outputs, th %0d/%0d expected %0d", f, nout, th_h, th_l, new_h);
      end
      cur_h = new_h; cur_l = new_h / 2;
    end
    checks++;
    if (n_edges == 0 || n_promoted == 0) begin
      failures++; $display("edges %0d, weak edges promoted %0d", n_edges, n_promoted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
