// Self-checking testbench for the hough system on 24x18 edge images with the
// full 50-stage pipeline and 102 accumulator RAMs. Each frame holds a
// horizontal line, a vertical line and random noise pixels. The test builds
// the accumulator matrix from its own fixed-point model of the rotation
// recurrence, applies the 3x3 local-maximum rule, and checks every row written
// to the external RAM; it also checks that the horizontal line is found at
// theta = pi/2 (RAM 1) and the vertical line at theta = 0 (RAM 0) at their
// rho, that a second frame is not polluted by the first (RAMs cleared), that
// the read-during-write bypass was used and that busy ends within
// NSTAGES + NRHO + 10 clocks of the last pixel.
module tb_hough;
  localparam int W = 24, H = 18, NS = 50, NRAM = 102;
  localparam int RHO_MAX = ipp_pkg::hough_rho_max(W, H);
  localparam int NRHO = 2 * RHO_MAX + 1;
  localparam int AW = $clog2(NRHO);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_edge = 0, in_last = 0;
  logic [7:0] peak_th;
  logic busy, done, ext_we;
  logic [AW-1:0] ext_addr;
  logic [NRAM-1:0] ext_data;
  logic [31:0] bypass_cnt;

  hough #(.IMG_W(W), .IMG_H(H)) dut (.*);

  int acc [NRAM][NRHO];
  logic [NRAM-1:0] got [NRHO];
  int nrows = 0;

  function automatic int floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return int'(q);
  endfunction

  function automatic int col_ram(int col);
    return (col < NRAM / 2) ? 2 * col : 2 * (col - NRAM / 2) + 1;
  endfunction

  always @(negedge clk) if (rst_n && ext_we) begin
    got[ext_addr] = ext_data;
    nrows++;
  end

  task automatic vote(int x, int y);
    longint fx, fy, nx, ny;
    fx = longint'(x) * 256; fy = longint'(y) * 256;
    for (int s = 0; s <= NS; s++) begin
      acc[2*s][floor_div(fx + 128, 256) + RHO_MAX]++;
      acc[2*s+1][floor_div(fy + 128, 256) + RHO_MAX]++;
      nx = fx + floor_div(fy, 32);
      ny = fy - floor_div(fx, 32);
      fx = nx; fy = ny;
    end
  endtask

  task automatic run_frame(int f, int hrow, int vcol);
    bit img [H][W];
    int t0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
      img[r][c] = (r == hrow && c >= 2 && c < 22) || (c == vcol && r >= 1 && r < 17) ||
                  ($urandom_range(0, 29) == 0);
    img[H-1][W-1] = 1;   // last pixel is an edge: its votes must land before the scan
    for (int k = 0; k < NRAM; k++) for (int p = 0; p < NRHO; p++) acc[k][p] = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) if (img[r][c]) vote(c - W / 2, r - H / 2);
    nrows = 0;
    for (int i = 0; i < W*H; i++) begin
      if ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_edge = img[i / W][i % W]; in_last = (i == W*H-1);
      @(negedge clk);
      in_valid = 0; in_last = 0;
    end
    t0 = 0;
    while (busy && t0 < NS + NRHO + 20) begin @(negedge clk); t0++; end
    @(posedge clk);
    checks++;
    if (busy || t0 > NS + NRHO + 10 || nrows != NRHO) begin
      failures++; $display("frame %0d: busy %0d clocks, %0d rows", f, t0, nrows);
    end
    for (int p = 0; p < NRHO; p++) begin
      logic [NRAM-1:0] e;
      e = '0;
      for (int col = 0; col < NRAM; col++) begin
        bit ge;
        int c;
        c = acc[col_ram(col)][p];
        ge = 1;
        for (int dr = -1; dr <= 1; dr++) for (int dc = -1; dc <= 1; dc++)
          if (p + dr >= 0 && p + dr < NRHO && col + dc >= 0 && col + dc < NRAM)
            if (acc[col_ram(col+dc)][p+dr] > c) ge = 0;
        e[col_ram(col)] = ge && (c > int'(peak_th));
      end
      checks++;
      if (got[p] != e) begin failures++; $display("frame %0d rho %0d: got %h expected %h", f, p, got[p], e); end
    end
    checks++;
    if (!got[hrow - H / 2 + RHO_MAX][1] || !got[vcol - W / 2 + RHO_MAX][0]) begin
      failures++; $display("frame %0d: lines not found", f);
    end
  endtask

  initial begin
    peak_th = 8'd10;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (busy) @(negedge clk);
    @(negedge clk);
    run_frame(0, 5, 7);
    run_frame(1, 12, 18);
    checks++;
    if (bypass_cnt == 0) begin failures++; $display("bypass never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
