// Self-checking testbench for dual_thresh on 20x14 frames of random gradient
// values with changing thresholds. The expected edge bit is: strong
// (g > th_h), or weak (th_l < g < th_h) with a strong pixel among its eight
// neighbours inside the image. It also checks pixel count, frame-last flag
// and latency, and counts strong edges, weak edges promoted by a strong
// neighbour and weak edges dropped.
module tb_dual_thresh;
  localparam int W = 20, H = 14;
  localparam int R = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0;
  logic [7:0] in_mag = 0;
  logic       in_last = 0;
  logic [7:0] th_h = 0, th_l = 0;
  logic       busy, out_valid, out_last, out_edge;
  int n_strong = 0, n_promoted = 0, n_dropped = 0;

  dual_thresh #(.IMG_W(W), .IMG_H(H)) dut (.*);

  logic [7:0] img [H][W];
  int cycle = 0, nin = 0, nout = 0;
  int in_cycle [W*H];

  always @(posedge clk) begin
    cycle++;
    if (in_valid) begin in_cycle[nin] = cycle; nin++; end
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int r, c;
    bit e, nb;
    r = nout / W; c = nout % W;
    checks++;
    nb = 0;
    for (int i = -1; i <= 1; i++) for (int j = -1; j <= 1; j++)
      if (!(i == 0 && j == 0) && r + i >= 0 && r + i < H && c + j >= 0 && c + j < W)
        if (img[r+i][c+j] > th_h) nb = 1;
    if (img[r][c] > th_h) begin e = 1; n_strong++; end
    else if (img[r][c] > th_l && img[r][c] < th_h) begin
      e = nb;
      if (nb) n_promoted++; else n_dropped++;
    end else e = 0;
    if (out_edge != e) begin
      failures++; $display("pixel %0d,%0d: got %0b expected %0b", r, c, out_edge, e);
    end
    checks++;
    if (out_last != (nout == W*H-1)) begin failures++; $display("last flag at %0d", nout); end
    if (nout + R*W + R < W*H) begin
      checks++;
      if (cycle != in_cycle[nout + R*W + R] + 1) begin
        failures++; $display("latency at %0d: %0d vs %0d", nout, cycle, in_cycle[nout + R*W + R]);
      end
    end
    nout++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      nin = 0; nout = 0;
      th_h = 8'($urandom_range(60, 200));
      th_l = th_h >> 1;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
        img[r][c] = ($urandom_range(0, 9) == 0) ? 8'($urandom_range(int'(th_h) + 1, 255))
                                                : 8'($urandom_range(0, int'(th_h)));
      for (int i = 0; i < W*H; i++) begin
        while (f == 1 && $urandom_range(0, 2) == 0) @(negedge clk);
        in_valid = 1; in_mag = img[i / W][i % W]; in_last = (i == W*H-1);
        @(negedge clk);
        in_valid = 0; in_last = 0;
      end
      while (busy) @(negedge clk);
      repeat (4) @(negedge clk);
      checks++;
      if (nout != W*H) begin failures++; $display("frame %0d: %0d outputs", f, nout); end
    end
    checks++;
    if (n_strong == 0 || n_promoted == 0 || n_dropped == 0) begin
      failures++; $display("not exercised: %0d %0d %0d", n_strong, n_promoted, n_dropped);
    end
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
