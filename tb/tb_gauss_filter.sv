// Self-checking testbench for gauss_filter on random and flat 20x14 frames.
// The expected output of an interior pixel is the template-weighted 5x5 sum
// scaled by 830/65536, and it must be within one grey level of the exact
// division by 79; border pixels must come out unchanged. It also checks the
// pixel count, the frame-last flag and the latency (output one clock after
// the window-completing pixel's window, i.e. two clocks after that pixel).
module tb_gauss_filter;
  localparam int W = 20, H = 14;
  localparam int R = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0;
  logic [7:0] in_pix = 0;
  logic       busy, out_valid, out_last;
  logic [7:0] out_pix;

  gauss_filter #(.IMG_W(W), .IMG_H(H)) dut (.*);

  localparam int G [5][5] = '{'{1,2,3,2,1}, '{2,4,6,4,2}, '{3,6,7,6,3}, '{2,4,6,4,2}, '{1,2,3,2,1}};

  logic [7:0] img [H][W];
  int cycle = 0, nin = 0, nout = 0;
  int in_cycle [W*H];

  always @(posedge clk) begin
    cycle++;
    if (in_valid) begin in_cycle[nin] = cycle; nin++; end
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int r, c, s, e;
    real ex;
    r = nout / W; c = nout % W;
    checks++;
    if (r < R || r >= H - R || c < R || c >= W - R) begin
      e = img[r][c];
      ex = e;
    end else begin
      s = 0;
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) s += G[i][j] * img[r+i-2][c+j-2];
      e = (s * 830) / 65536;
      ex = s / 79.0;
    end
    if (int'(out_pix) != e || (real'(out_pix) - ex) > 1.0 || (ex - real'(out_pix)) > 1.0) begin
      failures++; $display("pixel %0d,%0d: got %0d expected %0d (%f)", r, c, out_pix, e, ex);
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
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
        img[r][c] = (f == 2) ? 8'd255 : 8'($urandom);
      for (int i = 0; i < W*H; i++) begin
        while (f == 1 && $urandom_range(0, 2) == 0) @(negedge clk);
        in_valid = 1; in_pix = img[i / W][i % W];
        @(negedge clk);
        in_valid = 0;
      end
      while (busy) @(negedge clk);
      repeat (4) @(negedge clk);
      checks++;
      if (nout != W*H) begin failures++; $display("frame %0d: %0d outputs", f, nout); end
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
