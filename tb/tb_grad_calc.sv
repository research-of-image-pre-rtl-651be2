// Self-checking testbench for grad_calc on 20x14 frames: random pixels, a
// vertical step, a horizontal step and two diagonal steps. The expected
// magnitude and direction of each interior pixel come from the four
// directional templates evaluated here (largest absolute response, earlier
// of H, V, DL, DR on ties, magnitude >> 3); border pixels must give 0. It also
// checks pixel count, frame-last flag and latency, and that every direction
// code occurred.
module tb_grad_calc;
  localparam int W = 20, H = 14;
  localparam int R = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0;
  logic [7:0] in_pix = 0;
  logic       busy, out_valid, out_last;
  logic [7:0] out_mag;
  ipp_pkg::dir_e out_dir;
  int dir_seen [4];

  grad_calc #(.IMG_W(W), .IMG_H(H)) dut (.*);

  // Templates: horizontal, vertical, left diagonal, right diagonal.
  localparam int T [4][5][5] = '{
    '{'{ 0, 0, 0, 0, 0}, '{-1,-1, 0, 1, 1}, '{-2,-2, 0, 2, 2}, '{-1,-1, 0, 1, 1}, '{ 0, 0, 0, 0, 0}},
    '{'{ 0,-1,-2,-1, 0}, '{ 0,-1,-2,-1, 0}, '{ 0, 0, 0, 0, 0}, '{ 0, 1, 2, 1, 0}, '{ 0, 1, 2, 1, 0}},
    '{'{-2,-1, 0, 0, 0}, '{-1,-2,-1, 0, 0}, '{ 0,-1, 0, 1, 0}, '{ 0, 0, 1, 2, 1}, '{ 0, 0, 0, 1, 2}},
    '{'{ 0, 0, 0,-1,-2}, '{ 0, 0,-1,-2,-1}, '{ 0, 1, 0,-1, 0}, '{ 1, 2, 1, 0, 0}, '{ 2, 1, 0, 0, 0}}};
  localparam logic [1:0] CODE [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  logic [7:0] img [H][W];
  int cycle = 0, nin = 0, nout = 0;
  int in_cycle [W*H];

  always @(posedge clk) begin
    cycle++;
    if (in_valid) begin in_cycle[nin] = cycle; nin++; end
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int r, c, s, best, bd;
    r = nout / W; c = nout % W;
    checks++;
    if (r < R || r >= H - R || c < R || c >= W - R) begin
      if (out_mag != 0) begin failures++; $display("border pixel %0d,%0d: %0d", r, c, out_mag); end
    end else begin
      best = -1; bd = 0;
      for (int t = 0; t < 4; t++) begin
        s = 0;
        for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) s += T[t][i][j] * img[r+i-2][c+j-2];
        if (s < 0) s = -s;
        if (s > best) begin best = s; bd = t; end
      end
      if (int'(out_mag) != best / 8 || out_dir != CODE[bd]) begin
        failures++; $display("pixel %0d,%0d: got %0d/%b expected %0d/%b", r, c, out_mag, out_dir, best / 8, CODE[bd]);
      end
      if (best > 0) dir_seen[bd]++;
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
    for (int f = 0; f < 5; f++) begin
      nin = 0; nout = 0;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
        case (f)
          0: img[r][c] = 8'($urandom);
          1: img[r][c] = (c < 9) ? 8'd30 : 8'd200;
          2: img[r][c] = (r < 6) ? 8'd220 : 8'd10;
          3: img[r][c] = (r + c < 15) ? 8'd40 : 8'd180;
          default: img[r][c] = (c - r < 5) ? 8'd250 : 8'd0;
        endcase
      for (int i = 0; i < W*H; i++) begin
        while (f == 0 && $urandom_range(0, 2) == 0) @(negedge clk);
        in_valid = 1; in_pix = img[i / W][i % W];
        @(negedge clk);
        in_valid = 0;
      end
      while (busy) @(negedge clk);
      repeat (4) @(negedge clk);
      checks++;
      if (nout != W*H) begin failures++; $display("frame %0d: %0d outputs", f, nout); end
    end
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (dir_seen[t] == 0) begin failures++; $display("direction %0d never chosen", t); end
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
