// Self-checking testbench for window_gen. Two instances (5x5 of 8-bit pixels
// and 3x3 of 4-bit pixels) take the same random 16x12 frames, with random
// idle clocks between pixels and the frame gap the block asks for. For every
// output the test checks the raster order of the centres, the border flag,
// the frame-last flag, every window cell of an interior centre against the
// stored frame, and that a window completed by an input pixel appears one
// clock after that pixel is taken.
module tb_window_gen;
  localparam int W = 16, H = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0;
  logic [7:0] in_pix = 0;
  logic       busy5, busy3;
  logic       v5, b5, l5, v3, b3, l3;
  logic [7:0] w5 [5][5];
  logic [3:0] w3 [3][3];
  logic [3:0] r5, r3;
  logic [3:0] c5, c3;

  window_gen #(.K(5), .PW(8), .IMG_W(W), .IMG_H(H)) dut5 (
    .clk, .rst_n, .in_valid, .in_pix, .busy(busy5), .out_valid(v5),
    .out_win(w5), .out_row(r5), .out_col(c5), .out_border(b5), .out_last(l5));
  window_gen #(.K(3), .PW(4), .IMG_W(W), .IMG_H(H)) dut3 (
    .clk, .rst_n, .in_valid, .in_pix(in_pix[3:0]), .busy(busy3), .out_valid(v3),
    .out_win(w3), .out_row(r3), .out_col(c3), .out_border(b3), .out_last(l3));

  logic [7:0] img [H][W];
  int cycle = 0;
  int in_cycle [W*H];
  int nin = 0, n5 = 0, n3 = 0;

  always @(posedge clk) begin
    cycle++;
    if (in_valid) begin in_cycle[nin] = cycle; nin++; end
  end

  task automatic check_out(int K, int n, logic [3:0] row, logic [3:0] col,
                           logic border, logic last, output bit ok_pos);
    int R, er, ec;
    bit eb;
    R = K / 2;
    er = n / W; ec = n % W;
    eb = (er < R) || (er >= H - R) || (ec < R) || (ec >= W - R);
    checks++;
    ok_pos = (int'(row) == er) && (int'(col) == ec);
    if (!ok_pos || border != eb || last != (n == W*H-1)) begin
      failures++;
      $display("K=%0d out %0d: pos %0d,%0d border %0b last %0b", K, n, row, col, border, last);
    end
    // A window completed by a real input shows one clock after it.
    if (n + R*W + R < W*H) begin
      checks++;
      if (cycle != in_cycle[n + R*W + R]) begin
        failures++;
        $display("K=%0d out %0d: clock %0d, input clock %0d", K, n, cycle, in_cycle[n + R*W + R]);
      end
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    bit ok;
    if (v5) begin
      check_out(5, n5, r5, c5, b5, l5, ok);
      if (ok && !b5) begin
        checks++;
        for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++)
          if (w5[r][c] != img[int'(r5)+r-2][int'(c5)+c-2]) begin
            failures++; $display("K=5 window mismatch at %0d,%0d cell %0d,%0d", r5, c5, r, c);
          end
      end
      n5++;
    end
    if (v3) begin
      check_out(3, n3, r3, c3, b3, l3, ok);
      if (ok && !b3) begin
        checks++;
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++)
          if (w3[r][c] != img[int'(r3)+r-1][int'(c3)+c-1][3:0]) begin
            failures++; $display("K=3 window mismatch at %0d,%0d", r3, c3);
          end
      end
      n3++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      nin = 0; n5 = 0; n3 = 0;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = 8'($urandom);
      for (int i = 0; i < W*H; i++) begin
        while (f == 1 && $urandom_range(0, 2) == 0) @(negedge clk);
        in_valid = 1; in_pix = img[i / W][i % W];
        @(negedge clk);
        in_valid = 0;
      end
      while (busy5 || busy3) @(negedge clk);
      repeat (3) @(negedge clk);
      checks++;
      if (n5 != W*H || n3 != W*H) begin
        failures++; $display("frame %0d: %0d / %0d windows", f, n5, n3);
      end
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
