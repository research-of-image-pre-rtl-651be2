// Self-checking testbench for nms on 20x14 frames of random gradient
// magnitudes (some frames drawn from a few values so that ties occur) and
// random directions. For each interior pixel the expected output is its
// magnitude when it beats the neighbour before it along its direction and is
// not below the one after it, else 0; border pixels give 0. It also checks
// pixel count, frame-last flag and latency, and counts kept and suppressed
// pixels of each direction.
module tb_nms;
  localparam int W = 20, H = 14;
  localparam int R = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0;
  logic [7:0] in_mag = 0;
  ipp_pkg::dir_e in_dir = ipp_pkg::DIR_H;
  logic       busy, out_valid, out_last;
  logic [7:0] out_mag;
  int kept [4], supp [4];

  nms #(.IMG_W(W), .IMG_H(H)) dut (.*);

  logic [7:0] img [H][W];
  logic [1:0] dir [H][W];
  int cycle = 0, nin = 0, nout = 0;
  int in_cycle [W*H];

  always @(posedge clk) begin
    cycle++;
    if (in_valid) begin in_cycle[nin] = cycle; nin++; end
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int r, c, e, dr, dc, a, b, di;
    r = nout / W; c = nout % W;
    checks++;
    e = 0;
    if (!(r < R || r >= H - R || c < R || c >= W - R)) begin
      // 00 horizontal, 01 vertical, 11 left diagonal, 10 right diagonal
      case (dir[r][c])
        2'b00: begin dr = 0; dc = 1; di = 0; end
        2'b01: begin dr = 1; dc = 0; di = 1; end
        2'b11: begin dr = 1; dc = 1; di = 2; end
        default: begin dr = 1; dc = -1; di = 3; end
      endcase
      a = img[r-dr][c-dc];
      b = img[r+dr][c+dc];
      if (img[r][c] > a && img[r][c] >= b) begin e = img[r][c]; kept[di]++; end
      else supp[di]++;
    end
    if (int'(out_mag) != e) begin
      failures++; $display("pixel %0d,%0d: got %0d expected %0d", r, c, out_mag, e);
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
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        img[r][c] = (f == 2) ? 8'($urandom_range(0, 3) * 40) : 8'($urandom);
        dir[r][c] = 2'($urandom);
      end
      for (int i = 0; i < W*H; i++) begin
        while (f == 1 && $urandom_range(0, 2) == 0) @(negedge clk);
        in_valid = 1; in_mag = img[i / W][i % W]; in_dir = ipp_pkg::dir_e'(dir[i / W][i % W]);
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
      if (kept[t] == 0 || supp[t] == 0) begin failures++; $display("direction %0d not exercised", t); end
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
