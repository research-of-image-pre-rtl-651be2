// Self-checking testbench for hough_pipe at its full 50 stages. Random edge
// coordinates (and the image corners) enter with random gaps. Every clock
// each valid stage i must show the pixel that entered i clocks before it,
// with addresses equal to a fixed-point model of the recurrence
// rho_x += rho_y/32, rho_y -= rho_x/32 (8 fraction bits, floor shifts, round
// to nearest), and within 2 of the exact rotation x cos + y sin at angle
// i*atan(1/32), scaled by the growth sqrt(1 + 1/1024)^i.
module tb_hough_pipe;
  localparam int NS = 50, RHO_MAX = 240, RW = 9, CW = 10, FRAC = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic signed [CW-1:0] in_x = 0, in_y = 0;
  logic st_valid [NS+1];
  logic [RW-1:0] st_addr_x [NS+1], st_addr_y [NS+1];

  hough_pipe dut (.*);

  int cycle = 0;
  int px [int], py [int];
  int nvalid = 0;

  always @(posedge clk) begin
    cycle++;
    if (in_valid) begin px[cycle] = in_x; py[cycle] = in_y; end
  end

  function automatic int floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return int'(q);
  endfunction

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i <= NS; i++) if (st_valid[i]) begin
      int x, y, ax, ay;
      longint fx, fy, nx, ny;
      real th, g, ex, ey, dx, dy;
      int gx, gy;
      checks++;
      if (!px.exists(cycle - i)) begin
        failures++; $display("stage %0d valid without a pixel", i);
        continue;
      end
      x = px[cycle - i]; y = py[cycle - i];
      fx = longint'(x) * 256; fy = longint'(y) * 256;
      for (int s = 0; s < i; s++) begin
        nx = fx + floor_div(fy, 32);
        ny = fy - floor_div(fx, 32);
        fx = nx; fy = ny;
      end
      ax = floor_div(fx + 128, 256) + RHO_MAX;
      ay = floor_div(fy + 128, 256) + RHO_MAX;
      th = i * $atan(1.0 / 32.0);
      g = $pow(1.0 + 1.0 / 1024.0, i / 2.0);
      ex = g * (x * $cos(th) + y * $sin(th)) + RHO_MAX;
      ey = g * (-x * $sin(th) + y * $cos(th)) + RHO_MAX;
      gx = int'(st_addr_x[i]);
      gy = int'(st_addr_y[i]);
      dx = gx - ex; dy = gy - ey;
      if (dx < 0) dx = -dx;
      if (dy < 0) dy = -dy;
      if (gx != ax || gy != ay || dx > 2.0 || dy > 2.0) begin
        failures++;
        $display("stage %0d (%0d,%0d): got %0d %0d model %0d %0d exact %f %f",
                 i, x, y, st_addr_x[i], st_addr_y[i], ax, ay, ex, ey);
      end
      if (i == NS) nvalid++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1;
      case (n)
        0: begin in_x = -180; in_y = -140; end
        1: begin in_x = 179;  in_y = 139;  end
        2: begin in_x = -180; in_y = 139;  end
        3: begin in_x = 179;  in_y = -140; end
        default: begin in_x = CW'($urandom_range(0, 359) - 180); in_y = CW'($urandom_range(0, 279) - 140); end
      endcase
      @(negedge clk);
      in_valid = 0;
    end
    repeat (NS + 5) @(negedge clk);
    checks++;
    if (nvalid != 400) begin failures++; $display("%0d pixels left the last stage", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
