// Self-checking testbench for adaptive_thresh. Each frame is a list of
// gradient values drawn from a histogram shape chosen by the test (values 0
// and above 100 included, which must not be counted). The expected high
// threshold is the first bin i in 1..99 with |h(i+1) - h(i)| <= DIFF_TH, or
// 100 when there is none; the low threshold is half of it. The test also
// checks that the search ends within 101 clocks of the last pixel, that the
// histogram is cleared between frames and that the thresholds hold until the
// next search. It covers a zero found and a search that runs out.
module tb_adaptive_thresh;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0, in_last = 0;
  logic [7:0] in_mag = 0;
  logic       busy, th_valid;
  logic [7:0] th_h, th_l;
  int n_found = 0, n_none = 0;

  adaptive_thresh dut (.*);

  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic run_frame(int shape);
    int h [0:255];
    int vals [$];
    int exp_h, t0, k;
    for (int i = 0; i < 256; i++) h[i] = 0;
    case (shape)
      // Background peak falling to a flat stretch at 20..24, edge peak at 60.
      0: begin
        for (int i = 1; i <= 100; i++) h[i] = (i < 20) ? 60 - 2 * i : (i < 25 ? 5 : (i == 60 ? 30 : 1 + (i % 2)));
        h[0] = 200; h[150] = 7;
      end
      // Strictly changing everywhere: no zero difference.
      1: for (int i = 1; i <= 100; i++) h[i] = (i % 2) ? 3 : 1 + (i % 5 == 0 ? 5 : 0);
      // Random shape.
      default: for (int i = 1; i <= 100; i++) h[i] = $urandom_range(0, 6);
    endcase
    if (shape == 1) for (int i = 1; i <= 100; i++) if (i % 2 == 0) h[i] = 2 + (i / 2) % 2 * 3;
    for (int v = 0; v < 256; v++) for (int n = 0; n < h[v]; n++) vals.push_back(v);
    vals.shuffle();
    exp_h = 100;
    for (int i = 1; i <= 99; i++) begin
      int d;
      d = h[i+1] - h[i];
      if (d < 0) d = -d;
      if (d == 0) begin exp_h = i; break; end
    end
    if (exp_h == 100) n_none++; else n_found++;
    k = 0;
    foreach (vals[j]) begin
      in_valid = 1; in_mag = 8'(vals[j]); in_last = (j == vals.size() - 1);
      @(negedge clk);
      in_valid = 0; in_last = 0;
      if ($urandom_range(0, 4) == 0) @(negedge clk);
      k++;
    end
    t0 = cycle;
    while (!th_valid) begin
      @(negedge clk);
      if (cycle - t0 > 110) break;
    end
    checks++;
    if (!th_valid || cycle - t0 > 102) begin
      failures++; $display("shape %0d: search took %0d clocks", shape, cycle - t0);
    end
    checks++;
    if (int'(th_h) != exp_h || int'(th_l) != exp_h / 2) begin
      failures++; $display("shape %0d: th %0d/%0d expected %0d/%0d", shape, th_h, th_l, exp_h, exp_h / 2);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (busy || int'(th_h) != exp_h) begin failures++; $display("thresholds not held"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (th_h != 8'd100 || th_l != 8'd50) begin failures++; $display("reset thresholds"); end
    run_frame(0);
    run_frame(1);
    run_frame(0);
    for (int i = 0; i < 4; i++) run_frame(2);
    checks++;
    if (n_found == 0 || n_none == 0) begin failures++; $display("cases: %0d %0d", n_found, n_none); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
