// Self-checking testbench for yuv2rgb: drives random and corner YUV pixels
// one per clock, predicts r, g, b from the shift-add formulas evaluated with
// real arithmetic and floor(), checks the four-clock latency, and checks that
// the result stays within 4 grey levels of the exact floating-point
// conversion (before clamping).
module tb_yuv2rgb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [7:0] in_y, in_u, in_v;
  logic out_valid;
  logic [7:0] out_r, out_g, out_b;
  int checks = 0, failures = 0;

  yuv2rgb dut (.*);

  function automatic int clampi(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction
  function automatic real rabs(real v);
    return v < 0 ? -v : v;
  endfunction
  function automatic int fl(real v);
    return int'($floor(v));
  endfunction

  typedef struct { int r, g, b; } rgb_t;
  rgb_t exp_q[$];
  int   sent_cycle[$];
  int   cycle = 0;

  task automatic send(int y, int u, int v);
    rgb_t e;
    int uu, vv;
    real fr, fg, fb;
    uu = u - 128; vv = v - 128;
    e.r = clampi(y + vv + fl(vv * 103 / 256.0));
    e.g = clampi(y - (fl(uu * 88 / 256.0) + fl(vv * 183 / 256.0)));
    e.b = clampi(y + uu + fl(uu * 198 / 256.0));
    fr = y + 1.4075 * vv; fg = y - 0.3455 * uu - 0.7169 * vv; fb = y + 1.779 * uu;
    checks++;
    if (rabs(real'(e.r) - (fr < 0 ? 0 : fr > 255 ? 255 : fr)) > 4.0 ||
        rabs(real'(e.g) - (fg < 0 ? 0 : fg > 255 ? 255 : fg)) > 4.0 ||
        rabs(real'(e.b) - (fb < 0 ? 0 : fb > 255 ? 255 : fb)) > 4.0) begin
      failures++;
      $display("approximation off: y=%0d u=%0d v=%0d", y, u, v);
    end
    exp_q.push_back(e);
    in_valid = 1; in_y = 8'(y); in_u = 8'(u); in_v = 8'(v);
    @(negedge clk);
    in_valid = 0;
  endtask

  // Clock count and input capture on the rising edge; outputs are checked
  // at the falling edge. An input taken at rising edge k must be on the
  // outputs after rising edge k+4.
  always @(posedge clk) begin
    cycle++;
    if (in_valid) sent_cycle.push_back(cycle);
  end

  always @(negedge clk) begin
    rgb_t e;
    int c0;
    if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("unexpected output");
    end else begin
      e = exp_q.pop_front();
      c0 = sent_cycle.pop_front();
      if (out_r != 8'(e.r) || out_g != 8'(e.g) || out_b != 8'(e.b)) begin
        failures++;
        $display("mismatch got %0d %0d %0d exp %0d %0d %0d", out_r, out_g, out_b, e.r, e.g, e.b);
      end
      if (cycle - c0 != 3) begin
        failures++; $display("latency %0d", cycle - c0);
      end
    end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    send(0, 0, 0); send(255, 255, 255); send(128, 128, 128); send(0, 255, 0);
    send(255, 0, 255); send(16, 128, 240); send(235, 16, 128);
    for (int i = 0; i < 3000; i++) begin
      send($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
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
