// Self-checking testbench for addr_gen: three frames of a 7x5 image with
// random idle clocks, the last with a non-zero base. Each valid pixel must
// carry address BASE + its raster index, restarting after the frame-last
// pixel.
module tb_addr_gen;
  localparam int W = 7, H = 5, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_last = 0;
  logic [AW-1:0] addr0, addr1;

  addr_gen #(.IMG_W(W), .IMG_H(H), .AW(AW)) dut0 (.clk, .rst_n, .in_valid, .in_last, .addr(addr0));
  addr_gen #(.IMG_W(W), .IMG_H(H), .AW(AW), .BASE(6'd20)) dut1 (.clk, .rst_n, .in_valid, .in_last, .addr(addr1));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++)
      for (int i = 0; i < W*H; i++) begin
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        in_valid = 1; in_last = (i == W*H-1);
        checks++;
        if (int'(addr0) != i || int'(addr1) != (20 + i) % 64) begin
          failures++; $display("frame %0d pixel %0d: %0d %0d", f, i, addr0, addr1);
        end
        @(negedge clk);
        in_valid = 0; in_last = 0;
      end
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
