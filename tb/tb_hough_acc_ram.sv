// Self-checking testbench for hough_acc_ram (37 cells of 4 bits). After a
// clearing read-out, rounds of random votes (often back to back on the same
// cell, so the bypass is used) are followed by a read-out of every cell,
// which must return the vote count saturated at 15, one clock after the read;
// a second read-out must return zeros. Bypassed votes must occur.
module tb_hough_acc_ram;
  localparam int DEPTH = 37, DW = 4, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic inc_valid = 0, rd_en = 0, bypass;
  logic [AW-1:0] inc_addr = 0, rd_addr = 0;
  logic [DW-1:0] rd_data;
  int n_bypass = 0;

  hough_acc_ram #(.DEPTH(DEPTH), .DW(DW), .AW(AW)) dut (.*);

  always @(posedge clk) if (bypass) n_bypass++;

  task automatic readout(int exp [DEPTH], string what);
    for (int a = 0; a < DEPTH; a++) begin
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (int'(rd_data) != exp[a]) begin
        failures++; $display("%s cell %0d: got %0d expected %0d", what, a, rd_data, exp[a]);
      end
    end
  endtask

  initial begin
    int cnt [DEPTH];
    int zero [DEPTH];
    int a;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) zero[i] = 0;
    // Clear whatever the RAM powered up with.
    for (int i = 0; i < DEPTH; i++) begin
      rd_en = 1; rd_addr = AW'(i); @(negedge clk);
    end
    rd_en = 0;
    @(negedge clk);
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < DEPTH; i++) cnt[i] = 0;
      a = 0;
      for (int n = 0; n < 300; n++) begin
        if ($urandom_range(0, 2) != 0) a = $urandom_range(0, DEPTH - 1);
        if (round == 3) a = n % 3;
        inc_valid = 1; inc_addr = AW'(a);
        cnt[a] = (cnt[a] < 15) ? cnt[a] + 1 : 15;
        @(negedge clk);
        inc_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      @(negedge clk);
      readout(cnt, "count");
      readout(zero, "cleared");
    end
    checks++;
    if (n_bypass == 0) begin failures++; $display("bypass never used"); end
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
