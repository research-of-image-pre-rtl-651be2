// Self-checking testbench for hough_peak with 10 RAMs of 13 cells (4 bits).
// A model of the accumulator RAMs answers reads one clock later. After the
// clearing scan that follows reset (which must write nothing), several random
// matrices with planted peaks and ties are scanned. Every external write must
// come in rho order, once per rho, and carry for each RAM k the bit "cell is
// >= its eight neighbours (columns in angle order 0,2,4,6,8,1,3,5,7,9, zero
// outside) and > peak_th"; done must follow start within NRHO + 6 clocks.
module tb_hough_peak;
  localparam int NRAM = 10, NRHO = 13, DW = 4, AW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done, rd_en, ext_we;
  logic [DW-1:0] peak_th = 0;
  logic [AW-1:0] rd_addr, ext_addr;
  logic [DW-1:0] rd_data [NRAM];
  logic [NRAM-1:0] ext_data;

  hough_peak #(.NRAM(NRAM), .NRHO(NRHO), .DW(DW), .AW(AW)) dut (.*);

  int mat [NRHO][NRAM];
  always @(posedge clk) if (rd_en) for (int k = 0; k < NRAM; k++) rd_data[k] <= DW'(mat[rd_addr][k]);

  int next_row = 0, nwrites = 0, npeaks = 0;
  bit expect_writes = 0;

  function automatic int col_ram(int col);
    return (col < NRAM / 2) ? 2 * col : 2 * (col - NRAM / 2) + 1;
  endfunction

  always @(negedge clk) if (rst_n && ext_we) begin
    int rho;
    logic [NRAM-1:0] e;
    rho = int'(ext_addr);
    nwrites++;
    checks++;
    if (!expect_writes || rho != next_row) begin
      failures++; $display("unexpected write rho %0d (next %0d)", rho, next_row);
    end
    next_row = rho + 1;
    e = '0;
    for (int col = 0; col < NRAM; col++) begin
      bit ge;
      int c;
      c = mat[rho][col_ram(col)];
      ge = 1;
      for (int dr = -1; dr <= 1; dr++) for (int dc = -1; dc <= 1; dc++) begin
        int v;
        v = 0;
        if (rho + dr >= 0 && rho + dr < NRHO && col + dc >= 0 && col + dc < NRAM)
          v = mat[rho+dr][col_ram(col+dc)];
        if (c < v) ge = 0;
      end
      e[col_ram(col)] = ge && (c > int'(peak_th));
    end
    npeaks += $countones(e);
    if (ext_data != e) begin
      failures++; $display("rho %0d: got %b expected %b", rho, ext_data, e);
    end
  end

  initial begin
    int t0;
    for (int r = 0; r < NRHO; r++) for (int k = 0; k < NRAM; k++) mat[r][k] = 9;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (nwrites != 0) begin failures++; $display("clearing scan wrote %0d rows", nwrites); end
    expect_writes = 1;
    for (int m = 0; m < 6; m++) begin
      for (int r = 0; r < NRHO; r++) for (int k = 0; k < NRAM; k++)
        mat[r][k] = (m == 5) ? 3 : $urandom_range(0, 6);
      for (int p = 0; p < 3; p++) mat[$urandom_range(0, NRHO-1)][$urandom_range(0, NRAM-1)] = $urandom_range(8, 15);
      mat[0][0] = 12; mat[NRHO-1][NRAM-1] = 12;
      peak_th = DW'((m == 5) ? 2 : $urandom_range(3, 9));
      next_row = 0; nwrites = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      t0 = 0;
      while (!done && t0 < NRHO + 10) begin @(negedge clk); t0++; end
      @(posedge clk);   // let the monitor take the last row first
      checks++;
      if (!done || t0 > NRHO + 6 || nwrites != NRHO) begin
        failures++; $display("scan %0d: done after %0d clocks, %0d rows", m, t0, nwrites);
      end
      @(negedge clk);
      @(negedge clk);
    end
    checks++;
    if (npeaks == 0) begin failures++; $display("no peak found"); end
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
