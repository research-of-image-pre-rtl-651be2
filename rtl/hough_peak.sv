// Peak-extraction thresholding of the Hough accumulator matrix.
//
// On start the address generator reads rho = 0, 1, ..., NRHO-1 from all NRAM
// accumulator RAMs at once, one rho per clock, so each clock delivers one row
// of NRAM cells. The rows enter an NRAM x 3 window that moves down one row per
// clock; rows before rho = 0 and after rho = NRHO-1 are zero. For every cell
// of the middle row the comparators test its 3x3 neighbourhood: the cell is a
// peak (1) when it is not smaller than any of its eight neighbours and larger
// than peak_th, otherwise 0. Each clock the NRAM result bits of one rho are
// written to the external RAM at address rho.
//
// Columns: RAM 2i holds theta = i*step (rho_x of stage i) and RAM 2i+1 theta =
// pi/2 + i*step (rho_y of stage i). The window orders its columns by theta
// (RAMs 0, 2, ..., NRAM-2, then 1, 3, ..., NRAM-1), so that left and right
// neighbours are neighbouring angles; a neighbour outside the first or last
// column counts as 0. ext_data bit k belongs to RAM k.
//
// Because the RAMs clear each cell as it is read, the same scan empties the
// accumulators. After reset one scan runs with ext_we held low to clear
// them. Timing: start to done takes NRHO + 4 clocks.
//
// The scan from small to large rho, the NRAM x 3 window, the 3x3 local-maximum
// test against a threshold and the row-wise external write follow the source
// description; the column order, ties counting as peaks, the zero rows and
// the clearing scan are this design's choices.
module hough_peak #(
  parameter int NRAM = 102,
  parameter int NRHO = 481,
  parameter int DW   = 8,
  parameter int AW   = $clog2(NRHO)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [DW-1:0]   peak_th,
  output logic            busy,
  output logic            done,
  // Read port to the accumulator RAMs (data one clock after rd_en).
  output logic            rd_en,
  output logic [AW-1:0]   rd_addr,
  input  logic [DW-1:0]   rd_data [NRAM],
  // External RAM write port.
  output logic            ext_we,
  output logic [AW-1:0]   ext_addr,
  output logic [NRAM-1:0] ext_data
);
  localparam int NH = NRAM / 2;

  logic          scanning, init_scan;
  logic [AW:0]   cnt;               // 0 .. NRHO (NRHO = the zero flush row)
  logic          d_valid, d_zero;
  logic [AW-1:0] d_row;
  logic [DW-1:0] win [3][NRAM];     // [0] newest row, [1] centre, [2] oldest
  logic          c_valid;
  logic [AW-1:0] c_row;
  logic          c_init;
  logic [NRAM-1:0] peaks;

  // Map window column (theta order) to RAM index.
  function automatic int ram_of(input int col);
    return (col < NH) ? 2 * col : 2 * (col - NH) + 1;
  endfunction

  assign busy = scanning || d_valid || c_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scanning  <= 1'b1;           // clearing scan after reset
      init_scan <= 1'b1;
      cnt       <= '0;
      d_valid   <= 1'b0;
      d_zero    <= 1'b0;
      d_row     <= '0;
      c_valid   <= 1'b0;
      c_row     <= '0;
      c_init    <= 1'b0;
      ext_we    <= 1'b0;
      ext_addr  <= '0;
      ext_data  <= '0;
      done      <= 1'b0;
    end else begin
      done    <= 1'b0;
      ext_we  <= 1'b0;
      d_valid <= 1'b0;
      c_valid <= 1'b0;
      if (start && !busy) begin
        scanning  <= 1'b1;
        init_scan <= 1'b0;
        cnt       <= '0;
      end
      // Address generator.
      if (scanning) begin
        d_valid <= 1'b1;
        d_zero  <= (int'(cnt) == NRHO);
        d_row   <= AW'(cnt);
        if (int'(cnt) == NRHO) scanning <= 1'b0;
        else                   cnt <= cnt + 1'b1;
      end
      // Window moves down one row.
      if (d_valid) begin
        c_valid <= (d_row != '0) || d_zero;
        c_row   <= d_zero ? AW'(NRHO - 1) : d_row - 1'b1;
        c_init  <= init_scan;
      end
      // Comparator output to the external RAM.
      if (c_valid) begin
        ext_we   <= !c_init;
        ext_addr <= c_row;
        ext_data <= peaks;
        if (int'(c_row) == NRHO - 1) begin
          done      <= !c_init;
          init_scan <= 1'b0;
        end
      end
    end
  end

  assign rd_en   = scanning && (int'(cnt) < NRHO);
  assign rd_addr = AW'(cnt);

  always_ff @(posedge clk) begin
    if (d_valid) begin
      for (int k = 0; k < NRAM; k++) begin
        win[0][k] <= d_zero ? '0 : rd_data[ram_of(k)];
        win[1][k] <= (d_row == '0 && !d_zero) ? '0 : win[0][k];
        win[2][k] <= (d_row == '0 && !d_zero) ? '0 : win[1][k];
      end
    end
  end

  // Comparators on the middle row.
  always_comb begin
    peaks = '0;
    for (int k = 0; k < NRAM; k++) begin
      logic ge;
      ge = 1'b1;
      for (int dr = 0; dr < 3; dr++)
        for (int dc = -1; dc <= 1; dc++)
          if ((k + dc >= 0) && (k + dc < NRAM) && !(dr == 1 && dc == 0))
            ge &= (win[1][k] >= win[dr][k+dc]);
      peaks[ram_of(k)] = ge && (win[1][k] > peak_th);
    end
  end

endmodule
