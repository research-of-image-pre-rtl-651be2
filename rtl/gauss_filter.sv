// 5x5 Gaussian smoothing filter on an 8-bit grey-level raster stream.
//
// A window_gen opens a 5x5 window around each pixel; the window is weighted
// with the integer template of ipp_pkg::GAUSS_K (coefficient sum 79) and the
// sum is normalised by 79, done as a multiply by 830 and a right shift of 16
// bits (exact to within one grey level over 0..255). Pixels whose 5x5
// neighbourhood leaves the image (two-pixel frame border) pass through
// unfiltered.
//
// Interface: stream in (in_valid, in_pix), stream out (out_valid, out_pix,
// out_last on the frame's last pixel), one output per input pixel in raster
// order. busy is high while the window flushes after a frame; no input may
// arrive then. Latency: the output for pixel n is registered one clock after the clock
// that takes pixel n + 2*IMG_W + 2.
//
// The template and the 5x5 window follow the source description; the
// reciprocal normalisation and the border rule are this design's choices.
module gauss_filter #(
  parameter int IMG_W = 360,
  parameter int IMG_H = 280
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_pix,
  output logic       busy,
  output logic       out_valid,
  output logic [7:0] out_pix,
  output logic       out_last
);
  import ipp_pkg::*;

  logic       w_valid, w_border, w_last;
  logic [7:0] win [5][5];
  logic [$clog2(IMG_H)-1:0] w_row;
  logic [$clog2(IMG_W)-1:0] w_col;

  window_gen #(.K(5), .PW(8), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n, .in_valid, .in_pix, .busy,
    .out_valid(w_valid), .out_win(win), .out_row(w_row), .out_col(w_col),
    .out_border(w_border), .out_last(w_last));

  logic [14:0] wsum;
  logic [7:0]  smooth;
  logic [24:0] scaled;

  always_comb begin
    wsum = '0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++)
        wsum += 15'(GAUSS_K[r][c]) * 15'(win[r][c]);
    scaled = 25'(wsum) * 25'(GAUSS_RECIP);
    smooth = 8'(scaled >> GAUSS_RSHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= w_valid;
      out_last  <= w_last;
      if (w_valid) out_pix <= w_border ? win[2][2] : smooth;
    end
  end

  logic unused;
  assign unused = ^{w_row, w_col};

endmodule
