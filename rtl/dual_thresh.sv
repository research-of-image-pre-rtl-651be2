// Dual-threshold edge decision (hysteresis over an 8-neighbourhood).
//
// Comparator 1 marks strong edges, f1 = (g > th_h); comparator 2 marks weak
// edges, f2 = (th_l < g < th_h). A 3x3 window is opened on f1; f2 is delayed by
// the same one line and one pixel so that it lines up with the window centre
// (here f2 rides in the window's line buffers, which act as that FIFO). The
// output is f1(i,j) OR (f2(i,j) AND the OR of the eight f1 neighbours).
// Neighbours outside the image count as 0.
//
// Interface: stream in (in_valid, in_mag, in_last) with thresholds th_h/th_l
// that must be stable over a frame; stream out (out_valid, out_edge, out_last)
// one bit per pixel in raster order; busy as in window_gen. Latency: the output for pixel n is registered
// one clock after the clock that takes pixel n + IMG_W + 1.
//
// The comparators, the 3x3 window on f1, the delayed f2 and the OR gates
// follow the source description; border handling is this design's choice.
module dual_thresh #(
  parameter int IMG_W = 360,
  parameter int IMG_H = 280
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_mag,
  input  logic       in_last,
  input  logic [7:0] th_h,
  input  logic [7:0] th_l,
  output logic       busy,
  output logic       out_valid,
  output logic       out_edge,
  output logic       out_last
);
  logic f1, f2;
  assign f1 = in_mag > th_h;
  assign f2 = (in_mag > th_l) && (in_mag < th_h);

  logic       w_valid, w_border, w_last;
  logic [1:0] win [3][3];
  logic [$clog2(IMG_H)-1:0] w_row;
  logic [$clog2(IMG_W)-1:0] w_col;

  window_gen #(.K(3), .PW(2), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n, .in_valid, .in_pix({f2, f1}), .busy,
    .out_valid(w_valid), .out_win(win), .out_row(w_row), .out_col(w_col),
    .out_border(w_border), .out_last(w_last));

  logic strong_nb, edge_bit;
  always_comb begin
    strong_nb = 1'b0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        if (!(dr == 0 && dc == 0) &&
            (int'(w_row) + dr >= 0) && (int'(w_row) + dr < IMG_H) &&
            (int'(w_col) + dc >= 0) && (int'(w_col) + dc < IMG_W))
          strong_nb |= win[1+dr][1+dc][0];
    edge_bit = win[1][1][0] || (win[1][1][1] && strong_nb);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_edge  <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= w_valid;
      out_last  <= w_last;
      if (w_valid) out_edge <= edge_bit;
    end
  end

  logic unused;
  assign unused = ^{w_border, in_last};

endmodule
