// Non-maxima suppression of a gradient-magnitude stream.
//
// A window_gen opens a 3x3 window ("open circuit 2") over the gradient
// magnitude; the 2-bit direction code travels in the same window so that the
// centre's direction stays aligned with its magnitude. The centre magnitude is
// kept when it is a maximum along its gradient direction: strictly larger than
// the neighbour on the negative side (left, up, up-left or up-right) and at
// least as large as the neighbour on the positive side. Otherwise, and for the
// one-pixel frame border, the output is 0.
//
// Interface: stream in (in_valid, in_mag, in_dir), stream out (out_valid,
// out_mag, out_last), one output per input pixel in raster order; busy as in
// window_gen. Latency: the output for pixel n is registered one clock after the
// clock that takes pixel n + IMG_W + 1.
//
// The 3x3 window and the comparison with the two neighbours along the
// gradient direction follow the source description. The description asks for
// the centre to be larger than both neighbours; this design accepts equality
// on one side so that a two-pixel-wide ridge keeps one pixel rather than none.
module nms #(
  parameter int IMG_W = 360,
  parameter int IMG_H = 280
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [7:0]    in_mag,
  input  ipp_pkg::dir_e in_dir,
  output logic          busy,
  output logic          out_valid,
  output logic [7:0]    out_mag,
  output logic          out_last
);
  import ipp_pkg::*;

  logic       w_valid, w_border, w_last;
  logic [9:0] win [3][3];
  logic [$clog2(IMG_H)-1:0] w_row;
  logic [$clog2(IMG_W)-1:0] w_col;

  window_gen #(.K(3), .PW(10), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n, .in_valid, .in_pix({in_dir, in_mag}), .busy,
    .out_valid(w_valid), .out_win(win), .out_row(w_row), .out_col(w_col),
    .out_border(w_border), .out_last(w_last));

  logic [7:0] c_mag, n_neg, n_pos;
  dir_e       c_dir;
  logic       keep;
  always_comb begin
    c_mag = win[1][1][7:0];
    c_dir = dir_e'(win[1][1][9:8]);
    unique case (c_dir)
      DIR_H:   begin n_neg = win[1][0][7:0]; n_pos = win[1][2][7:0]; end
      DIR_V:   begin n_neg = win[0][1][7:0]; n_pos = win[2][1][7:0]; end
      DIR_DL:  begin n_neg = win[0][0][7:0]; n_pos = win[2][2][7:0]; end
      default: begin n_neg = win[0][2][7:0]; n_pos = win[2][0][7:0]; end
    endcase
    keep = !w_border && (c_mag > n_neg) && (c_mag >= n_pos);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mag   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= w_valid;
      out_last  <= w_last;
      if (w_valid) out_mag <= keep ? c_mag : 8'd0;
    end
  end

  logic unused;
  assign unused = ^{w_row, w_col};

endmodule
