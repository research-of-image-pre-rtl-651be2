// Adaptive-threshold Canny edge detector for an 8-bit grey-level stream.
//
// Chain: 5x5 Gaussian filter -> 5x5 four-direction gradient -> 3x3
// non-maxima suppression -> (histogram threshold selection, dual-threshold
// decision) -> edge bit with its storage address. The thresholds are taken
// from the histogram of one frame's suppressed gradient and applied to the
// next frame: the design holds no frame store, so a frame's own thresholds
// are known only after the frame has passed. Until the first frame has ended
// the reset thresholds of adaptive_thresh apply.
//
// Interface: one pixel per in_valid in raster order. busy rises when the
// frame's last pixel is taken and falls when its last edge bit has been
// delivered and the threshold search is over (about 6*IMG_W + 20 clocks); no
// pixel may be presented while it is high. Output: one edge bit per pixel
// (edge_valid, edge_bit, edge_last) with its address edge_addr; the
// thresholds in use (th_h, th_l) and th_valid when new ones are loaded.
// Latency: the edge bit of pixel n is registered 7 clocks after the clock
// that takes pixel n + 6*IMG_W + 6 (each 5x5 stage lags 2 lines and 2
// pixels, each 3x3 stage 1 and 1).
//
// The chain follows the source description; applying the thresholds to the
// next frame is this design's reading of it.
module canny_edge #(
  parameter int IMG_W   = 360,
  parameter int IMG_H   = 280,
  parameter int NBINS   = 100,
  parameter int CNT_W   = 12,
  parameter int DIFF_TH = 0,
  parameter int AW      = $clog2(IMG_W * IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [7:0]    in_pix,
  output logic          busy,
  output logic          edge_valid,
  output logic          edge_bit,
  output logic          edge_last,
  output logic [AW-1:0] edge_addr,
  output logic [7:0]    th_h,
  output logic [7:0]    th_l,
  output logic          th_valid
);
  import ipp_pkg::*;

  logic       g_valid, g_last, g_busy;
  logic [7:0] g_pix;
  logic       d_valid, d_last, d_busy;
  logic [7:0] d_mag;
  dir_e       d_dir;
  logic       n_valid, n_last, n_busy;
  logic [7:0] n_mag;
  logic       t_busy, e_busy;

  gauss_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_gauss (
    .clk, .rst_n, .in_valid, .in_pix, .busy(g_busy),
    .out_valid(g_valid), .out_pix(g_pix), .out_last(g_last));

  grad_calc #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_grad (
    .clk, .rst_n, .in_valid(g_valid), .in_pix(g_pix), .busy(d_busy),
    .out_valid(d_valid), .out_mag(d_mag), .out_dir(d_dir), .out_last(d_last));

  nms #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_nms (
    .clk, .rst_n, .in_valid(d_valid), .in_mag(d_mag), .in_dir(d_dir),
    .busy(n_busy), .out_valid(n_valid), .out_mag(n_mag), .out_last(n_last));

  adaptive_thresh #(.NBINS(NBINS), .CNT_W(CNT_W), .DIFF_TH(DIFF_TH)) u_thr (
    .clk, .rst_n, .in_valid(n_valid), .in_mag(n_mag), .in_last(n_last),
    .busy(t_busy), .th_h, .th_l, .th_valid);

  dual_thresh #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_dual (
    .clk, .rst_n, .in_valid(n_valid), .in_mag(n_mag), .in_last(n_last),
    .th_h, .th_l, .busy(e_busy),
    .out_valid(edge_valid), .out_edge(edge_bit), .out_last(edge_last));

  addr_gen #(.IMG_W(IMG_W), .IMG_H(IMG_H), .AW(AW)) u_addr (
    .clk, .rst_n, .in_valid(edge_valid), .in_last(edge_last), .addr(edge_addr));

  // Frame tail: from the frame's last input pixel until its last edge bit
  // has left and the threshold search is over. The stage windows flush one
  // after the other, so their busy flags alone leave short holes.
  localparam int NPIX = IMG_W * IMG_H;
  logic [$clog2(NPIX)-1:0] nin;
  logic                    tail;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nin  <= '0;
      tail <= 1'b0;
    end else begin
      if (in_valid) begin
        if (int'(nin) == NPIX - 1) begin
          nin  <= '0;
          tail <= 1'b1;
        end else begin
          nin <= nin + 1'b1;
        end
      end
      if (edge_valid && edge_last) tail <= 1'b0;
    end
  end

  assign busy = tail || g_busy || d_busy || n_busy || t_busy || e_busy;

  a_no_input_in_tail: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_valid && busy));

endmodule
