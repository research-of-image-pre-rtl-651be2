// Image pre-processing front end: colour conversion, adaptive-threshold Canny
// edge detection and Hough line extraction on one camera pixel stream.
//
// A YUV pixel stream (one pixel per in_valid, raster order, IMG_W x IMG_H)
// feeds two paths. yuv2rgb turns every pixel into RGB (rgb_* outputs, four
// clocks later). The luma Y is the grey-level image of canny_edge, whose
// binary edge image leaves with a storage address (edge_* outputs) for an
// external frame store, and also enters the Hough transform. At the end of
// each edge image the Hough block writes its thresholded accumulator matrix,
// one row of 2*(NSTAGES+1) line flags per rho, to an external RAM (line_*
// outputs).
//
// Frame protocol: the source starts a frame only while busy is low and then
// sends its IMG_W*IMG_H pixels; busy rises with the frame's last pixel and
// stays high until the edge image, the threshold search and the Hough
// read-out are complete (and during the accumulator clearing after reset).
// Canny thresholds found on one frame are applied to the next.
//
// The three processing blocks and their order follow the source description;
// feeding Y as the grey image, the combined busy handshake and the external
// memory ports as plain address/data/write-enable signals are this design's
// choices.
module ipp_top #(
  parameter int IMG_W   = 360,
  parameter int IMG_H   = 280,
  parameter int NBINS   = 100,
  parameter int CNT_W   = 12,
  parameter int DIFF_TH = 0,
  parameter int NSTAGES = 50,
  parameter int SHIFT   = 5,
  parameter int FRAC    = 8,
  parameter int ACC_W   = 8,
  parameter int EAW     = $clog2(IMG_W * IMG_H),
  parameter int NRAM    = 2 * (NSTAGES + 1),
  parameter int RHO_MAX = ipp_pkg::hough_rho_max(IMG_W, IMG_H),
  parameter int LAW     = $clog2(2 * RHO_MAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // Camera stream
  input  logic             in_valid,
  input  logic [7:0]       in_y,
  input  logic [7:0]       in_u,
  input  logic [7:0]       in_v,
  output logic             busy,
  // RGB stream
  output logic             rgb_valid,
  output logic [7:0]       rgb_r,
  output logic [7:0]       rgb_g,
  output logic [7:0]       rgb_b,
  // Edge image to the external frame store
  output logic             edge_valid,
  output logic             edge_bit,
  output logic             edge_last,
  output logic [EAW-1:0]   edge_addr,
  output logic [7:0]       th_h,
  output logic [7:0]       th_l,
  output logic             th_valid,
  // Hough line flags to the external RAM
  input  logic [ACC_W-1:0] peak_th,
  output logic             line_we,
  output logic [LAW-1:0]   line_addr,
  output logic [NRAM-1:0]  line_data,
  output logic             hough_done,
  output logic [31:0]      hough_bypass_cnt
);
  logic canny_busy, hough_busy;

  yuv2rgb u_yuv2rgb (
    .clk, .rst_n, .in_valid, .in_y, .in_u, .in_v,
    .out_valid(rgb_valid), .out_r(rgb_r), .out_g(rgb_g), .out_b(rgb_b));

  canny_edge #(.IMG_W(IMG_W), .IMG_H(IMG_H), .NBINS(NBINS), .CNT_W(CNT_W),
               .DIFF_TH(DIFF_TH), .AW(EAW)) u_canny (
    .clk, .rst_n, .in_valid, .in_pix(in_y), .busy(canny_busy),
    .edge_valid, .edge_bit, .edge_last, .edge_addr, .th_h, .th_l, .th_valid);

  hough #(.IMG_W(IMG_W), .IMG_H(IMG_H), .NSTAGES(NSTAGES), .SHIFT(SHIFT),
          .FRAC(FRAC), .DW(ACC_W), .RHO_MAX(RHO_MAX), .NRAM(NRAM),
          .NRHO(2 * RHO_MAX + 1), .AW(LAW)) u_hough (
    .clk, .rst_n, .in_valid(edge_valid), .in_edge(edge_bit), .in_last(edge_last),
    .peak_th, .busy(hough_busy), .done(hough_done),
    .ext_we(line_we), .ext_addr(line_addr), .ext_data(line_data),
    .bypass_cnt(hough_bypass_cnt));

  assign busy = canny_busy || hough_busy;

endmodule
