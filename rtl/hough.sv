// Hough transform for straight lines on a binary edge-image stream.
//
// Edge bits arrive one per clock in raster order (IMG_W x IMG_H). A pixel
// counter gives each pixel its coordinates x = col - IMG_W/2, y = row -
// IMG_H/2; every edge pixel enters the NSTAGES-stage rotation pipeline
// (hough_pipe), whose stage i addresses accumulator RAM 2i with rho_x(i) and
// RAM 2i+1 with rho_y(i). All 2*(NSTAGES+1) RAMs accumulate in the same clock,
// so a pixel's votes for every angle are cast at one pixel per clock.
//
// When the image's last pixel has left the pipeline, hough_peak scans the
// RAMs row by row in rho, keeps each cell that is a 3x3 local maximum above
// peak_th and writes one NRAM-bit row per rho to the external RAM (ext_we,
// ext_addr = rho + RHO_MAX, ext_data bit k for RAM k; a 1 marks a line).
// The scan also clears the RAMs. After reset a clearing scan runs first.
//
// Interface: in_valid/in_edge/in_last; no input while busy is high (from
// in_last until the external write of the last row, about NSTAGES + NRHO + 8
// clocks, and during the clearing scan after reset). bypass_cnt counts votes
// that took the RAMs' read-during-write bypass (for observation).
//
// The structure (pipeline, 102 RAMs, accumulators, address generator,
// peak-extraction thresholding, external RAM) follows the source description;
// image size, coordinate origin and widths are this design's choices.
module hough #(
  parameter int IMG_W   = 360,
  parameter int IMG_H   = 280,
  parameter int NSTAGES = 50,
  parameter int SHIFT   = 5,
  parameter int FRAC    = 8,
  parameter int DW      = 8,
  parameter int RHO_MAX = ipp_pkg::hough_rho_max(IMG_W, IMG_H),
  parameter int NRAM    = 2 * (NSTAGES + 1),
  parameter int NRHO    = 2 * RHO_MAX + 1,
  parameter int AW      = $clog2(NRHO)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            in_edge,
  input  logic            in_last,
  input  logic [DW-1:0]   peak_th,
  output logic            busy,
  output logic            done,
  output logic            ext_we,
  output logic [AW-1:0]   ext_addr,
  output logic [NRAM-1:0] ext_data,
  output logic [31:0]     bypass_cnt
);
  localparam int CW = $clog2((IMG_W > IMG_H ? IMG_W : IMG_H)) + 1;
  localparam int XW = $clog2(IMG_W);
  localparam int YW = $clog2(IMG_H);

  // Pixel coordinates.
  logic [XW-1:0] col;
  logic [YW-1:0] row;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else if (in_valid) begin
      if (in_last) begin
        col <= '0;
        row <= '0;
      end else if (col == XW'(IMG_W - 1)) begin
        col <= '0;
        row <= row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  logic signed [CW-1:0] px, py;
  assign px = $signed(CW'(col)) - CW'(IMG_W / 2);
  assign py = $signed(CW'(row)) - CW'(IMG_H / 2);

  logic          st_valid  [NSTAGES+1];
  logic [AW-1:0] st_addr_x [NSTAGES+1];
  logic [AW-1:0] st_addr_y [NSTAGES+1];

  hough_pipe #(.NSTAGES(NSTAGES), .SHIFT(SHIFT), .FRAC(FRAC), .CW(CW),
               .RHO_MAX(RHO_MAX), .RW(AW)) u_pipe (
    .clk, .rst_n, .in_valid(in_valid && in_edge), .in_x(px), .in_y(py),
    .st_valid, .st_addr_x, .st_addr_y);

  // Drain: wait for the last pixel's votes to be written, then scan.
  localparam int DRAIN = NSTAGES + 4;
  logic [$clog2(DRAIN+1)-1:0] drain;
  logic draining, start;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draining <= 1'b0;
      drain    <= '0;
    end else if (in_valid && in_last) begin
      draining <= 1'b1;
      drain    <= '0;
    end else if (draining) begin
      drain <= drain + 1'b1;
      if (int'(drain) == DRAIN - 1) draining <= 1'b0;
    end
  end
  assign start = draining && (int'(drain) == DRAIN - 1);

  logic            rd_en;
  logic [AW-1:0]   rd_addr;
  logic [DW-1:0]   rd_data [NRAM];
  logic [NRAM-1:0] byp;
  logic            pk_busy;

  for (genvar i = 0; i <= NSTAGES; i++) begin : g_ram
    hough_acc_ram #(.DEPTH(NRHO), .DW(DW), .AW(AW)) u_x (
      .clk, .rst_n, .inc_valid(st_valid[i]), .inc_addr(st_addr_x[i]),
      .rd_en, .rd_addr, .rd_data(rd_data[2*i]), .bypass(byp[2*i]));
    hough_acc_ram #(.DEPTH(NRHO), .DW(DW), .AW(AW)) u_y (
      .clk, .rst_n, .inc_valid(st_valid[i]), .inc_addr(st_addr_y[i]),
      .rd_en, .rd_addr, .rd_data(rd_data[2*i+1]), .bypass(byp[2*i+1]));
  end

  hough_peak #(.NRAM(NRAM), .NRHO(NRHO), .DW(DW), .AW(AW)) u_peak (
    .clk, .rst_n, .start, .peak_th, .busy(pk_busy), .done,
    .rd_en, .rd_addr, .rd_data, .ext_we, .ext_addr, .ext_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bypass_cnt <= '0;
    else        bypass_cnt <= bypass_cnt + 32'($countones(byp));
  end

  assign busy = draining || pk_busy;

  a_no_input_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_valid && busy));

endmodule
