// KxK sliding-window generator over a raster-scanned image stream.
//
// Pixels arrive one per in_valid in raster order, IMG_W per line and IMG_H
// lines per frame. K-1 line buffers, each one image line deep, hold the
// previous lines; on every shift each row of the KxK window register moves one
// place to the left and the column formed by the new pixel and the line-buffer
// outputs enters at the right end (new pixel bottom right). The window centre
// therefore trails the input by R = K/2 lines and R pixels.
//
// Because of that lag the last R*IMG_W+R window positions of a frame need
// further shifts after the last input pixel. The block makes them itself:
// after the frame's last pixel it shifts once per clock (busy = 1) until the
// last centre has been output. The source must not present pixels while busy
// is high (an assertion checks it); this is the frame gap the design relies on.
//
// Output: out_valid marks one window per image pixel, in raster order of the
// centre pixel, with its coordinates. out_border is set when the KxK window
// around the centre leaves the image; the window contents are then partly
// from other lines or frames and the consumer must not use them as image data.
// out_last marks the frame's last centre. Latency from a pixel to the window
// it completes: one clock.
//
// The window shifting left with the new pixel entering on the right follows
// the source description; the line-buffer organisation, the self-flush and the
// border flag are this design's own choices.
module window_gen #(
  parameter int K     = 5,
  parameter int PW    = 8,
  parameter int IMG_W = 360,
  parameter int IMG_H = 280
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [PW-1:0]             in_pix,
  output logic                      busy,
  output logic                      out_valid,
  output logic [PW-1:0]             out_win [K][K],
  output logic [$clog2(IMG_H)-1:0]  out_row,
  output logic [$clog2(IMG_W)-1:0]  out_col,
  output logic                      out_border,
  output logic                      out_last
);
  localparam int R     = K / 2;
  localparam int DELAY = R * IMG_W + R;        // shifts before the first centre
  localparam int NPIX  = IMG_W * IMG_H;
  localparam int CW    = $clog2(NPIX + DELAY + 1);
  localparam int XW    = $clog2(IMG_W);
  localparam int YW    = $clog2(IMG_H);

  logic [PW-1:0] lbuf [K-1][IMG_W];
  logic [XW-1:0] wcol;            // column written into the line buffers
  logic [CW-1:0] nshift;          // shifts made in this frame
  logic          flushing;
  logic          shift;
  logic [PW-1:0] col_in [K];
  logic [YW-1:0] crow;
  logic [XW-1:0] ccol;

  assign shift = in_valid || flushing;
  assign busy  = flushing;

  always_comb begin
    for (int k = 0; k < K - 1; k++) col_in[k] = lbuf[k][wcol];
    col_in[K-1] = flushing ? '0 : in_pix;
  end

  // Line buffers: lbuf[K-2] holds the previous line, lbuf[0] the oldest.
  always_ff @(posedge clk) begin
    if (shift) begin
      for (int k = 0; k < K - 1; k++) lbuf[k][wcol] <= col_in[k+1];
    end
  end

  // Window register.
  always_ff @(posedge clk) begin
    if (shift) begin
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) out_win[r][c] <= out_win[r][c+1];
        out_win[r][K-1] <= col_in[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcol       <= '0;
      nshift     <= '0;
      flushing   <= 1'b0;
      crow       <= '0;
      ccol       <= '0;
      out_valid  <= 1'b0;
      out_row    <= '0;
      out_col    <= '0;
      out_border <= 1'b0;
      out_last   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (shift) begin
        wcol <= (wcol == XW'(IMG_W - 1)) ? '0 : wcol + 1'b1;
        if (nshift == CW'(NPIX - 1)) flushing <= 1'b1;
        if (nshift >= CW'(DELAY)) begin
          out_valid  <= 1'b1;
          out_row    <= crow;
          out_col    <= ccol;
          out_border <= (int'(crow) < R) || (int'(crow) >= IMG_H - R) ||
                        (int'(ccol) < R) || (int'(ccol) >= IMG_W - R);
          if (ccol == XW'(IMG_W - 1)) begin
            ccol <= '0;
            crow <= crow + 1'b1;
          end else begin
            ccol <= ccol + 1'b1;
          end
          if (nshift == CW'(NPIX + DELAY - 1)) begin
            out_last <= 1'b1;
            flushing <= 1'b0;
            nshift   <= '0;
            wcol     <= '0;
            crow     <= '0;
            ccol     <= '0;
          end else begin
            nshift <= nshift + 1'b1;
          end
        end else begin
          nshift <= nshift + 1'b1;
        end
      end
    end
  end

  // The source keeps the frame gap: no pixels while the window flushes.
  a_no_input_while_flushing: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_valid && flushing));

endmodule
