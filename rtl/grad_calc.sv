// Gradient magnitude and direction of a smoothed 8-bit image stream.
//
// A window_gen opens a 5x5 window around each pixel ("open circuit 1"). Four
// directional templates give EH, EV, EDL and EDR; the compare-and-encode stage
// takes the one of largest absolute value as the gradient and encodes its
// direction in two bits (00 horizontal, 01 vertical, 11 left diagonal,
// 10 right diagonal; on a tie the earlier of H, V, DL, DR wins). The magnitude
// is |E| >> 3, which fits 8 bits because each template's positive weights sum
// to 8. Pixels within two of the frame border give magnitude 0.
//
// Interface: stream in (in_valid, in_pix), stream out (out_valid, out_mag,
// out_dir, out_last), one output per input pixel in raster order; busy as in
// window_gen. Latency: the output for pixel n is registered one clock after the clock
// that takes pixel n + 2*IMG_W + 2.
//
// The four directions, their 2-bit codes and taking the largest as the
// gradient follow the source description; the template coefficients
// (ipp_pkg::KERN_*) and the >>3 scaling are this design's own choices.
module grad_calc #(
  parameter int IMG_W = 360,
  parameter int IMG_H = 280
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_pix,
  output logic        busy,
  output logic        out_valid,
  output logic [7:0]  out_mag,
  output ipp_pkg::dir_e out_dir,
  output logic        out_last
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

  // Template arithmetic.
  logic signed [12:0] eh, ev, edl, edr;
  always_comb begin
    eh = '0; ev = '0; edl = '0; edr = '0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) begin
        eh  += 13'(KERN_H[r][c])  * $signed({5'b0, win[r][c]});
        ev  += 13'(KERN_V[r][c])  * $signed({5'b0, win[r][c]});
        edl += 13'(KERN_DL[r][c]) * $signed({5'b0, win[r][c]});
        edr += 13'(KERN_DR[r][c]) * $signed({5'b0, win[r][c]});
      end
  end

  function automatic logic [11:0] abs13(input logic signed [12:0] v);
    return v[12] ? 12'(-v) : 12'(v);
  endfunction

  // Compare and encode.
  logic [11:0] ah, av, adl, adr, amax;
  dir_e        dmax;
  always_comb begin
    ah = abs13(eh); av = abs13(ev); adl = abs13(edl); adr = abs13(edr);
    amax = ah;  dmax = DIR_H;
    if (av  > amax) begin amax = av;  dmax = DIR_V;  end
    if (adl > amax) begin amax = adl; dmax = DIR_DL; end
    if (adr > amax) begin amax = adr; dmax = DIR_DR; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mag   <= '0;
      out_dir   <= DIR_H;
      out_last  <= 1'b0;
    end else begin
      out_valid <= w_valid;
      out_last  <= w_last;
      if (w_valid) begin
        out_mag <= w_border ? 8'd0 : 8'(amax >> GRAD_SHIFT);
        out_dir <= w_border ? DIR_H : dmax;
      end
    end
  end

  logic unused;
  assign unused = ^{w_row, w_col};

endmodule
