// Parallel shift-add pipeline of the Hough transform.
//
// An edge pixel (x, y), coordinates relative to the image centre, enters
// stage 0 as rho_x0 = x, rho_y0 = y. Each of the NSTAGES stages rotates the
// pair by one angle step with tan(step) = 2^-SHIFT, ignoring the cos(step)
// factor:
//     rho_x(i+1) = rho_x(i) + (rho_y(i) >>> SHIFT)
//     rho_y(i+1) = rho_y(i) - (rho_x(i) >>> SHIFT)
// so rho_x(i) = x cos(i*step) + y sin(i*step) covers theta in [0, pi/2] and
// rho_y(i) = -x sin(i*step) + y cos(i*step) covers theta in [pi/2, pi] at the
// same time. One pixel enters per clock; stage i holds the pixel that entered
// i clocks earlier, so NSTAGES+1 pairs are produced every clock.
//
// Outputs per stage i: st_valid[i] and the accumulator addresses
// st_addr_x[i], st_addr_y[i] = round(rho) + RHO_MAX (0 .. 2*RHO_MAX), which go
// to accumulator RAMs 2i and 2i+1.
//
// NSTAGES = 50 and SHIFT = 5 follow the source description. The FRAC
// fraction bits carried between stages (so that truncation does not build up
// over fifty stages) and the rounding to an address are this design's choices.
module hough_pipe #(
  parameter int NSTAGES = 50,
  parameter int SHIFT   = 5,
  parameter int FRAC    = 8,
  parameter int CW      = 10,    // signed coordinate width
  parameter int RHO_MAX = 240,
  parameter int RW      = $clog2(2 * RHO_MAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [CW-1:0] in_x,
  input  logic signed [CW-1:0] in_y,
  output logic                 st_valid  [NSTAGES+1],
  output logic [RW-1:0]        st_addr_x [NSTAGES+1],
  output logic [RW-1:0]        st_addr_y [NSTAGES+1]
);
  localparam int DW = CW + 1 + FRAC;    // one guard bit for the 2.5% growth

  logic signed [DW-1:0] rx [NSTAGES+1];
  logic signed [DW-1:0] ry [NSTAGES+1];
  logic                 vl [NSTAGES+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= NSTAGES; i++) vl[i] <= 1'b0;
    end else begin
      vl[0] <= in_valid;
      for (int i = 1; i <= NSTAGES; i++) vl[i] <= vl[i-1];
    end
  end

  always_ff @(posedge clk) begin
    rx[0] <= DW'(in_x) <<< FRAC;
    ry[0] <= DW'(in_y) <<< FRAC;
    for (int i = 1; i <= NSTAGES; i++) begin
      rx[i] <= rx[i-1] + (ry[i-1] >>> SHIFT);
      ry[i] <= ry[i-1] - (rx[i-1] >>> SHIFT);
    end
  end

  function automatic logic [RW-1:0] to_addr(input logic signed [DW-1:0] r);
    logic signed [DW-1:0] q;
    q = (r + DW'(1 <<< (FRAC - 1))) >>> FRAC;
    return RW'(q + DW'(RHO_MAX));
  endfunction

  always_comb begin
    for (int i = 0; i <= NSTAGES; i++) begin
      st_valid[i]  = vl[i];
      st_addr_x[i] = to_addr(rx[i]);
      st_addr_y[i] = to_addr(ry[i]);
    end
  end

endmodule
