// Adaptive high/low threshold selection from the gradient histogram.
//
// Histogram: NBINS registers of CNT_W bits, addressed by the gradient value
// (1..NBINS; value 0 is not counted, values above NBINS are ignored). The
// register of the incoming value is read, incremented by accumulator 1 and
// written back, one pixel per clock. All registers are cleared with the first
// pixel of each frame. Counters saturate at their maximum.
//
// Search: when the frame's last pixel has been counted, accumulator 2 steps a
// bin index i = 1, 2, ... once per clock for at most NBINS-1 clocks. Each clock
// register 1 and register 2 take bins i and i+1; one clock later the difference
// circuit forms diff(i) = |h(i+1) - h(i)|, forced to 0 when it does not exceed
// DIFF_TH, and the comparator stops accumulator 2 at the first i with
// diff(i) = 0. That i is the high threshold th_h and th_l = th_h >> 1. If no
// zero is found, th_h = NBINS. th_valid pulses for one clock when new
// thresholds are loaded; they hold until the next frame's search ends.
// After reset th_h = NBINS and th_l = NBINS/2.
//
// Interface: in_valid/in_mag/in_last from non-maxima suppression; busy while
// the search runs (no input may arrive then). The search takes at most
// NBINS + 1 clocks after in_last.
//
// NBINS = 100 registers of 12 bits, the difference histogram, the first-zero
// rule and th_l = th_h / 2 follow the source description. DIFF_TH, whose value
// the description does not give, defaults to 0 (a plain zero test); the reset
// thresholds and the saturation are this design's choices.
module adaptive_thresh #(
  parameter int NBINS   = 100,
  parameter int CNT_W   = 12,
  parameter int DIFF_TH = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_mag,
  input  logic       in_last,
  output logic       busy,
  output logic [7:0] th_h,
  output logic [7:0] th_l,
  output logic       th_valid
);
  localparam int AW = $clog2(NBINS + 2);

  logic [CNT_W-1:0] hist [1:NBINS];
  logic             first_pix;          // next pixel is a frame's first

  // Address selector + accumulator 1.
  logic in_range;
  assign in_range = (in_mag != 8'd0) && (int'(in_mag) <= NBINS);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int i = 1; i <= NBINS; i++) begin
        if (in_range && int'(in_mag) == i)
          hist[i] <= first_pix ? CNT_W'(1)
                               : ((&hist[i]) ? hist[i] : hist[i] + 1'b1);
        else if (first_pix)
          hist[i] <= '0;
      end
    end
  end

  // Clock hold + accumulator 2 + registers 1/2 + difference + comparator.
  logic             searching;
  logic [AW-1:0]    acc2;
  logic [CNT_W-1:0] reg1, reg2;
  logic [AW-1:0]    reg_idx;
  logic             reg_vld;
  logic [CNT_W-1:0] diff;
  logic             diff_zero;

  assign diff      = (reg1 > reg2) ? reg1 - reg2 : reg2 - reg1;
  assign diff_zero = (int'(diff) <= DIFF_TH);
  assign busy      = searching || reg_vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_pix <= 1'b1;
      searching <= 1'b0;
      acc2      <= AW'(1);
      reg1      <= '0;
      reg2      <= '0;
      reg_idx   <= '0;
      reg_vld   <= 1'b0;
      th_h      <= 8'(NBINS);
      th_l      <= 8'(NBINS / 2);
      th_valid  <= 1'b0;
    end else begin
      th_valid <= 1'b0;
      if (in_valid) first_pix <= in_last;
      if (in_valid && in_last) begin
        searching <= 1'b1;
        acc2      <= AW'(1);
      end
      reg_vld <= 1'b0;
      if (searching) begin
        reg1    <= hist[acc2];
        reg2    <= hist[acc2 + 1'b1];
        reg_idx <= acc2;
        reg_vld <= 1'b1;
        acc2    <= acc2 + 1'b1;
        if (int'(acc2) == NBINS - 1) searching <= 1'b0;
      end
      if (reg_vld) begin
        if (diff_zero) begin
          searching <= 1'b0;          // stop accumulator 2
          reg_vld   <= 1'b0;
          th_h      <= 8'(reg_idx);
          th_l      <= 8'(reg_idx >> 1);
          th_valid  <= 1'b1;
        end else if (!searching) begin
          th_h     <= 8'(NBINS);
          th_l     <= 8'(NBINS / 2);
          th_valid <= 1'b1;
        end
      end
    end
  end

  a_no_input_while_searching: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_valid && busy));

endmodule
