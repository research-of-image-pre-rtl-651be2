// One accumulator RAM of the Hough transform with its accumulator.
//
// DEPTH cells of DW bits, one per rho value. Voting: inc_valid with inc_addr
// reads the cell (synchronous read), and one clock later the accumulator
// writes back the value plus one (saturating). When the cell written in the
// clock of the read is the one just read, the freshly written value is taken
// instead of the stale read data (bypass), so back-to-back votes for the same
// cell are all counted. Read-out: rd_en with rd_addr gives rd_data one clock
// later and clears the cell, so that after a read-out the RAM is empty for
// the next image.
//
// The RAM has one read and one write port; voting and read-out must not
// overlap (an assertion checks it).
//
// The RAM indexed by rho and the read-increment-write-back accumulator follow
// the source description; the bypass, saturation and clear-on-read are this
// design's choices.
module hough_acc_ram #(
  parameter int DEPTH = 481,
  parameter int DW    = 8,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc_valid,
  input  logic [AW-1:0] inc_addr,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data,
  output logic          bypass
);
  logic [DW-1:0] mem [DEPTH];

  logic          a_valid;       // a vote whose cell was read last clock
  logic [AW-1:0] a_addr;
  logic [DW-1:0] a_data;
  logic          fwd_hit;
  logic [DW-1:0] fwd_data;
  logic [DW-1:0] cur, nxt;

  assign cur     = fwd_hit ? fwd_data : a_data;
  assign nxt     = (&cur) ? cur : cur + 1'b1;
  assign bypass  = a_valid && fwd_hit;
  assign rd_data = a_data;

  logic          we;
  logic [AW-1:0] waddr;
  logic [DW-1:0] wdata;
  logic [AW-1:0] raddr;

  always_comb begin
    raddr = rd_en ? rd_addr : inc_addr;
    we    = a_valid || rd_en;
    waddr = a_valid ? a_addr : rd_addr;
    wdata = a_valid ? nxt : '0;
  end

  always_ff @(posedge clk) begin
    a_data <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid  <= 1'b0;
      a_addr   <= '0;
      fwd_hit  <= 1'b0;
      fwd_data <= '0;
    end else begin
      a_valid  <= inc_valid;
      a_addr   <= inc_addr;
      fwd_hit  <= a_valid && (a_addr == inc_addr);
      fwd_data <= nxt;
    end
  end

  a_vote_or_read: assert property (@(posedge clk) disable iff (!rst_n)
    !(rd_en && (inc_valid || a_valid)));

endmodule
