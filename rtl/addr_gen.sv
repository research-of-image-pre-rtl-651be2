// Storage address generator for the edge image.
//
// Counts the pixels of the output stream and gives each the linear address
// row * IMG_W + col of the external store, starting again at BASE with the
// pixel after one flagged as the frame's last. The address arrives in the
// same clock as the pixel (combinational from the counter).
//
// The source description shows an address-generation block fed by the frame
// and field information but does not describe it; the linear raster address
// is this design's choice.
module addr_gen #(
  parameter int IMG_W = 360,
  parameter int IMG_H = 280,
  parameter int AW    = $clog2(IMG_W * IMG_H),
  parameter logic [AW-1:0] BASE = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_last,
  output logic [AW-1:0] addr
);
  logic [AW-1:0] offs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  offs <= '0;
    else if (in_valid && in_last) offs <= '0;
    else if (in_valid)           offs <= offs + 1'b1;
  end

  assign addr = BASE + offs;

endmodule
