// YUV to RGB colour-space conversion, four pipeline stages, integer only.
//
//   stage 1: u = U - 128, v = V - 128            (two subtractors)
//   stage 2: (u*198)>>8, (u*88)>>8, (v*183)>>8, (v*103)>>8  (four 8x8 products,
//            upper bits kept)
//   stage 3: rdif = v + (v*103>>8), invgdif = (u*88>>8) + (v*183>>8),
//            bdif = u + (u*198>>8)                (three adders)
//   stage 4: r = Y + rdif, g = Y - invgdif, b = Y + bdif, each clamped to
//            0..255                               (two adders, one subtractor)
//
// This approximates R = Y + 1.4075(V-128), G = Y - 0.3455(U-128) -
// 0.7169(V-128), B = Y + 1.779(U-128). The products are signed; ">> 8" is an
// arithmetic shift (rounds toward minus infinity). Y is delayed alongside.
//
// Interface: in_valid with in_y/in_u/in_v; out_valid with out_r/out_g/out_b
// four clocks later; one pixel per clock.
//
// Stage structure, the constants 198, 88, 183, 103 and the clamping follow the
// source description; signed arithmetic shifting is this design's choice.
module yuv2rgb (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_y,
  input  logic [7:0] in_u,
  input  logic [7:0] in_v,
  output logic       out_valid,
  output logic [7:0] out_r,
  output logic [7:0] out_g,
  output logic [7:0] out_b
);
  import ipp_pkg::*;

  // Stage 1
  logic signed [8:0]  s1_u, s1_v;
  logic [7:0]         s1_y;
  // Stage 2
  logic signed [8:0]  s2_u, s2_v, s2_pu198, s2_pu88, s2_pv183, s2_pv103;
  logic [7:0]         s2_y;
  // Stage 3
  logic signed [10:0] s3_rdif, s3_invg, s3_bdif;
  logic [7:0]         s3_y;
  logic [3:0]         vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], in_valid};
  end
  assign out_valid = vld[3];

  always_ff @(posedge clk) begin
    // Stage 1: subtract 128
    s1_u <= $signed({1'b0, in_u}) - 9'sd128;
    s1_v <= $signed({1'b0, in_v}) - 9'sd128;
    s1_y <= in_y;
    // Stage 2: multiply and keep the upper bits
    s2_pu198 <= 9'((18'(s1_u) * 18'sd198) >>> 8);
    s2_pu88  <= 9'((18'(s1_u) * 18'sd88)  >>> 8);
    s2_pv183 <= 9'((18'(s1_v) * 18'sd183) >>> 8);
    s2_pv103 <= 9'((18'(s1_v) * 18'sd103) >>> 8);
    s2_u <= s1_u;
    s2_v <= s1_v;
    s2_y <= s1_y;
    // Stage 3: differences
    s3_rdif <= 11'(s2_v) + 11'(s2_pv103);
    s3_invg <= 11'(s2_pu88) + 11'(s2_pv183);
    s3_bdif <= 11'(s2_u) + 11'(s2_pu198);
    s3_y    <= s2_y;
    // Stage 4: add to Y and clamp
    out_r <= clamp8(int'(s3_y) + int'(s3_rdif));
    out_g <= clamp8(int'(s3_y) - int'(s3_invg));
    out_b <= clamp8(int'(s3_y) + int'(s3_bdif));
  end

endmodule
