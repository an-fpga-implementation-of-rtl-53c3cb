// ycbcr2rgb: colour space converter, Y'CbCr to R'G'B', one pixel per clock.
//
// Computes the inverse conversion of the method (ITU-R BT.601):
//   R = 1.164 Y             + 1.596 Cr - 222.9
//   G = 1.164 Y - 0.392 Cb  - 0.813 Cr + 135.6
//   B = 1.164 Y + 2.017 Cb             - 276.8
// written as R = 1.164 (Y-16) + 1.596 (Cr-128) and so on, in fixed point with
// the coefficients scaled by 256 (298, 409, 100, 208, 516). Results are
// rounded to nearest and saturated to 0..255. The G and B rows and the sign of
// the G offset are the standard BT.601 inverse (the method gives the R row and
// the R/B offsets); the fixed-point scaling is this design's choice.
// Because the forward and inverse conversions round to 8 bits, an
// RGB -> YCbCr -> RGB -> YCbCr round trip does not in general reproduce the
// YCbCr least significant bits exactly.
//
// Timing: two register stages, in at edge k, out after edge k+2.
module ycbcr2rgb
  import stego_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  ycc_t in_ycc,
  output logic out_valid,
  output rgb_t out_rgb
);

  typedef logic signed [19:0] acc_t;

  acc_t sr_q, sg_q, sb_q;
  logic v1_q;
  acc_t yd, cbd, crd;

  function automatic pix_t round_sat(input acc_t s);
    acc_t v;
    v = (s + acc_t'(128)) >>> 8;
    if (v < 0)        return '0;
    else if (v > 255) return '1;
    else              return pix_t'(v);
  endfunction

  always_comb begin
    yd  = acc_t'(in_ycc.y)  - acc_t'(16);
    cbd = acc_t'(in_ycc.cb) - acc_t'(128);
    crd = acc_t'(in_ycc.cr) - acc_t'(128);
  end

  // Stage 1: weighted sums.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      sr_q <= '0;
      sg_q <= '0;
      sb_q <= '0;
    end else begin
      v1_q <= in_valid;
      sr_q <= acc_t'(298) * yd + acc_t'(409) * crd;
      sg_q <= acc_t'(298) * yd - acc_t'(100) * cbd - acc_t'(208) * crd;
      sb_q <= acc_t'(298) * yd + acc_t'(516) * cbd;
    end
  end

  // Stage 2: rounding and saturation.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_rgb   <= '0;
    end else begin
      out_valid   <= v1_q;
      out_rgb.r   <= round_sat(sr_q);
      out_rgb.g   <= round_sat(sg_q);
      out_rgb.b   <= round_sat(sb_q);
    end
  end

endmodule
