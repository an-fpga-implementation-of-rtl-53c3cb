// rgb2ycbcr: colour space converter, R'G'B' to Y'CbCr, one pixel per clock.
//
// Computes the conversion of the method (ITU-R BT.601 studio range):
//   Y  =  0.257 R + 0.504 G + 0.098 B +  16
//   Cb = -0.148 R - 0.291 G + 0.439 B + 128
//   Cr =  0.439 R - 0.368 G - 0.071 B + 128
// in fixed point with the coefficients scaled by 256 and rounded to integers
// (66, 129, 25 / -38, -74, 112 / 112, -94, -18). Each result is rounded to
// nearest ((sum + 128) >> 8) and saturated to 0..255. The method builds this
// unit as a multiplierless distributed-arithmetic circuit it does not detail;
// here the products are constant multiplications, which synthesis reduces to
// shifts and adds, and the scaling and rounding are this design's choices.
//
// Timing: two register stages. `in_valid`/`in_rgb` sampled at edge k give
// `out_valid`/`out_ycc` after edge k+2. No back-pressure.
module rgb2ycbcr
  import stego_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  rgb_t in_rgb,
  output logic out_valid,
  output ycc_t out_ycc
);

  typedef logic signed [19:0] acc_t;

  acc_t sy_q, scb_q, scr_q;
  logic v1_q;

  function automatic pix_t round_sat(input acc_t s, input acc_t offset);
    acc_t v;
    v = ((s + acc_t'(128)) >>> 8) + offset;
    if (v < 0)        return '0;
    else if (v > 255) return '1;
    else              return pix_t'(v);
  endfunction

  // Stage 1: weighted sums.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q  <= 1'b0;
      sy_q  <= '0;
      scb_q <= '0;
      scr_q <= '0;
    end else begin
      v1_q  <= in_valid;
      sy_q  <=  acc_t'(66)  * acc_t'(in_rgb.r) + acc_t'(129) * acc_t'(in_rgb.g) + acc_t'(25)  * acc_t'(in_rgb.b);
      scb_q <= -acc_t'(38)  * acc_t'(in_rgb.r) - acc_t'(74)  * acc_t'(in_rgb.g) + acc_t'(112) * acc_t'(in_rgb.b);
      scr_q <=  acc_t'(112) * acc_t'(in_rgb.r) - acc_t'(94)  * acc_t'(in_rgb.g) - acc_t'(18)  * acc_t'(in_rgb.b);
    end
  end

  // Stage 2: rounding, offsets, saturation.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ycc   <= '0;
    end else begin
      out_valid  <= v1_q;
      out_ycc.y  <= round_sat(sy_q, 16);
      out_ycc.cb <= round_sat(scb_q, 128);
      out_ycc.cr <= round_sat(scr_q, 128);
    end
  end

endmodule
