// seu: steganography embed unit.
//
// Takes one pixel from each plane (Y at the Y address, Cb at the Cb address,
// Cr at the Cr address) and two message bits b1, b2, and returns the new Cb
// and Cr pixels:
//   flag1 = b1 XOR Y[0]   (0 when b1 equals the Y least significant bit)
//   flag2 = b2 XOR Cr[1]  (0 when b2 equals the second Cr bit)
//   Cb' = {Cb[7:1], flag1},  Cr' = {Cr[7:1], flag2},  Y unchanged.
// So the luminance plane is never modified and only the chrominance LSBs
// carry flags, as the method's embedding rule states. Cr[1] is never changed
// by the unit, so the receiver finds the same Cr[1] it was compared with.
//
// Timing: three register stages, as in the method: (1) operand capture,
// (2) flag computation, (3) output pixel formation. Inputs sampled at edge k
// appear at the outputs after edge k+3 with `out_valid`. A new step can enter
// every clock. Reset (active-low, synchronous) clears the valid bits.
module seu
  import stego_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t in_y,
  input  pix_t in_cb,
  input  pix_t in_cr,
  input  logic in_b1,     // bit hidden through Y / Cb
  input  logic in_b2,     // bit hidden through Cr
  output logic out_valid,
  output pix_t out_y,
  output pix_t out_cb,
  output pix_t out_cr
);

  // Stage 1 registers: operands.
  logic s1_v, s1_b1, s1_b2;
  pix_t s1_y, s1_cb, s1_cr;
  // Stage 2 registers: flags and the pixels they go with.
  logic s2_v, s2_f1, s2_f2;
  pix_t s2_y, s2_cb, s2_cr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
      s2_v <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_v <= in_valid;
      s2_v <= s1_v;
      out_valid <= s2_v;
    end
  end

  always_ff @(posedge clk) begin
    s1_y  <= in_y;
    s1_cb <= in_cb;
    s1_cr <= in_cr;
    s1_b1 <= in_b1;
    s1_b2 <= in_b2;

    s2_f1 <= s1_b1 ^ s1_y[0];
    s2_f2 <= s1_b2 ^ s1_cr[1];
    s2_y  <= s1_y;
    s2_cb <= s1_cb;
    s2_cr <= s1_cr;

    out_y  <= s2_y;
    out_cb <= {s2_cb[PIX_W-1:1], s2_f1};
    out_cr <= {s2_cr[PIX_W-1:1], s2_f2};
  end

endmodule
