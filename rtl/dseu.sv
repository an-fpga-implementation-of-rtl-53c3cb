// dseu: steganography extract unit, the inverse of the embed unit.
//
// From the Y, Cb and Cr pixels at the three random addresses it recovers the
// two message bits of one step:
//   b1 = Y[0]  when the Cb flag Cb[0] is 0, else NOT Y[0]   (= Y[0] XOR Cb[0])
//   b2 = Cr[1] when the Cr flag Cr[0] is 0, else NOT Cr[1]  (= Cr[1] XOR Cr[0])
// following the method's extraction flow chart.
//
// Timing: two register stages (operand capture, result); inputs sampled at
// edge k give `out_valid`, `out_b1`, `out_b2` after edge k+2. The number of
// stages is this design's choice. One step per clock.
module dseu
  import stego_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t in_y,
  input  pix_t in_cb,
  input  pix_t in_cr,
  output logic out_valid,
  output logic out_b1,
  output logic out_b2
);

  logic s1_v;
  pix_t s1_y, s1_cb, s1_cr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_v      <= in_valid;
      out_valid <= s1_v;
    end
  end

  always_ff @(posedge clk) begin
    s1_y   <= in_y;
    s1_cb  <= in_cb;
    s1_cr  <= in_cr;
    out_b1 <= s1_cb[0] ? ~s1_y[0]  : s1_y[0];
    out_b2 <= s1_cr[0] ? ~s1_cr[1] : s1_cr[1];
  end

endmodule
