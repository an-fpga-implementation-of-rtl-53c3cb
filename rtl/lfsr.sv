// lfsr: n-bit linear feedback shift register used as a pseudo-random
// row or column number generator.
//
// Structure (after the n-bit LFSR block diagram of the method): a chain of
// D flip-flops FF_{n-1} .. FF_0 with outputs b_{n-1} .. b_0 shifts one place
// towards FF_0 on every step. The bit entering FF_{n-1} is
//   b_n = c_0.b_0 XOR c_1.b_1 XOR ... XOR c_{n-1}.b_{n-1}
// where c_0 is always 1 and the other switches c_i are closed when bit i of
// TAPS is set. The feedback uses XOR gates, as the method's AG description
// states; the XNOR variant it also mentions is not built.
//
// Interface: `load` (re)loads SEED, `step` advances one state; `load` wins
// when both are high. `q` is the current state {b_{n-1} .. b_0}, i.e. the
// random number. The register takes SEED on reset (active-low, synchronous),
// a choice of this design. Timing: q changes on the clock edge that samples
// step or load.
module lfsr #(
  parameter int unsigned     W    = 9,
  parameter logic [W-1:0]    TAPS = 9'b0_0010_0010,  // closed switches c_1..c_{W-1}
  parameter logic [W-1:0]    SEED = 9'h03F
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         step,
  output logic [W-1:0] q
);

  logic fb;

  // c_0 is hard-wired closed; TAPS[0] is ignored.
  always_comb fb = q[0] ^ (^(q[W-1:1] & TAPS[W-1:1]));

  always_ff @(posedge clk) begin
    if (!rst_n || load) q <= SEED;
    else if (step)      q <= {fb, q[W-1:1]};
  end

endmodule
