// address_generator (AG): random pixel addresses for the three colour planes.
//
// Six 9-bit LFSRs run in parallel, two per channel: one gives the row and the
// other the column of the pixel to use next in that channel's plane. The
// address of a plane is {row, column}, 18 bits for a 512 x 512 image. Each
// LFSR has its own feedback switch set and seed (defaults: the published
// settings of the method, see stego_pkg). Which LFSR pair serves which
// plane (1/2 -> Y, 3/4 -> Cb, 5/6 -> Cr), and that all six advance together
// on one `step`, are this design's choices; the method only states that all
// six operate in parallel with two per channel.
//
// Interface: `load` reloads all seeds (start of an embed or extract run),
// `step` advances all six. The addresses are registered LFSR states, valid
// the cycle after load/step. An LFSR never reaches the all-zero state, so
// row 0 and column 0 are never selected.
module address_generator
  import stego_pkg::*;
#(
  parameter logic [LFSR_W-1:0] TAPS1 = TAPS_LFSR1,
  parameter logic [LFSR_W-1:0] TAPS2 = TAPS_LFSR2,
  parameter logic [LFSR_W-1:0] TAPS3 = TAPS_LFSR3,
  parameter logic [LFSR_W-1:0] TAPS4 = TAPS_LFSR4,
  parameter logic [LFSR_W-1:0] TAPS5 = TAPS_LFSR5,
  parameter logic [LFSR_W-1:0] TAPS6 = TAPS_LFSR6,
  parameter logic [LFSR_W-1:0] SEED1 = SEED_LFSR1,
  parameter logic [LFSR_W-1:0] SEED2 = SEED_LFSR2,
  parameter logic [LFSR_W-1:0] SEED3 = SEED_LFSR3,
  parameter logic [LFSR_W-1:0] SEED4 = SEED_LFSR4,
  parameter logic [LFSR_W-1:0] SEED5 = SEED_LFSR5,
  parameter logic [LFSR_W-1:0] SEED6 = SEED_LFSR6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  logic  step,
  output addr_t addr_y,
  output addr_t addr_cb,
  output addr_t addr_cr
);

  logic [LFSR_W-1:0] rn [6];

  lfsr #(.W(LFSR_W), .TAPS(TAPS1), .SEED(SEED1)) u_lfsr1 (.clk, .rst_n, .load, .step, .q(rn[0]));
  lfsr #(.W(LFSR_W), .TAPS(TAPS2), .SEED(SEED2)) u_lfsr2 (.clk, .rst_n, .load, .step, .q(rn[1]));
  lfsr #(.W(LFSR_W), .TAPS(TAPS3), .SEED(SEED3)) u_lfsr3 (.clk, .rst_n, .load, .step, .q(rn[2]));
  lfsr #(.W(LFSR_W), .TAPS(TAPS4), .SEED(SEED4)) u_lfsr4 (.clk, .rst_n, .load, .step, .q(rn[3]));
  lfsr #(.W(LFSR_W), .TAPS(TAPS5), .SEED(SEED5)) u_lfsr5 (.clk, .rst_n, .load, .step, .q(rn[4]));
  lfsr #(.W(LFSR_W), .TAPS(TAPS6), .SEED(SEED6)) u_lfsr6 (.clk, .rst_n, .load, .step, .q(rn[5]));

  assign addr_y  = {rn[0], rn[1]};
  assign addr_cb = {rn[2], rn[3]};
  assign addr_cr = {rn[4], rn[5]};

endmodule
