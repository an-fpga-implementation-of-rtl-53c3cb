// channel_ram: single-port on-chip block RAM holding one colour plane.
//
// One of three identical memories (Y, Cb, Cr), 8-bit words, one word per
// pixel, 2^18 words for a 512 x 512 image. One port serves both reads and
// writes. The read is synchronous: `dout` shows the word at the `addr`
// sampled on the previous edge. On a write the port returns the new data
// ("write then read", i.e. write-first), as the method describes for its
// block RAMs. Contents are not reset; a plane is written by a load before it
// is read.
module channel_ram #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= din;
      dout      <= din;
    end else begin
      dout      <= mem[addr];
    end
  end

endmodule
