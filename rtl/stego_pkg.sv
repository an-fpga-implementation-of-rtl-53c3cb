// stego_pkg: types and constants shared by the steganography embedder/extractor.
//
// A cover image is held as three 8-bit planes (Y, Cb, Cr) of 512 x 512 pixels.
// A pixel address is {row, column}, each 9 bits wide, so one plane has 2^18
// words. The six address LFSRs are 9 bits wide; their feedback switch sets and
// seeds, as published with the method, are collected here as the defaults.
// The pairing of LFSRs to channels (1/2 -> Y, 3/4 -> Cb, 5/6 -> Cr) and the
// encoding of a switch set as a bit mask are this design's choices.
package stego_pkg;

  localparam int unsigned LFSR_W = 9;              // bits per LFSR (row or column)
  localparam int unsigned ADDR_W = 2 * LFSR_W;     // {row, column} pixel address
  localparam int unsigned PIX_W  = 8;              // bits per colour component

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    pix_t r;
    pix_t g;
    pix_t b;
  } rgb_t;

  typedef struct packed {
    pix_t y;
    pix_t cb;
    pix_t cr;
  } ycc_t;

  // Operations run by the main controller.
  typedef enum logic [1:0] {
    OP_LOAD    = 2'd0,   // stream an RGB image in, store it as Y/Cb/Cr planes
    OP_EMBED   = 2'd1,   // hide a message in the stored planes
    OP_UNLOAD  = 2'd2,   // stream the stored planes out as RGB
    OP_EXTRACT = 2'd3    // recover a message from the stored planes
  } op_e;

  // Feedback switch sets: bit i set means switch c_i is closed (i = 1..8).
  // c_0 is always closed and is not part of the mask.
  localparam logic [LFSR_W-1:0] TAPS_LFSR1 = 9'b0_0010_0010;  // switches 1,5
  localparam logic [LFSR_W-1:0] TAPS_LFSR2 = 9'b0_0000_1110;  // switches 1,2,3
  localparam logic [LFSR_W-1:0] TAPS_LFSR3 = 9'b1_0000_0110;  // switches 1,2,8
  localparam logic [LFSR_W-1:0] TAPS_LFSR4 = 9'b0_0000_1110;  // switches 1,2,3
  localparam logic [LFSR_W-1:0] TAPS_LFSR5 = 9'b0_0100_0010;  // switches 1,6
  localparam logic [LFSR_W-1:0] TAPS_LFSR6 = 9'b0_1010_0010;  // switches 1,5,7

  localparam logic [LFSR_W-1:0] SEED_LFSR1 = 9'h03F;
  localparam logic [LFSR_W-1:0] SEED_LFSR2 = 9'h04F;
  localparam logic [LFSR_W-1:0] SEED_LFSR3 = 9'h033;
  localparam logic [LFSR_W-1:0] SEED_LFSR4 = 9'h031;
  localparam logic [LFSR_W-1:0] SEED_LFSR5 = 9'h054;
  localparam logic [LFSR_W-1:0] SEED_LFSR6 = 9'h034;

endpackage
