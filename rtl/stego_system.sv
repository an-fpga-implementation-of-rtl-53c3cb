// stego_system: FPGA steganography embedder/extractor for 512 x 512 colour
// images.
//
// A secret message is hidden in a colour image converted to Y, Cb and Cr
// planes. Every 2-bit step of the message uses three pseudo-randomly chosen
// pixels, one per plane, whose positions come from six 9-bit LFSRs (a row and
// a column LFSR per plane). Bit b1 is compared with the LSB of the Y pixel and
// the result (0 = equal) is stored as the LSB of the Cb pixel; bit b2 is
// compared with bit 1 of the Cr pixel and the result is stored as its LSB.
// The luminance plane is never changed. A receiver with the same LFSR seeds
// and feedback switches recomputes the addresses and XORs the flags back.
//
// Units (after the method's architecture): colour space converter in both
// directions, address generator, three single-port plane RAMs with address
// multiplexers (sequential counter or random address), embed unit, extract
// unit and the main controller. The four off-chip memories of the method
// (three for the stego image channels, one for the extracted message) are
// outside this module; their write ports are the `stego_*` and `msg_out_*`
// outputs.
//
// Use: pulse `start` with `op` = OP_LOAD and stream 2^18 RGB pixels in raster
// order; then OP_EMBED with `msg_len` bytes on the message stream, or
// OP_EXTRACT with `msg_len` to recover them; OP_UNLOAD streams the stored
// (stego) image out as RGB, one pixel per clock. `done` pulses at the end of
// each operation. Timing per operation is given in mcu.sv.
module stego_system
  import stego_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // command and status
  input  logic              start,
  input  op_e               op,
  input  logic [ADDR_W-2:0] msg_len,        // message length in bytes
  output logic              busy,
  output logic              done,
  output logic              img_end,        // last embed/extract run hit the image end
  // cover / stego image input, raster order
  input  logic              pix_in_valid,
  input  rgb_t              pix_in,
  output logic              pix_in_ready,
  // secret message input
  input  logic              msg_in_valid,
  input  pix_t              msg_in_byte,
  output logic              msg_in_ready,
  // write port of the off-chip stego image memories (R, G, B)
  output logic              stego_we,
  output addr_t             stego_addr,
  output rgb_t              stego_rgb,
  // write port of the off-chip extracted message memory
  output logic              msg_out_we,
  output logic [ADDR_W-2:0] msg_out_addr,
  output pix_t              msg_out_byte
);

  // controller signals
  logic  ag_load, ag_step, addr_seq, wr_load, wr_embed;
  addr_t seq_addr;
  logic  csc_valid, icsc_in_valid, icsc_out_valid;
  logic  seu_in_valid, seu_b1, seu_b2, seu_out_valid;
  logic  dseu_in_valid, dseu_out_valid, dseu_b1, dseu_b2;

  // datapath
  ycc_t  csc_ycc;
  addr_t ag_y, ag_cb, ag_cr;
  addr_t ram_addr_y, ram_addr_cb, ram_addr_cr;
  logic  we_y, we_cb, we_cr;
  pix_t  din_cb, din_cr;
  ycc_t  ram_q;
  pix_t  seu_y, seu_cb, seu_cr;
  rgb_t  icsc_rgb;
  addr_t wa_cb [5], wa_cr [5];    // embed: read addresses, delayed to write-back
  pix_t  seu_cb_q, seu_cr_q;      // embed: unit result held one cycle

  mcu #(.AW(ADDR_W), .LEN_W(ADDR_W-1)) u_mcu (
    .clk, .rst_n,
    .start, .op, .msg_len, .busy, .done, .img_end,
    .pix_in_valid, .pix_in_ready,
    .msg_in_valid, .msg_in_byte, .msg_in_ready,
    .ag_load, .ag_step,
    .addr_seq, .seq_addr, .wr_load, .wr_embed,
    .csc_out_valid(csc_valid),
    .icsc_in_valid, .icsc_out_valid,
    .rgb_out_valid(stego_we), .rgb_out_addr(stego_addr),
    .seu_in_valid, .seu_b1, .seu_b2, .seu_out_valid,
    .dseu_in_valid, .dseu_out_valid, .dseu_b1, .dseu_b2,
    .msg_out_valid(msg_out_we), .msg_out_byte, .msg_out_addr
  );

  // colour space conversion of the incoming image
  rgb2ycbcr u_csc (
    .clk, .rst_n,
    .in_valid (pix_in_valid && pix_in_ready),
    .in_rgb   (pix_in),
    .out_valid(csc_valid),
    .out_ycc  (csc_ycc)
  );

  address_generator u_ag (
    .clk, .rst_n,
    .load(ag_load), .step(ag_step),
    .addr_y(ag_y), .addr_cb(ag_cb), .addr_cr(ag_cr)
  );

  // Embed write-back: a step read at cycle c is written at c+5, so the Cb
  // and Cr addresses go through a 5-cycle delay line and the embed unit's
  // result (valid at c+4) is held one cycle.
  always_ff @(posedge clk) begin
    wa_cb[0] <= ag_cb;
    wa_cr[0] <= ag_cr;
    for (int i = 1; i < 5; i++) begin
      wa_cb[i] <= wa_cb[i-1];
      wa_cr[i] <= wa_cr[i-1];
    end
    seu_cb_q <= seu_cb;
    seu_cr_q <= seu_cr;
  end

  // address multiplexers: sequential counter for load/unload, LFSRs for
  // embed/extract reads, delayed LFSR addresses for embed write-back
  always_comb begin
    ram_addr_y  = addr_seq ? seq_addr : ag_y;
    ram_addr_cb = addr_seq ? seq_addr : (wr_embed ? wa_cb[4] : ag_cb);
    ram_addr_cr = addr_seq ? seq_addr : (wr_embed ? wa_cr[4] : ag_cr);
    we_y        = wr_load;
    we_cb       = wr_load || wr_embed;
    we_cr       = wr_load || wr_embed;
    din_cb      = wr_load ? csc_ycc.cb : seu_cb_q;
    din_cr      = wr_load ? csc_ycc.cr : seu_cr_q;
  end

  channel_ram #(.AW(ADDR_W), .DW(PIX_W)) u_ram_y (
    .clk, .we(we_y), .addr(ram_addr_y), .din(csc_ycc.y), .dout(ram_q.y)
  );
  channel_ram #(.AW(ADDR_W), .DW(PIX_W)) u_ram_cb (
    .clk, .we(we_cb), .addr(ram_addr_cb), .din(din_cb), .dout(ram_q.cb)
  );
  channel_ram #(.AW(ADDR_W), .DW(PIX_W)) u_ram_cr (
    .clk, .we(we_cr), .addr(ram_addr_cr), .din(din_cr), .dout(ram_q.cr)
  );

  // The Y output of the embed unit equals its input (luminance is never
  // written back); it is left unused here.
  seu u_seu (
    .clk, .rst_n,
    .in_valid(seu_in_valid),
    .in_y(ram_q.y), .in_cb(ram_q.cb), .in_cr(ram_q.cr),
    .in_b1(seu_b1), .in_b2(seu_b2),
    .out_valid(seu_out_valid),
    .out_y(seu_y), .out_cb(seu_cb), .out_cr(seu_cr)
  );

  dseu u_dseu (
    .clk, .rst_n,
    .in_valid(dseu_in_valid),
    .in_y(ram_q.y), .in_cb(ram_q.cb), .in_cr(ram_q.cr),
    .out_valid(dseu_out_valid),
    .out_b1(dseu_b1), .out_b2(dseu_b2)
  );

  ycbcr2rgb u_icsc (
    .clk, .rst_n,
    .in_valid (icsc_in_valid),
    .in_ycc   (ram_q),
    .out_valid(icsc_out_valid),
    .out_rgb  (icsc_rgb)
  );

  assign stego_rgb = icsc_rgb;

endmodule
