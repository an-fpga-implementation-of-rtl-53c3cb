// tb_stego_system: end-to-end test of the embedder/extractor at its full
// size (512 x 512 pixels, six 9-bit LFSRs with the default switch sets and
// seeds), with no parameter changed.
//
//  1. Load a pseudo-random RGB cover image (input stream with random gaps)
//     and build reference Y/Cb/Cr planes with the reference converter.
//  2. Embed a 38-byte ASCII message (152 steps, fewer than the 155-step
//     period of the Cb address pair, so no pixel is used twice), with random
//     gaps on the message stream; update the reference planes with the
//     embedding rule at addresses from six reference LFSRs.
//  3. Unload the stego image and compare every RGB pixel with the reference
//     inverse conversion of the reference planes; check one pixel per clock.
//  4. Extract the message from the stored planes and compare it.
//  5. Receiver side: load the unloaded stego RGB image again and extract.
//     The 8-bit colour round trip is not exact, so the number of recovered
//     bits is reported, not checked.
//  6. Embed a message longer than the image (70000 bytes) with no stream
//     gaps: the run must stop after 2^18 steps with img_end set, at one step
//     per 2 cycles.
// Every mechanism (input gap, message stall, flag 0 and flag 1 on both
// chrominance planes, image-end stop) is counted and must occur.
module tb_stego_system;
  import stego_pkg::*;
  import stego_ref_pkg::*;

  localparam int NPIX = 2**18;
  localparam string TEXT = "Meet at the north gate at 21:00. -- K.";  // 38 bytes

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  op_e  op = OP_LOAD;
  logic [16:0] msg_len = '0;
  logic busy, done, img_end;
  logic pix_in_valid = 1'b0, pix_in_ready;
  rgb_t pix_in = '0;
  logic msg_in_valid = 1'b0, msg_in_ready;
  pix_t msg_in_byte = '0;
  logic stego_we;
  addr_t stego_addr;
  rgb_t stego_rgb;
  logic msg_out_we;
  logic [16:0] msg_out_addr;
  pix_t msg_out_byte;

  stego_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // images and reference planes
  rgb_t img_src  [NPIX];      // image streamed in by the current load
  rgb_t img_out  [NPIX];      // image captured by the last unload
  pix_t ry [NPIX], rcb [NPIX], rcr [NPIX];
  pix_t msg [70000];
  pix_t rx_msg [70000];
  int   n_rx, n_out;

  // mechanism counters
  int n_in_gap, n_msg_stall, n_flag0_cb, n_flag1_cb, n_flag0_cr, n_flag1_cr, n_img_end;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- streams
  int pix_idx, msg_idx;
  logic gaps_on = 1'b1;
  always @(posedge clk) begin
    if (pix_in_valid && pix_in_ready) pix_idx <= pix_idx + 1;
    if (msg_in_valid && msg_in_ready) msg_idx <= msg_idx + 1;
    if (pix_in_ready && !pix_in_valid) n_in_gap <= n_in_gap + 1;
    if (msg_in_ready && !msg_in_valid) n_msg_stall <= n_msg_stall + 1;
  end
  always @(negedge clk) begin
    pix_in_valid <= !gaps_on || ($urandom_range(0, 7) != 0);
    pix_in       <= img_src[pix_idx % NPIX];
    msg_in_valid <= !gaps_on || ($urandom_range(0, 2) != 0);
    msg_in_byte  <= msg[msg_idx % 70000];
  end

  // ---------------------------------------------------------------- outputs
  always @(posedge clk) begin
    if (stego_we) begin
      img_out[stego_addr] <= stego_rgb;
      n_out <= n_out + 1;
    end
    if (msg_out_we) begin
      rx_msg[msg_out_addr] <= msg_out_byte;
      n_rx <= n_rx + 1;
    end
  end

  task automatic run(input op_e o, input int len, output longint cycles);
    longint c0;
    @(negedge clk);
    op = o; msg_len = 17'(len); start = 1'b1;
    pix_idx = 0; msg_idx = 0; n_out = 0; n_rx = 0;
    c0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    cycles = cyc - c0;
    @(negedge clk);
  endtask

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  // reference: compute planes of img_src
  task automatic ref_load();
    for (int a = 0; a < NPIX; a++) begin
      logic [23:0] v;
      v = ycc_ref(img_src[a].r, img_src[a].g, img_src[a].b);
      ry[a] = v[23:16]; rcb[a] = v[15:8]; rcr[a] = v[7:0];
    end
  endtask

  // reference: embedding rule at reference LFSR addresses
  task automatic ref_embed(input int steps);
    localparam logic [8:0] T [6] = '{9'b0_0010_0010, 9'b0_0000_1110, 9'b1_0000_0110,
                                     9'b0_0000_1110, 9'b0_0100_0010, 9'b0_1010_0010};
    logic [8:0] r [6];
    r = '{9'h03F, 9'h04F, 9'h033, 9'h031, 9'h054, 9'h034};
    for (int k = 0; k < steps; k++) begin
      int ay, acb, acr;
      logic b1, b2, f1, f2;
      ay  = {r[0], r[1]}; acb = {r[2], r[3]}; acr = {r[4], r[5]};
      b1  = msg[k/4][7 - 2*(k%4)];
      b2  = msg[k/4][6 - 2*(k%4)];
      f1  = (b1 == ry[ay][0])   ? 1'b0 : 1'b1;
      f2  = (b2 == rcr[acr][1]) ? 1'b0 : 1'b1;
      if (f1) n_flag1_cb++; else n_flag0_cb++;
      if (f2) n_flag1_cr++; else n_flag0_cr++;
      rcb[acb][0] = f1;
      rcr[acr][0] = f2;
      for (int i = 0; i < 6; i++) r[i] = lfsr_ref_next(r[i], T[i]);
    end
  endtask

  initial begin
    longint cyc_load, cyc_embed, cyc_unload, cyc_extract, cyc_rx, cyc_big;
    int bad, bit_ok;
    n_in_gap = 0; n_msg_stall = 0; n_img_end = 0;
    n_flag0_cb = 0; n_flag1_cb = 0; n_flag0_cr = 0; n_flag1_cr = 0;
    for (int a = 0; a < NPIX; a++) img_src[a] = rgb_t'($urandom);
    for (int i = 0; i < 70000; i++) msg[i] = pix_t'($urandom);
    for (int i = 0; i < TEXT.len(); i++) msg[i] = TEXT[i];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. load the cover
    run(OP_LOAD, 0, cyc_load);
    ref_load();
    expect_eq(pix_idx, NPIX, "cover pixels accepted");

    // 2. embed
    run(OP_EMBED, TEXT.len(), cyc_embed);
    ref_embed(4 * TEXT.len());
    expect_eq(msg_idx, TEXT.len(), "message bytes taken");
    expect_eq(img_end, 0, "img_end after short message");

    // 3. unload and compare every pixel
    gaps_on = 1'b0;
    run(OP_UNLOAD, 0, cyc_unload);
    expect_eq(n_out, NPIX, "stego pixels out");
    bad = 0;
    for (int a = 0; a < NPIX; a++) begin
      logic [23:0] e;
      e = rgb_ref(ry[a], rcb[a], rcr[a]);
      checks++;
      if (img_out[a] !== rgb_t'(e)) begin
        failures++;
        bad++;
        if (bad < 10) $display("FAIL stego pixel %0d: %h expected %h", a, img_out[a], e);
      end
    end
    checks++;
    if (cyc_unload > NPIX + 8) begin
      failures++; $display("FAIL unload took %0d cycles", cyc_unload);
    end

    // 4. extract from the stored planes
    run(OP_EXTRACT, TEXT.len(), cyc_extract);
    expect_eq(n_rx, TEXT.len(), "extracted bytes");
    for (int i = 0; i < TEXT.len(); i++) expect_eq(rx_msg[i], msg[i], "extracted byte");
    begin
      string s;
      s = "";
      for (int i = 0; i < TEXT.len(); i++) s = {s, string'(rx_msg[i])};
      $display("extracted: \"%s\"", s);
    end

    // 5. receiver: reload the stego RGB image and extract (reported only)
    for (int a = 0; a < NPIX; a++) img_src[a] = img_out[a];
    run(OP_LOAD, 0, cyc_rx);
    for (int i = 0; i < TEXT.len(); i++) rx_msg[i] = ~msg[i];
    run(OP_EXTRACT, TEXT.len(), cyc_rx);
    bit_ok = 0;
    for (int i = 0; i < TEXT.len(); i++)
      for (int b = 0; b < 8; b++) if (rx_msg[i][b] == msg[i][b]) bit_ok++;
    $display("receiver after 8-bit RGB round trip: %0d of %0d bits recovered", bit_ok, 8 * TEXT.len());

    // 6. image end
    gaps_on = 1'b0;
    run(OP_EMBED, 70000, cyc_big);
    if (img_end) n_img_end++;
    expect_eq(msg_idx, NPIX / 4, "bytes taken before image end");
    checks++;
    if (cyc_big > 2 * NPIX + 16) begin failures++; $display("FAIL image-end run took %0d cycles", cyc_big); end

    $display("cycles: load %0d, embed %0d (%0d steps), unload %0d, extract %0d, full embed %0d",
             cyc_load, cyc_embed, 4 * TEXT.len(), cyc_unload, cyc_extract, cyc_big);
    $display("count input_gap=%0d msg_stall=%0d flag0_cb=%0d flag1_cb=%0d flag0_cr=%0d flag1_cr=%0d img_end=%0d",
             n_in_gap, n_msg_stall, n_flag0_cb, n_flag1_cb, n_flag0_cr, n_flag1_cr, n_img_end);
    checks += 7;
    if (n_in_gap == 0)    begin failures++; $display("FAIL no input gap"); end
    if (n_msg_stall == 0) begin failures++; $display("FAIL no message stall"); end
    if (n_flag0_cb == 0)  begin failures++; $display("FAIL no Cb flag 0"); end
    if (n_flag1_cb == 0)  begin failures++; $display("FAIL no Cb flag 1"); end
    if (n_flag0_cr == 0)  begin failures++; $display("FAIL no Cr flag 0"); end
    if (n_flag1_cr == 0)  begin failures++; $display("FAIL no Cr flag 1"); end
    if (n_img_end == 0)   begin failures++; $display("FAIL image end never reached"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
