// tb_payload_sweep: runs the payload sweep used to judge stego image
// quality, at full size: a synthetic 512 x 512 colour image (smooth
// gradients plus noise) carries messages of 10, 30, 50, 70 and 100 % of the
// largest message the controller accepts (one 2-bit step per pixel, 100 % =
// 65536 bytes), and of 38 bytes (the longest message for which the default
// LFSR settings never reuse a pixel).
// For each payload it checks that the stego image equals the reference model
// (embedding rule applied step by step at reference LFSR addresses, pixel
// reuse included) and that extraction returns what the reference model
// predicts. It reports PSNR of the stego image against the cover passed
// through the colour converters without a message, and the share of message
// bits that survive pixel reuse.
module tb_payload_sweep;
  import stego_pkg::*;
  import stego_ref_pkg::*;

  localparam int NPIX = 2**18;
  localparam int MAXB = NPIX / 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  op_e  op = OP_LOAD;
  logic [16:0] msg_len = '0;
  logic busy, done, img_end;
  logic pix_in_valid = 1'b1, pix_in_ready;
  rgb_t pix_in = '0;
  logic msg_in_valid = 1'b1, msg_in_ready;
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

  rgb_t cvr [NPIX], plain [NPIX], img_out [NPIX];
  pix_t ry [NPIX], rcb [NPIX], rcr [NPIX];
  pix_t msg [MAXB], rx_msg [MAXB];
  int   pix_idx, msg_idx;

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (pix_in_valid && pix_in_ready) pix_idx <= pix_idx + 1;
    if (msg_in_valid && msg_in_ready) msg_idx <= msg_idx + 1;
    if (stego_we)   img_out[stego_addr] <= stego_rgb;
    if (msg_out_we) rx_msg[msg_out_addr] <= msg_out_byte;
  end
  always_comb pix_in = cvr[pix_idx % NPIX];
  always_comb msg_in_byte = msg[msg_idx % MAXB];

  task automatic run(input op_e o, input int len);
    @(negedge clk);
    op = o; msg_len = 17'(len); start = 1'b1;
    pix_idx = 0; msg_idx = 0;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic ref_load();
    for (int a = 0; a < NPIX; a++) begin
      logic [23:0] v;
      v = ycc_ref(cvr[a].r, cvr[a].g, cvr[a].b);
      ry[a] = v[23:16]; rcb[a] = v[15:8]; rcr[a] = v[7:0];
    end
  endtask

  localparam logic [8:0] T [6] = '{9'b0_0010_0010, 9'b0_0000_1110, 9'b1_0000_0110,
                                   9'b0_0000_1110, 9'b0_0100_0010, 9'b0_1010_0010};
  localparam logic [8:0] S [6] = '{9'h03F, 9'h04F, 9'h033, 9'h031, 9'h054, 9'h034};

  // embed on the reference planes; returns the number of pixel reuses
  function automatic int ref_embed(input int steps);
    logic [8:0] r [6];
    bit used_cb [NPIX];
    int reuse = 0;
    r = S;
    for (int k = 0; k < steps; k++) begin
      int ay, acb, acr;
      logic b1, b2;
      ay  = {r[0], r[1]}; acb = {r[2], r[3]}; acr = {r[4], r[5]};
      b1  = msg[k/4][7 - 2*(k%4)];
      b2  = msg[k/4][6 - 2*(k%4)];
      if (used_cb[acb]) reuse++;
      used_cb[acb] = 1'b1;
      rcb[acb][0] = b1 ^ ry[ay][0];
      rcr[acr][0] = b2 ^ rcr[acr][1];
      for (int i = 0; i < 6; i++) r[i] = lfsr_ref_next(r[i], T[i]);
    end
    return reuse;
  endfunction

  // extraction predicted from the reference planes
  function automatic pix_t ref_extract_byte(input int n);
    logic [8:0] r [6];
    pix_t v;
    r = S;
    for (int k = 0; k < 4*n; k++)
      for (int i = 0; i < 6; i++) r[i] = lfsr_ref_next(r[i], T[i]);
    for (int k = 0; k < 4; k++) begin
      int ay, acb, acr;
      ay  = {r[0], r[1]}; acb = {r[2], r[3]}; acr = {r[4], r[5]};
      v = {v[5:0], ry[ay][0] ^ rcb[acb][0], rcr[acr][1] ^ rcr[acr][0]};
      for (int i = 0; i < 6; i++) r[i] = lfsr_ref_next(r[i], T[i]);
    end
    return v;
  endfunction

  function automatic real psnr(input int dummy);
    real se;
    se = 0.0;
    for (int a = 0; a < NPIX; a++) begin
      se += (real'(img_out[a].r) - real'(plain[a].r)) ** 2;
      se += (real'(img_out[a].g) - real'(plain[a].g)) ** 2;
      se += (real'(img_out[a].b) - real'(plain[a].b)) ** 2;
    end
    if (se == 0.0) return 999.0;
    return 10.0 * $log10(255.0 * 255.0 / (se / (3.0 * NPIX)));
  endfunction

  initial begin
    int pct [6] = '{0, 10, 30, 50, 70, 100};
    for (int a = 0; a < NPIX; a++) begin
      int x, y;
      x = a % 512; y = a / 512;
      cvr[a].r = pix_t'(x / 2 + $urandom_range(0, 15));
      cvr[a].g = pix_t'(y / 2 + $urandom_range(0, 15));
      cvr[a].b = pix_t'((x + y) / 4 + $urandom_range(0, 15));
    end
    for (int i = 0; i < MAXB; i++) msg[i] = pix_t'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // cover through both converters, no message
    run(OP_LOAD, 0);
    run(OP_UNLOAD, 0);
    for (int a = 0; a < NPIX; a++) plain[a] = img_out[a];

    for (int p = 0; p < 6; p++) begin
      int nbytes, reuse, bad, bits_ok;
      real q;
      nbytes = (p == 0) ? 38 : pct[p] * MAXB / 100;
      run(OP_LOAD, 0);
      ref_load();
      run(OP_EMBED, nbytes);
      reuse = ref_embed(4 * nbytes);
      run(OP_UNLOAD, 0);
      bad = 0;
      for (int a = 0; a < NPIX; a++) begin
        logic [23:0] e;
        e = rgb_ref(ry[a], rcb[a], rcr[a]);
        if (img_out[a] !== rgb_t'(e)) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL %0d stego pixels differ from the model", bad); end
      run(OP_EXTRACT, nbytes);
      bad = 0; bits_ok = 0;
      for (int i = 0; i < nbytes; i++) begin
        // the model check covers a sample of bytes (full prediction is quadratic)
        if (i < 64 || i % 997 == 0) begin
          checks++;
          if (rx_msg[i] !== ref_extract_byte(i)) begin
            failures++; bad++;
            if (bad < 5) $display("FAIL byte %0d: %h predicted %h", i, rx_msg[i], ref_extract_byte(i));
          end
        end
        for (int b = 0; b < 8; b++) if (rx_msg[i][b] == msg[i][b]) bits_ok++;
      end
      q = psnr(0);
      if (p == 0) $write("no-reuse message: ");
      else        $write("payload %0d%%: ", pct[p]);
      $display("%0d bytes: PSNR %.1f dB, Cb pixel reuses %0d, message bits recovered %0d of %0d (%.1f%%)",
               nbytes, q, reuse, bits_ok, 8 * nbytes, 100.0 * bits_ok / (8.0 * nbytes));
      if (p == 0) begin
        checks++;
        if (bits_ok != 8 * nbytes || reuse != 0) begin failures++; $display("FAIL collision-free message not recovered"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
