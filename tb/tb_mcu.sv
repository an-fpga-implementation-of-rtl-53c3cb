// tb_mcu: exercises the main controller alone, with the datapath units
// replaced by delay lines of their latencies (converter 2, embed unit 3,
// inverse converter 2, extract unit 2 cycles), on a 256-pixel plane
// (AW = 8). Checks: load writes every address once in order; embed takes
// message bytes MSB first, two bits per step, writes once per step, steps
// the LFSRs once per step, completes a step every 2 cycles when the message
// stream keeps up, never reads (steps the LFSRs) in a write cycle; unload reads every
// address and numbers the RGB outputs; extract packs bit pairs into bytes;
// a message longer than the plane stops at the image end and sets img_end.
module tb_mcu;
  import stego_pkg::*;

  localparam int AW = 8, LEN_W = 7, NPIX = 2**AW;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  op_e  op = OP_LOAD;
  logic [LEN_W-1:0] msg_len = '0;
  logic busy, done, img_end;
  logic pix_in_valid = 1'b0, pix_in_ready;
  logic msg_in_valid = 1'b0, msg_in_ready;
  pix_t msg_in_byte = '0;
  logic ag_load, ag_step, addr_seq, wr_load, wr_embed;
  logic [AW-1:0] seq_addr, rgb_out_addr;
  logic csc_out_valid, icsc_in_valid, icsc_out_valid, rgb_out_valid;
  logic seu_in_valid, seu_b1, seu_b2, seu_out_valid;
  logic dseu_in_valid, dseu_out_valid, dseu_b1, dseu_b2;
  logic msg_out_valid;
  pix_t msg_out_byte;
  logic [LEN_W-1:0] msg_out_addr;

  int checks = 0, failures = 0, cyc = 0;

  mcu #(.AW(AW), .LEN_W(LEN_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // latency stubs
  logic [1:0] csc_d = '0, icsc_d = '0, dseu_d = '0;
  logic [2:0] seu_d = '0;
  always @(posedge clk) begin
    csc_d  <= {csc_d[0],  pix_in_valid && pix_in_ready};
    icsc_d <= {icsc_d[0], icsc_in_valid};
    dseu_d <= {dseu_d[0], dseu_in_valid};
    seu_d  <= {seu_d[1:0], seu_in_valid};
  end
  assign csc_out_valid  = csc_d[1];
  assign icsc_out_valid = icsc_d[1];
  assign dseu_out_valid = dseu_d[1];
  assign seu_out_valid  = seu_d[2];

  // extract-unit stub: bit pairs taken from a known byte pattern
  int   rx_pairs = 0;
  function automatic pix_t pattern(input int k); return pix_t'(8'h5A ^ (k * 37)); endfunction
  always_comb begin
    pix_t pb;
    pb = pattern(rx_pairs / 4);
    dseu_b1 = pb[7 - 2*(rx_pairs % 4)];
    dseu_b2 = pb[6 - 2*(rx_pairs % 4)];
  end
  always @(posedge clk) if (dseu_out_valid) rx_pairs <= rx_pairs + 1;

  // monitors
  int n_wr_load, n_wr_embed, n_step, n_load_ag, n_icsc, n_rgb, n_msg_out, n_done;
  int exp_addr, last_wr_cyc, min_step_gap;
  logic [1:0] emb_bits [$];
  always @(posedge clk) if (rst_n) begin
    if (wr_load) begin
      checks++;
      if (!addr_seq || seq_addr != AW'(n_wr_load)) begin failures++; $display("FAIL load address %0d", seq_addr); end
      n_wr_load++;
    end
    if (wr_embed) begin
      if (n_wr_embed > 0 && cyc - last_wr_cyc < min_step_gap) min_step_gap = cyc - last_wr_cyc;
      last_wr_cyc = cyc;
      n_wr_embed++;
      checks++;
      if (addr_seq) begin failures++; $display("FAIL embed uses sequential address"); end
    end
    if (seu_in_valid) emb_bits.push_back({seu_b1, seu_b2});
    if (wr_embed && ag_step) begin
      checks++; failures++; $display("FAIL read and write in the same cycle");
    end
    if (ag_step) n_step++;
    if (ag_load) n_load_ag++;
    if (icsc_in_valid) n_icsc++;
    if (rgb_out_valid) begin
      checks++;
      if (rgb_out_addr != AW'(n_rgb)) begin failures++; $display("FAIL rgb_out_addr"); end
      n_rgb++;
    end
    if (msg_out_valid) begin
      checks += 2;
      if (msg_out_byte != pattern(n_msg_out)) begin failures++; $display("FAIL extracted byte %0d: %h", n_msg_out, msg_out_byte); end
      if (msg_out_addr != LEN_W'(n_msg_out)) begin failures++; $display("FAIL msg_out_addr"); end
      n_msg_out++;
    end
    if (done) n_done++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_counts();
    n_wr_load = 0; n_wr_embed = 0; n_step = 0; n_load_ag = 0; n_icsc = 0;
    n_rgb = 0; n_msg_out = 0; n_done = 0; min_step_gap = 1000; rx_pairs = 0;
    emb_bits.delete();
  endtask

  task automatic run(input op_e o, input int len);
    @(negedge clk);
    op = o; msg_len = LEN_W'(len); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  // stimulus for the input streams: random gaps
  always @(negedge clk) begin
    pix_in_valid <= ($urandom_range(0, 3) != 0);
  end
  int msg_idx = 0;
  pix_t msg [0:127];
  always @(posedge clk) if (msg_in_valid && msg_in_ready) msg_idx <= msg_idx + 1;
  always @(negedge clk) begin
    msg_in_valid <= ($urandom_range(0, 2) != 0);
    msg_in_byte  <= msg[msg_idx];
  end

  initial begin
    for (int i = 0; i < 128; i++) msg[i] = pix_t'($urandom);
    clear_counts();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // load
    run(OP_LOAD, 0);
    expect_eq(n_wr_load, NPIX, "load writes");
    expect_eq(n_done, 1, "load done pulses");

    // embed 10 bytes
    clear_counts();
    msg_idx = 0;
    run(OP_EMBED, 10);
    expect_eq(n_wr_embed, 40, "embed writes");
    expect_eq(n_step, 40, "embed LFSR steps");
    expect_eq(n_load_ag, 1, "embed seed loads");
    expect_eq(msg_idx, 10, "message bytes taken");
    expect_eq(min_step_gap, 2, "cycles per embed step");
    expect_eq(int'(img_end), 0, "img_end after short embed");
    for (int k = 0; k < 40; k++) begin
      logic [1:0] b;
      b = emb_bits.pop_front();
      expect_eq(int'(b), int'(msg[k/4][7-2*(k%4) -: 2]), "embedded bit pair");
    end

    // unload
    clear_counts();
    run(OP_UNLOAD, 0);
    expect_eq(n_icsc, NPIX, "unload reads");
    expect_eq(n_rgb, NPIX, "unload outputs");

    // extract 5 bytes
    clear_counts();
    run(OP_EXTRACT, 5);
    expect_eq(n_step, 20, "extract LFSR steps");
    expect_eq(n_msg_out, 5, "extracted bytes");
    expect_eq(n_load_ag, 1, "extract seed loads");

    // image end: 100 bytes = 400 steps on a 256-pixel plane
    clear_counts();
    msg_idx = 0;
    run(OP_EMBED, 100);
    expect_eq(n_wr_embed, NPIX, "steps at image end");
    expect_eq(int'(img_end), 1, "img_end flag");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
