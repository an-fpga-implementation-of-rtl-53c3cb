// tb_seu: drives random Y/Cb/Cr pixels and bit pairs into the embed unit,
// one step per clock with random gaps, and checks after exactly three cycles
// that Y is unchanged, Cb and Cr keep bits 7..1, Cb[0] is 0 exactly when b1
// equals Y[0], Cr[0] is 0 exactly when b2 equals Cr[1], and that the
// receiver's rule recovers b1 and b2 from the outputs.
module tb_seu;
  import stego_pkg::*;

  typedef struct packed { pix_t y, cb, cr; logic b1, b2; int cyc; } req_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_b1 = 1'b0, in_b2 = 1'b0, out_valid;
  pix_t in_y = '0, in_cb = '0, in_cr = '0, out_y, out_cb, out_cr;
  int checks = 0, failures = 0, cyc = 0, n_out = 0;
  req_t q [$];
  localparam int N = 20000;

  seu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid) q.push_back('{in_y, in_cb, in_cr, in_b1, in_b2, cyc});
    if (out_valid) begin
      req_t r;
      logic exp_f1, exp_f2;
      r = q.pop_front();
      // flag 0 when the bit matches the selected cover bit, 1 otherwise
      exp_f1 = (r.b1 == r.y[0])  ? 1'b0 : 1'b1;
      exp_f2 = (r.b2 == r.cr[1]) ? 1'b0 : 1'b1;
      checks += 5;
      if (out_y !== r.y) begin failures++; $display("FAIL Y changed"); end
      if (out_cb !== {r.cb[7:1], exp_f1}) begin failures++; $display("FAIL Cb %h exp %h", out_cb, {r.cb[7:1], exp_f1}); end
      if (out_cr !== {r.cr[7:1], exp_f2}) begin failures++; $display("FAIL Cr %h exp %h", out_cr, {r.cr[7:1], exp_f2}); end
      if (((out_cb[0] == 1'b0) ? out_y[0] : !out_y[0]) !== r.b1 ||
          ((out_cr[0] == 1'b0) ? out_cr[1] : !out_cr[1]) !== r.b2) begin
        failures++; $display("FAIL bits not recoverable");
      end
      if (cyc - r.cyc != 3) begin failures++; $display("FAIL latency %0d", cyc - r.cyc); end
      n_out++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      while ($urandom_range(0, 3) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_y  <= pix_t'($urandom);
      in_cb <= pix_t'($urandom);
      in_cr <= pix_t'($urandom);
      in_b1 <= 1'($urandom);
      in_b2 <= 1'($urandom);
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("FAIL %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
