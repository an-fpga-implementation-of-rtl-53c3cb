// tb_dseu: drives random Y/Cb/Cr pixels into the extract unit, one per clock
// with random gaps, and checks after exactly two cycles that b1 is Y[0] when
// Cb[0] is 0 and its complement otherwise, and b2 likewise from Cr[1], Cr[0].
module tb_dseu;
  import stego_pkg::*;

  typedef struct packed { pix_t y, cb, cr; int cyc; } req_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid, out_b1, out_b2;
  pix_t in_y = '0, in_cb = '0, in_cr = '0;
  int checks = 0, failures = 0, cyc = 0, n_out = 0;
  req_t q [$];
  localparam int N = 20000;

  dseu dut (.*);

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
    if (in_valid) q.push_back('{in_y, in_cb, in_cr, cyc});
    if (out_valid) begin
      req_t r;
      logic e1, e2;
      r = q.pop_front();
      e1 = r.cb[0] ? !r.y[0]  : r.y[0];
      e2 = r.cr[0] ? !r.cr[1] : r.cr[1];
      checks += 3;
      if (out_b1 !== e1) begin failures++; $display("FAIL b1"); end
      if (out_b2 !== e2) begin failures++; $display("FAIL b2"); end
      if (cyc - r.cyc != 2) begin failures++; $display("FAIL latency %0d", cyc - r.cyc); end
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
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("FAIL %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
