// tb_ycbcr2rgb: streams 20000 YCbCr pixels (random over the full 8-bit range,
// so saturation is exercised, plus the eight corners), one per clock with
// random gaps, and compares each output with the reference conversion
// exactly, and with the real-valued BT.601 inverse within 2 LSB where that is
// inside 0..255. Checks the 2-cycle latency.
module tb_ycbcr2rgb;
  import stego_pkg::*;
  import stego_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  ycc_t in_ycc = '0;
  rgb_t out_rgb;
  int checks = 0, failures = 0;
  ycc_t sent [$];
  int   sent_cyc [$];
  int   cyc = 0;
  int   n_out = 0;
  localparam int N = 20000;

  ycbcr2rgb dut (.clk, .rst_n, .in_valid, .in_ycc, .out_valid, .out_rgb);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(input real x);
    return (x < 0.0) ? int'(-x) : int'(x);
  endfunction

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      ycc_t p;
      int   c0;
      logic [23:0] e;
      real  rr, gr, br;
      p  = sent.pop_front();
      c0 = sent_cyc.pop_front();
      e  = rgb_ref(p.y, p.cb, p.cr);
      checks += 3;
      if (out_rgb !== e) begin
        failures++;
        $display("FAIL ycc %0d %0d %0d: got %0d %0d %0d expected %0d %0d %0d", p.y, p.cb, p.cr,
                 out_rgb.r, out_rgb.g, out_rgb.b, e[23:16], e[15:8], e[7:0]);
      end
      rr = 1.164*p.y + 1.596*p.cr - 222.921;
      gr = 1.164*p.y - 0.392*p.cb - 0.813*p.cr + 135.576;
      br = 1.164*p.y + 2.017*p.cb - 276.836;
      if ((rr > 2.0 && rr < 253.0 && iabs(rr - out_rgb.r) > 2) ||
          (gr > 2.0 && gr < 253.0 && iabs(gr - out_rgb.g) > 2) ||
          (br > 2.0 && br < 253.0 && iabs(br - out_rgb.b) > 2)) begin
        failures++;
        $display("FAIL real-valued deviation for ycc %0d %0d %0d", p.y, p.cb, p.cr);
      end
      if (cyc - c0 != 2) begin
        failures++;
        $display("FAIL latency %0d", cyc - c0);
      end
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
      if (i < 8) in_ycc <= {{8{i[2]}}, {8{i[1]}}, {8{i[0]}}};
      else       in_ycc <= ycc_t'($urandom);
      in_valid <= 1'b1;
      #0;
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("FAIL %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record what the DUT samples
  always @(posedge clk) if (rst_n && in_valid) begin
    sent.push_back(in_ycc);
    sent_cyc.push_back(cyc);
  end
endmodule
