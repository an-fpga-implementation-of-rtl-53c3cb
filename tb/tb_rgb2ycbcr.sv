// tb_rgb2ycbcr: streams 20000 RGB pixels (random plus the eight corners of
// the colour cube), one per clock with random gaps, and compares each output
// with the reference conversion, exactly, and with the real-valued equation
// within 1 LSB. Checks the 2-cycle latency.
module tb_rgb2ycbcr;
  import stego_pkg::*;
  import stego_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  rgb_t in_rgb = '0;
  ycc_t out_ycc;
  int checks = 0, failures = 0;
  rgb_t sent [$];
  int   sent_cyc [$];
  int   cyc = 0;
  int   n_out = 0;
  localparam int N = 20000;

  rgb2ycbcr dut (.clk, .rst_n, .in_valid, .in_rgb, .out_valid, .out_ycc);

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
      rgb_t p;
      int   c0;
      logic [23:0] e;
      real  yr, cbr, crr;
      p  = sent.pop_front();
      c0 = sent_cyc.pop_front();
      e  = ycc_ref(p.r, p.g, p.b);
      checks += 3;
      if (out_ycc !== e) begin
        failures++;
        $display("FAIL rgb %0d %0d %0d: got %0d %0d %0d expected %0d %0d %0d", p.r, p.g, p.b,
                 out_ycc.y, out_ycc.cb, out_ycc.cr, e[23:16], e[15:8], e[7:0]);
      end
      yr  =  0.257*p.r + 0.504*p.g + 0.098*p.b + 16.0;
      cbr = -0.148*p.r - 0.291*p.g + 0.439*p.b + 128.0;
      crr =  0.439*p.r - 0.368*p.g - 0.071*p.b + 128.0;
      if (iabs(yr - out_ycc.y) > 1 || iabs(cbr - out_ycc.cb) > 1 || iabs(crr - out_ycc.cr) > 1) begin
        failures++;
        $display("FAIL real-valued deviation for rgb %0d %0d %0d", p.r, p.g, p.b);
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
      if (i < 8) in_rgb <= {{8{i[2]}}, {8{i[1]}}, {8{i[0]}}};
      else       in_rgb <= rgb_t'($urandom);
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
    sent.push_back(in_rgb);
    sent_cyc.push_back(cyc);
  end
endmodule
