// tb_channel_ram: fills a 2^18 x 8 plane RAM with a pseudo-random pattern,
// reads it back in random order against a shadow array, checks the one-cycle
// read latency and the write-first behaviour of the single port.
module tb_channel_ram;
  logic clk = 1'b0, we = 1'b0;
  logic [17:0] addr = '0;
  logic [7:0]  din = '0, dout;
  logic [7:0]  shadow [2**18];
  int checks = 0, failures = 0;

  channel_ram dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int a = 0; a < 2**18; a++) begin
      @(negedge clk);
      we = 1'b1; addr = 18'(a); din = 8'($urandom);
      shadow[a] = din;
      @(posedge clk); #1;
      checks++;
      if (dout !== din) begin
        failures++;
        if (failures < 10) $display("FAIL write-first at %h", a);
      end
    end
    // random reads, back to back, with occasional writes
    for (int i = 0; i < 100000; i++) begin
      @(negedge clk);
      addr = 18'($urandom);
      if ($urandom_range(0, 9) == 0) begin
        we = 1'b1; din = 8'($urandom); shadow[addr] = din;
      end else begin
        we = 1'b0;
      end
      @(posedge clk); #1;
      checks++;
      if (dout !== shadow[addr]) begin
        failures++;
        if (failures < 10) $display("FAIL read at %h: %h vs %h", addr, dout, shadow[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
