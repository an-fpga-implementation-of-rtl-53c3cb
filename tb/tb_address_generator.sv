// tb_address_generator: runs the six LFSRs with the default switch sets and
// seeds for 2000 steps (with idle cycles) and compares the three {row, column}
// addresses with six reference LFSRs; checks reseeding by `load`.
module tb_address_generator;
  import stego_pkg::*;
  import stego_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  addr_t ay, acb, acr;
  logic [8:0] r [6];
  int checks = 0, failures = 0;

  localparam logic [8:0] T [6] = '{TAPS_LFSR1, TAPS_LFSR2, TAPS_LFSR3, TAPS_LFSR4, TAPS_LFSR5, TAPS_LFSR6};
  localparam logic [8:0] S [6] = '{9'h03F, 9'h04F, 9'h033, 9'h031, 9'h054, 9'h034};

  address_generator dut (.clk, .rst_n, .load, .step, .addr_y(ay), .addr_cb(acb), .addr_cr(acr));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if (ay !== {r[0], r[1]} || acb !== {r[2], r[3]} || acr !== {r[4], r[5]}) begin
      failures++;
      $display("FAIL %s: got %h %h %h expected %h %h %h", what, ay, acb, acr,
               {r[0], r[1]}, {r[2], r[3]}, {r[4], r[5]});
    end
  endtask

  initial begin
    for (int k = 0; k < 6; k++) r[k] = S[k];
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare("after reset");
    for (int i = 0; i < 2000; i++) begin
      step = ($urandom_range(0, 4) != 0);
      @(posedge clk); #1;
      if (step) for (int k = 0; k < 6; k++) r[k] = lfsr_ref_next(r[k], T[k]);
      compare("step");
    end
    step = 1'b0; load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    for (int k = 0; k < 6; k++) r[k] = S[k];
    compare("reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
