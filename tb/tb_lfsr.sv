// tb_lfsr: checks the LFSR against the reference next-state function for
// two switch sets of the default table (switches 1,5 seed 0x3F and switches
// 1,2,8 seed 0x33), including hold without `step`, reseed by `load`, and the
// period of each sequence, which the reference model finds by iteration.
module tb_lfsr;
  import stego_ref_pkg::*;

  localparam logic [8:0] TA = 9'b0_0010_0010, SA = 9'h03F;
  localparam logic [8:0] TB = 9'b1_0000_0110, SB = 9'h033;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [8:0] qa, qb, ea, eb;
  int checks = 0, failures = 0;
  int per_a, per_b, ref_per_a, ref_per_b;

  lfsr #(.W(9), .TAPS(TA), .SEED(SA)) dut_a (.clk, .rst_n, .load, .step, .q(qa));
  lfsr #(.W(9), .TAPS(TB), .SEED(SB)) dut_b (.clk, .rst_n, .load, .step, .q(qb));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [8:0] got, input logic [8:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic int ref_period(input logic [8:0] seed, input logic [8:0] taps);
    logic [8:0] s;
    s = lfsr_ref_next(seed, taps);
    for (int n = 1; n < 1024; n++) begin
      if (s == seed) return n;
      s = lfsr_ref_next(s, taps);
    end
    return -1;
  endfunction

  initial begin
    ea = SA; eb = SB;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(qa, SA, "reset seed a");
    check(qb, SB, "reset seed b");
    // 600 steps with random idle cycles in between
    for (int i = 0; i < 600; i++) begin
      step = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (step) begin
        ea = lfsr_ref_next(ea, TA);
        eb = lfsr_ref_next(eb, TB);
      end
      check(qa, ea, "sequence a");
      check(qb, eb, "sequence b");
    end
    // reseed (load has priority over step)
    load = 1'b1; step = 1'b1;
    @(posedge clk); #1;
    load = 1'b0; step = 1'b0;
    check(qa, SA, "reload a");
    check(qb, SB, "reload b");
    // period
    ref_per_a = ref_period(SA, TA);
    ref_per_b = ref_period(SB, TB);
    per_a = 0; per_b = 0;
    step = 1'b1;
    for (int n = 1; n <= 600; n++) begin
      @(posedge clk); #1;
      if (per_a == 0 && qa == SA) per_a = n;
      if (per_b == 0 && qb == SB) per_b = n;
    end
    step = 1'b0;
    checks += 2;
    if (per_a != ref_per_a || per_b != ref_per_b) begin
      failures++;
      $display("FAIL period a %0d/%0d b %0d/%0d", per_a, ref_per_a, per_b, ref_per_b);
    end
    $display("periods: a=%0d b=%0d", per_a, per_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
