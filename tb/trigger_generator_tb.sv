// trigger_generator_tb: self-checking test of the trigger source.
//
// Internal mode: counts strobes and checks the spacing equals `period` and
// the first strobe comes one clock after enable. External mode: drives
// asynchronous rising edges and checks one strobe per edge, three clocks
// later, and none while the input stays high. Disabled: no strobes.
module trigger_generator_tb;
  logic        clk = 0, rst_n = 0, enable = 0, use_ext = 0, ext_trig = 0;
  logic [31:0] period = 32'd10;
  logic        trigger;
  int checks = 0, failures = 0;
  int cyc = 0, last_trig = -1, ntrig = 0;

  trigger_generator dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Watch strobes in internal mode.
  task automatic run_internal(input int p, input int n_cycles);
    int start, first;
    period <= 32'(p);
    @(posedge clk); #1;
    enable = 1; start = cyc;
    ntrig = 0; last_trig = -1; first = -1;
    repeat (n_cycles) begin
      @(posedge clk); #1;
      if (trigger) begin
        if (last_trig >= 0) expect_eq("period", cyc - last_trig, p);
        else first = cyc - start;
        last_trig = cyc; ntrig++;
      end
    end
    expect_eq("first strobe delay", first, 1);
    expect_eq("strobe count", ntrig, (n_cycles - 1) / p + 1);
    enable <= 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // disabled: nothing
    period <= 32'd4;
    repeat (20) begin @(posedge clk); #1 expect_eq("disabled", int'(trigger), 0); end
    run_internal(10, 100);
    run_internal(1, 20);
    run_internal(37, 400);
    // external mode
    use_ext <= 1; enable <= 1; period <= 32'd5;
    repeat (4) @(posedge clk);
    for (int e = 0; e < 5; e++) begin
      int seen, at, t0;
      seen = 0; at = -1;
      #3 ext_trig = 1;        // asynchronous to clk
      t0 = cyc;
      repeat (12) begin
        @(posedge clk); #1;
        if (trigger) begin seen++; at = cyc - t0; end
      end
      expect_eq("ext strobes per edge", seen, 1);
      expect_eq("ext latency", at, 3);
      #2 ext_trig = 0;
      repeat (6) begin @(posedge clk); #1 expect_eq("no strobe on fall", int'(trigger), 0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
