// pulse_sequencer_tb: self-checking test of the table address sequencer.
//
// Runs pulses with several step/length settings and compares, clock by clock,
// the address and active outputs with the expected sequence: active for
// pulse_len*step_cycles clocks starting one clock after the trigger, each
// address held for step_cycles clocks. Also checks that a trigger during a
// pulse is ignored, that pulse_len = 0 starts nothing and that done pulses once.
module pulse_sequencer_tb;
  logic        clk = 0, rst_n = 0, trigger = 0;
  logic [15:0] step_cycles = 16'd1;
  logic [11:0] pulse_len = 12'd1;
  logic [10:0] addr;
  logic        active, done;
  int checks = 0, failures = 0;

  pulse_sequencer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic run_pulse(input int step, input int len, input bit retrig);
    int dones = 0;
    step_cycles <= 16'(step); pulse_len <= 12'(len);
    @(posedge clk);
    trigger <= 1;
    @(posedge clk);
    trigger <= 0;
    for (int n = 0; n < len * step; n++) begin
      #1;
      expect_eq("active", int'(active), 1);
      expect_eq("addr", int'(addr), n / step);
      if (done) dones++;
      if (retrig && n == step + 1) trigger <= 1; else trigger <= 0;
      @(posedge clk);
    end
    trigger <= 0;
    #1;
    expect_eq("active after end", int'(active), 0);
    expect_eq("done at end", int'(done), 1);
    expect_eq("done during pulse", dones, 0);
    repeat (3) @(posedge clk);
    #1;
    expect_eq("stays idle", int'(active), 0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_pulse(1, 1, 0);
    run_pulse(3, 5, 1);
    run_pulse(1, 2048, 0);
    run_pulse(7, 40, 1);
    // pulse_len = 0 must not start a pulse
    pulse_len <= '0; step_cycles <= 16'd2;
    @(posedge clk); trigger <= 1; @(posedge clk); trigger <= 0;
    repeat (4) begin
      #1 expect_eq("len 0 idle", int'(active), 0);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
