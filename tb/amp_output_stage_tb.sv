// amp_output_stage_tb: self-checking test of adder, on/off selector and limit.
//
// For random PI outputs, feed-forward values and on/off settings, compares
// amp_out one clock later with max(0, min(32767, on ? pi+ff : ff)) and counts
// how often the >= 0 limit and each selector position were exercised.
module amp_output_stage_tb;
  logic clk = 0, rst_n = 0, ctrl_on = 0;
  logic signed [15:0] pi_u = '0, ff = '0, amp_out;
  int checks = 0, failures = 0, n_clamp = 0, n_on = 0, n_off = 0;

  amp_output_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic signed [15:0] p, input logic signed [15:0] f, input logic on);
    int s, e;
    pi_u <= p; ff <= f; ctrl_on <= on;
    s = on ? int'(p) + int'(f) : int'(f);
    e = (s < 0) ? 0 : (s > 32767) ? 32767 : s;
    if (s < 0) n_clamp++;
    if (on) n_on++; else n_off++;
    @(posedge clk); #1;
    checks++;
    if (int'(amp_out) != e) begin
      failures++;
      $display("pi=%0d ff=%0d on=%0d: got %0d expected %0d", p, f, on, amp_out, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    apply(16'sd100, 16'sd200, 1);
    apply(16'sd100, 16'sd200, 0);
    apply(-16'sd500, 16'sd200, 1);
    apply(16'sd30000, 16'sd30000, 1);
    apply(16'sd30000, -16'sd5, 0);
    repeat (2000) apply(16'($urandom), 16'($urandom), 1'($urandom));
    checks++;
    if (n_clamp == 0 || n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
