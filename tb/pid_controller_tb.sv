// pid_controller_tb: self-checking test of the PID / PI controller.
//
// Two instances run side by side: a PID with wrapping (phase) error and a PI
// with saturating (amplitude) error, the two ways the controller is used.
// Each is compared, clock by clock, with a model of
//   e = meas - setp,  acc += ki*e unless hold,  u = P + acc>>>16 + D
// kept in the testbench. Random stimulus with random hold is followed by
// directed runs: integrator wind-up to saturation, hold keeping the integral
// constant, and the one-clock latency.
module pid_controller_tb;
  logic clk = 0, rst_n = 0, hold = 0;
  logic signed [15:0] meas = '0, setp = '0, kp = '0, ki = '0, kd = '0;
  logic signed [15:0] u_pid, u_pi;
  int checks = 0, failures = 0, n_hold = 0, n_sat = 0;

  pid_controller #(.USE_D(1'b1), .WRAP_ERR(1'b1)) dut_pid (
    .clk, .rst_n, .meas, .setp, .hold, .kp, .ki, .kd, .u(u_pid));
  pid_controller #(.USE_D(1'b0), .WRAP_ERR(1'b0)) dut_pi (
    .clk, .rst_n, .meas, .setp, .hold, .kp, .ki, .kd, .u(u_pi));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clampl(longint v, longint lo, longint hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // model state
  longint acc_pid = 0, acc_pi = 0, eprev_pid = 0, eprev_pi = 0;

  function automatic longint wrap16(longint v);
    longint m = v & 64'hffff;
    return (m >= 32768) ? m - 65536 : m;
  endfunction

  // One clock: apply inputs, advance the models, compare after the edge.
  task automatic step(input logic signed [15:0] m, input logic signed [15:0] s, input logic h);
    longint e1, e2, p, i, d, exp_pid, exp_pi;
    meas <= m; setp <= s; hold <= h;
    if (h) n_hold++;
    e1 = wrap16(longint'(m) - longint'(s));
    e2 = clampl(longint'(m) - longint'(s), -32768, 32767);
    if (!h) begin
      acc_pid = clampl(acc_pid + longint'(ki) * e1, -32768 * 65536, 32767 * 65536);
      acc_pi  = clampl(acc_pi  + longint'(ki) * e2, -32768 * 65536, 32767 * 65536);
    end
    p = (longint'(kp) * e1) >>> 8; i = acc_pid >>> 16; d = (longint'(kd) * (e1 - eprev_pid)) >>> 8;
    exp_pid = clampl(p + i + d, -32768, 32767);
    p = (longint'(kp) * e2) >>> 8; i = acc_pi >>> 16;
    exp_pi = clampl(p + i, -32768, 32767);
    if (exp_pi == 32767 || exp_pi == -32768) n_sat++;
    eprev_pid = e1; eprev_pi = e2;
    @(posedge clk); #1;
    checks += 2;
    if (longint'(u_pid) != exp_pid) begin
      failures++;
      $display("PID m=%0d s=%0d h=%0d: got %0d expected %0d", m, s, h, u_pid, exp_pid);
    end
    if (longint'(u_pi) != exp_pi) begin
      failures++;
      $display("PI m=%0d s=%0d h=%0d: got %0d expected %0d", m, s, h, u_pi, exp_pi);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    // random gains and stimulus
    for (int blk = 0; blk < 20; blk++) begin
      kp = 16'($urandom_range(0, 2048)) - 16'sd1024;
      ki = 16'($urandom_range(0, 4096)) - 16'sd2048;
      kd = 16'($urandom_range(0, 512)) - 16'sd256;
      repeat (200) step(16'($urandom), 16'($urandom), ($urandom_range(0, 3) == 0));
    end
    // wind-up to the positive limit, then hold keeps it
    kp = 16'sd0; kd = 16'sd0; ki = 16'sd4000;
    repeat (600) step(16'sd5000, 16'sd0, 1'b0);
    repeat (50) step(-16'sd5000, 16'sd0, 1'b1);
    repeat (600) step(-16'sd5000, 16'sd0, 1'b0);
    // wrapped phase error: 170 deg - (-170 deg) is -20 deg, not +340 deg
    kp = 16'sd256; ki = 16'sd0;
    repeat (5) step(16'sd30948, -16'sd30948, 1'b1);
    checks++;
    if (u_pid >= u_pi || n_hold == 0 || n_sat == 0) begin
      failures++;
      $display("wrap/saturation not exercised as expected: u_pid=%0d u_pi=%0d", u_pid, u_pi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
