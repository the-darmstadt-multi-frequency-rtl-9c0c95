// setpoint_scaler_tb: self-checking test of the table value x setpoint product.
//
// Drives random and corner operands and compares y, one clock later, with
// floor(tbl * scale / 2^15) saturated to 16 bits, computed in the testbench.
module setpoint_scaler_tb;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] tbl = '0, scale = '0, y;
  int checks = 0, failures = 0;

  setpoint_scaler dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y(longint a, longint b);
    longint p = a * b;
    longint q = (p >= 0) ? p / 32768 : -((-p + 32767) / 32768);   // floor
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return q;
  endfunction

  task automatic apply(input logic signed [15:0] a, input logic signed [15:0] b);
    tbl <= a; scale <= b;
    @(posedge clk); #1;
    checks++;
    if (longint'(y) != ref_y(a, b)) begin
      failures++;
      $display("%0d * %0d: got %0d expected %0d", a, b, y, ref_y(a, b));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    apply(16'sd32767, 16'sd20000);
    apply(16'sd16384, 16'sd20000);
    apply(-16'sd32768, -16'sd32768);   // saturates high
    apply(-16'sd32768, 16'sd32767);
    apply(16'sd0, 16'sd1234);
    apply(-16'sd1, 16'sd1);
    repeat (2000) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
