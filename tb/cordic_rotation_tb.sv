// cordic_rotation_tb: self-checking test of the amplitude/phase to I/Q converter.
//
// Streams random amplitudes (0..32767) and phases, one per clock, and compares
// I and Q, STAGES+1 clocks later, with amp*cos(phase) and amp*sin(phase)
// computed in floating point (tolerance 6 LSB). Negative amplitudes must give
// zero. A single marked sample checks the latency exactly.
module cordic_rotation_tb;
  localparam int STAGES = 16;
  localparam int LAT = STAGES + 1;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] amp = '0, i_out, q_out;
  logic [15:0] phase = '0;
  int checks = 0, failures = 0;
  logic signed [15:0] hist_a [$];
  logic [15:0] hist_p [$];

  cordic_rotation #(.STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input logic signed [15:0] a, input logic [15:0] p);
    real ang, ei, eq, av;
    av = (a < 0) ? 0.0 : real'(a);
    ang = real'(p) / 65536.0 * 2.0 * PI;
    ei = av * $cos(ang); eq = av * $sin(ang);
    if (ei > 32767.0) ei = 32767.0;
    if (eq > 32767.0) eq = 32767.0;
    checks++;
    if (real'(i_out) - ei > 6.0 || ei - real'(i_out) > 6.0 ||
        real'(q_out) - eq > 6.0 || eq - real'(q_out) > 6.0) begin
      failures++;
      $display("amp=%0d ph=%0d: I=%0d Q=%0d expected %f %f", a, p, i_out, q_out, ei, eq);
    end
  endtask

  initial begin
    logic signed [15:0] va;
    logic [15:0] vp;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    amp <= 16'sd20000; phase <= 16'h4000;   // 90 degrees
    @(posedge clk);
    amp <= '0;
    for (int n = 1; n <= LAT + 3; n++) begin
      #1;
      checks++;
      if ((q_out > 1000) != (n == LAT)) begin
        failures++;
        $display("latency: at clock %0d after input Q=%0d", n, q_out);
      end
      @(posedge clk);
    end
    for (int n = 0; n < 3000 + LAT; n++) begin
      if (n < 16) begin
        va = (n < 12) ? 16'sd32767 : -16'sd1000;
        vp = 16'(n * 16'h2000);
      end else begin
        va = 16'($urandom_range(0, 32767)); vp = 16'($urandom);
      end
      amp <= va; phase <= vp;
      hist_a.push_back(va); hist_p.push_back(vp);
      @(posedge clk); #1;
      if (hist_a.size() >= LAT) check_out(hist_a.pop_front(), hist_p.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
