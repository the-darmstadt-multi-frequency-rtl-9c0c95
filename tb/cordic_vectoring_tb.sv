// cordic_vectoring_tb: self-checking test of the I/Q to phase converter.
//
// Streams random I/Q vectors (one per clock) and vectors on the axes, and
// compares each output, STAGES+1 clocks later, with atan2(Q, I) computed in
// floating point (tolerance 3 LSB of 2^16 per turn, about 0.017 degrees) and
// with the magnitude 1.64676*sqrt(I^2+Q^2) (tolerance 0.05 % + 4). A single
// marked sample checks the latency exactly.
module cordic_vectoring_tb;
  localparam int STAGES = 16;
  localparam int LAT = STAGES + 1;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] i_in = '0, q_in = '0;
  logic [15:0] phase;
  logic [17:0] mag;
  int checks = 0, failures = 0;
  logic signed [15:0] hist_i [$], hist_q [$];

  cordic_vectoring #(.STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input logic signed [15:0] vi, input logic signed [15:0] vq);
    real a, m, dm;
    int ep, d;
    if (vi == 0 && vq == 0) return;
    a = $atan2(real'(vq), real'(vi)) / (2.0 * PI) * 65536.0;
    if (a < 0) a += 65536.0;
    ep = int'(a) & 16'hffff;
    d = (int'(phase) - ep) & 16'hffff;
    if (d >= 32768) d -= 65536;
    m = 1.6467602581 * $sqrt(real'(vi) * real'(vi) + real'(vq) * real'(vq));
    dm = real'(mag) - m;
    checks++;
    if (d > 3 || d < -3 || dm > m * 0.0005 + 4.0 || dm < -(m * 0.0005 + 4.0)) begin
      failures++;
      $display("I=%0d Q=%0d: phase %0d expected %0d, mag %0d expected %f", vi, vq, phase, ep, mag, m);
    end
  endtask

  initial begin
    logic signed [15:0] vi, vq;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // latency: one nonzero sample among zeros
    i_in <= 16'sd0; q_in <= 16'sd20000;
    @(posedge clk);
    i_in <= '0; q_in <= '0;
    for (int n = 1; n <= LAT + 3; n++) begin
      #1;
      checks++;
      if ((mag > 1000) != (n == LAT)) begin
        failures++;
        $display("latency: at clock %0d after input mag=%0d", n, mag);
      end
      @(posedge clk);
    end
    // stream
    for (int n = 0; n < 3000 + LAT; n++) begin
      if (n < 8) begin
        vi = (n[1:0] == 0) ? 16'sd30000 : (n[1:0] == 2) ? -16'sd30000 : 16'sd0;
        vq = (n[1:0] == 1) ? 16'sd30000 : (n[1:0] == 3) ? -16'sd32768 : 16'sd0;
      end else if (n < 3000) begin
        vi = 16'($urandom); vq = 16'($urandom);
      end else begin
        vi = 0; vq = 0;
      end
      i_in <= vi; q_in <= vq;
      hist_i.push_back(vi); hist_q.push_back(vq);
      @(posedge clk); #1;
      if (hist_i.size() >= LAT) begin
        check_out(hist_i.pop_front(), hist_q.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
