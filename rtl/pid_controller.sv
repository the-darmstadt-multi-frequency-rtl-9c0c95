// pid_controller: error subtractor and PID controller of one control loop.
//
// Used twice in the controller: as the phase PID (measured phase against the
// phase setpoint) and as the amplitude PI (detector amplitude against the
// scaled set point table value). As in the document, the proportional term is
// joined by an integral term that removes the steady-state offset, a
// differential term exists but is meant to run with zero gain, and the
// integrator can be frozen (`hold`) between pulses, when the input carries no
// meaningful value.
//
// The error is meas - setp, the sign printed at the setpoint input of the
// algorithm's flow chart; the gains are signed so the loop polarity is set by
// the host. With WRAP_ERR = 1 the difference wraps modulo 2^DATA_W (phases,
// where 2^16 is a full turn); otherwise it saturates. The scaling is this
// design's choice:
//   u = (kp*e) >>> KP_SHIFT + acc >>> KI_SHIFT + (kd*(e - e_prev)) >>> KD_SHIFT
//   acc += ki*e every clock unless hold = 1,
// with acc clamped to the output range (anti-windup) and u saturated to
// DATA_W bits. USE_D = 0 builds a PI controller.
//
// Timing: one sample per clock; u is registered, one clock after meas/setp.
module pid_controller #(
  parameter int unsigned DATA_W   = llrf_pkg::DATA_W,
  parameter bit          USE_D    = 1'b1,
  parameter bit          WRAP_ERR = 1'b0,
  parameter int unsigned KP_SHIFT = 8,
  parameter int unsigned KI_SHIFT = 16,
  parameter int unsigned KD_SHIFT = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] meas,
  input  logic signed [DATA_W-1:0] setp,
  input  logic                     hold,
  input  logic signed [DATA_W-1:0] kp,
  input  logic signed [DATA_W-1:0] ki,
  input  logic signed [DATA_W-1:0] kd,
  output logic signed [DATA_W-1:0] u
);
  localparam int unsigned W = 2 * DATA_W + KI_SHIFT + 4;
  localparam logic signed [W-1:0] OUT_MAX = W'((longint'(1) << (DATA_W - 1)) - 1);
  localparam logic signed [W-1:0] OUT_MIN = -W'(longint'(1) << (DATA_W - 1));
  localparam logic signed [W-1:0] ACC_MAX = OUT_MAX <<< KI_SHIFT;
  localparam logic signed [W-1:0] ACC_MIN = OUT_MIN <<< KI_SHIFT;

  logic signed [DATA_W:0]   diff;
  logic signed [DATA_W-1:0] err, err_prev;
  logic signed [W-1:0]      acc, acc_sum, acc_next;
  logic signed [W-1:0]      p_term, i_term, d_term, total;

  function automatic logic signed [W-1:0] clamp(input logic signed [W-1:0] v,
                                                input logic signed [W-1:0] lo,
                                                input logic signed [W-1:0] hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  always_comb begin
    diff = (DATA_W+1)'(meas) - (DATA_W+1)'(setp);
    if (WRAP_ERR) err = diff[DATA_W-1:0];
    else          err = DATA_W'(clamp(W'(diff), OUT_MIN, OUT_MAX));

    acc_sum  = acc + W'(ki) * W'(err);
    acc_next = hold ? acc : clamp(acc_sum, ACC_MIN, ACC_MAX);

    p_term = (W'(kp) * W'(err)) >>> KP_SHIFT;
    i_term = acc_next >>> KI_SHIFT;
    if (USE_D) d_term = (W'(kd) * (W'(err) - W'(err_prev))) >>> KD_SHIFT;
    else       d_term = '0;
    total  = clamp(p_term + i_term + d_term, OUT_MIN, OUT_MAX);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc      <= '0;
      err_prev <= '0;
      u        <= '0;
    end else begin
      acc      <= acc_next;
      err_prev <= err;
      u        <= DATA_W'(total);
    end
  end

endmodule
