// cavity_model: behavioural base-band model of a cavity and the RF front end,
// for closed-loop simulation only (not synthesizable, uses real arithmetic).
//
// The DAC I/Q drive is turned into a complex field that follows the drive as a
// first-order low-pass (one pole, coefficient ALPHA per clock), multiplied by
// GAIN and rotated by PHASE_DEG (cable and cavity phase shift). The model then
// plays the part of the RF board and the ADCs: it returns the field as I/Q
// samples and its magnitude as the power-detector amplitude, all rounded to
// 16-bit integers. A pseudo-random noise of +-NOISE LSB is added to each.
// While beam_on is high a beam loads the cavity: it drives, through the same
// low-pass, a field of BEAM counts at phase BEAM_PHASE_DEG + 180 degrees,
// i.e. it takes field away along BEAM_PHASE_DEG.
//
// Timing: outputs are registered, one clock after the drive sample.
module cavity_model #(
  parameter real ALPHA     = 1.0 / 32.0,
  parameter real GAIN      = 0.8,
  parameter real PHASE_DEG = 30.0,
  parameter int  NOISE     = 0,
  parameter real BEAM      = 0.0,
  parameter real BEAM_PHASE_DEG = 0.0
) (
  input  logic               clk,
  input  logic               beam_on,
  input  logic signed [15:0] drive_i,
  input  logic signed [15:0] drive_q,
  output logic signed [15:0] adc_i,
  output logic signed [15:0] adc_q,
  output logic signed [15:0] adc_amp
);
  localparam real PI = 3.14159265358979;
  real vi = 0.0, vq = 0.0;

  function automatic logic signed [15:0] to_adc(input real v);
    real n;
    n = (NOISE > 0) ? real'($urandom_range(0, 2 * NOISE)) - real'(NOISE) : 0.0;
    v = v + n;
    if (v > 32767.0) return 16'sd32767;
    if (v < -32768.0) return -16'sd32768;
    return 16'(longint'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5))));
  endfunction

  always @(posedge clk) begin
    real c, s, ti, tq;
    c = $cos(PHASE_DEG * PI / 180.0);
    s = $sin(PHASE_DEG * PI / 180.0);
    ti = GAIN * (c * real'(drive_i) - s * real'(drive_q));
    tq = GAIN * (s * real'(drive_i) + c * real'(drive_q));
    if (beam_on) begin
      ti = ti - BEAM * $cos(BEAM_PHASE_DEG * PI / 180.0);
      tq = tq - BEAM * $sin(BEAM_PHASE_DEG * PI / 180.0);
    end
    vi = vi + ALPHA * (ti - vi);
    vq = vq + ALPHA * (tq - vq);
    adc_i   <= to_adc(vi);
    adc_q   <= to_adc(vq);
    adc_amp <= to_adc($sqrt(vi * vi + vq * vq));
  end

endmodule
