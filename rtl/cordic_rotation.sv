// cordic_rotation: amplitude/phase to I/Q converter ("Amp./Phase to IQ").
//
// Turns the controller's amplitude and phase outputs into the I and Q drive
// samples for the modulator DACs. The document names this conversion only;
// this design uses a pipelined CORDIC in rotation mode. The amplitude is first
// multiplied by 1/1.64676 so that the CORDIC gain cancels; a phase in the left
// half plane is handled by negating the start vector and subtracting 180
// degrees; each stage k then rotates by +-atan(2^-k) toward the residual angle.
//
// Interface: amp is signed DATA_W bits and expected >= 0 (negative values are
// treated as 0); phase is a fraction of a full turn (2^16 = 360 deg); i_out and
// q_out are signed DATA_W bits, i_out = amp*cos(phase), q_out = amp*sin(phase),
// saturated.
//
// Timing: one sample per clock, latency STAGES+1 clocks.
module cordic_rotation #(
  parameter int unsigned DATA_W = llrf_pkg::DATA_W,
  parameter int unsigned STAGES = 16,
  localparam int unsigned GUARD = 4,             // fraction bits inside
  localparam int unsigned XW    = DATA_W + 2 + GUARD
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] amp,
  input  logic        [15:0]       phase,
  output logic signed [DATA_W-1:0] i_out,
  output logic signed [DATA_W-1:0] q_out
);
  import cordic_atan_pkg::*;

  logic signed [XW-1:0]      x [STAGES+1];
  logic signed [XW-1:0]      y [STAGES+1];
  logic signed [ANGLE_W-1:0] z [STAGES+1];

  // Stage 0: gain compensation and half-plane folding.
  logic        [DATA_W-1:0]   amp_pos;
  logic        [DATA_W+15:0]  amp_scaled;
  logic signed [XW-1:0]       x_start;
  logic        [ANGLE_W-1:0]  z_in;
  logic                       left_half;

  assign amp_pos    = (amp < 0) ? '0 : DATA_W'(amp);
  assign amp_scaled = amp_pos * CORDIC_INV_GAIN;
  assign x_start    = XW'(amp_scaled >> (16 - GUARD));
  assign z_in       = {phase, 4'h0};
  assign left_half  = phase[15] ^ phase[14];   // 90 .. 270 degrees

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0;
    end else begin
      x[0] <= left_half ? -x_start : x_start;
      y[0] <= '0;
      z[0] <= left_half ? ANGLE_W'(z_in - HALF_TURN) : z_in;
    end
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        x[k+1] <= '0; y[k+1] <= '0; z[k+1] <= '0;
      end else if (z[k] >= 0) begin
        x[k+1] <= x[k] - (y[k] >>> k);
        y[k+1] <= y[k] + (x[k] >>> k);
        z[k+1] <= z[k] - ANGLE_W'(atan_k(k));
      end else begin
        x[k+1] <= x[k] + (y[k] >>> k);
        y[k+1] <= y[k] - (x[k] >>> k);
        z[k+1] <= z[k] + ANGLE_W'(atan_k(k));
      end
    end
  end

  // Drop the fraction bits with rounding, then saturate.
  logic signed [XW-1:0] x_round, y_round;
  assign x_round = (x[STAGES] + XW'(1 << (GUARD - 1))) >>> GUARD;
  assign y_round = (y[STAGES] + XW'(1 << (GUARD - 1))) >>> GUARD;
  assign i_out   = llrf_pkg::sat16(48'(x_round));
  assign q_out   = llrf_pkg::sat16(48'(y_round));

endmodule
