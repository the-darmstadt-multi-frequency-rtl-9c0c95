// cordic_vectoring: I/Q to phase converter ("IQ to Phase").
//
// The controller measures the cavity phase from the base-band I and Q samples
// with the CORDIC algorithm, as the document describes. This is a fully
// pipelined CORDIC in vectoring mode: the input vector is first turned by 180
// degrees if I is negative, then each stage k rotates it by +-atan(2^-k) toward
// the positive I axis and accumulates the angle turned. The pipelined
// structure, the number of stages and the widths are this design's choice.
//
// Interface: i_in/q_in signed DATA_W-bit; phase is an unsigned fraction of a
// full turn (2^16 = 360 deg, 0 = +I axis, 2^14 = +Q axis); mag is the vector
// length (DATA_W+2 bits) times the CORDIC gain 1.64676 (unsigned). With STAGES = 16 the
// phase error is below 2 LSB.
//
// Timing: one sample per clock, latency STAGES+1 clocks.
module cordic_vectoring #(
  parameter int unsigned DATA_W = llrf_pkg::DATA_W,
  parameter int unsigned STAGES = 16,
  localparam int unsigned GUARD = 4,             // fraction bits inside
  localparam int unsigned XW    = DATA_W + 3 + GUARD
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] i_in,
  input  logic signed [DATA_W-1:0] q_in,
  output logic        [15:0]       phase,
  output logic        [DATA_W+1:0] mag
);
  import cordic_atan_pkg::*;

  logic signed [XW-1:0]      x [STAGES+1];
  logic signed [XW-1:0]      y [STAGES+1];
  logic        [ANGLE_W-1:0] z [STAGES+1];

  // Stage 0: bring the vector into the right half plane.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0;
    end else if (i_in < 0) begin
      x[0] <= -(XW'(i_in) <<< GUARD);
      y[0] <= -(XW'(q_in) <<< GUARD);
      z[0] <= HALF_TURN;
    end else begin
      x[0] <= XW'(i_in) <<< GUARD;
      y[0] <= XW'(q_in) <<< GUARD;
      z[0] <= '0;
    end
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        x[k+1] <= '0; y[k+1] <= '0; z[k+1] <= '0;
      end else if (y[k] >= 0) begin
        x[k+1] <= x[k] + (y[k] >>> k);
        y[k+1] <= y[k] - (x[k] >>> k);
        z[k+1] <= z[k] + atan_k(k);
      end else begin
        x[k+1] <= x[k] - (y[k] >>> k);
        y[k+1] <= y[k] + (x[k] >>> k);
        z[k+1] <= z[k] - atan_k(k);
      end
    end
  end

  // Round the 20-bit angle to 16 bits.
  logic [ANGLE_W-1:0] z_round;
  assign z_round = z[STAGES] + ANGLE_W'(1 << (ANGLE_W - 17));
  assign phase   = z_round[ANGLE_W-1 -: 16];
  logic signed [XW-1:0] x_round;
  assign x_round = x[STAGES] + XW'(1 << (GUARD - 1));
  assign mag     = x_round[GUARD +: DATA_W+2];

endmodule
