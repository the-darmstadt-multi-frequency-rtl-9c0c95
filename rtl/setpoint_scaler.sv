// setpoint_scaler: multiplies a pulse table value by the amplitude setpoint.
//
// Both tables of the controller store a pulse shape; the amplitude setpoint
// scales them to the wanted field level, one multiplier per table. The table
// value is a signed Q1.15 fraction (32767 ~ 1.0), the setpoint a signed
// sample: y = (tbl * scale) >>> 15, saturated to DATA_W bits. The number
// format is this design's choice.
//
// Timing: one sample per clock, y registered one clock after the inputs.
module setpoint_scaler #(
  parameter int unsigned DATA_W = llrf_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] tbl,
  input  logic signed [DATA_W-1:0] scale,
  output logic signed [DATA_W-1:0] y
);
  localparam int unsigned PW = 2 * DATA_W;
  localparam logic signed [PW-1:0] Y_MAX = PW'((longint'(1) << (DATA_W - 1)) - 1);
  localparam logic signed [PW-1:0] Y_MIN = -PW'(longint'(1) << (DATA_W - 1));

  logic signed [PW-1:0] prod, shifted;

  assign prod    = PW'(tbl) * PW'(scale);
  assign shifted = prod >>> (DATA_W - 1);

  always_ff @(posedge clk) begin
    if (!rst_n)               y <= '0;
    else if (shifted > Y_MAX) y <= DATA_W'(Y_MAX);
    else if (shifted < Y_MIN) y <= DATA_W'(Y_MIN);
    else                      y <= DATA_W'(shifted);
  end

endmodule
