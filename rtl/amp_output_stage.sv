// amp_output_stage: feed-forward adder, control on/off switch and >= 0 limit.
//
// The amplitude drive is the amplitude PI output plus the scaled feed-forward
// table value. With amplitude control switched off only the feed-forward value
// passes (open-loop drive from the table). A negative drive has no meaning for
// an amplitude, so it is limited to 0. This is the order of the flow chart:
// adder, selector, limiter. Saturating addition and the output register are
// this design's choice.
//
// Timing: amp_out is registered, one clock after the inputs.
module amp_output_stage #(
  parameter int unsigned DATA_W = llrf_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] pi_u,
  input  logic signed [DATA_W-1:0] ff,
  input  logic                     ctrl_on,
  output logic signed [DATA_W-1:0] amp_out
);
  localparam logic signed [DATA_W:0] MAXV = (DATA_W+1)'((longint'(1) << (DATA_W - 1)) - 1);

  logic signed [DATA_W:0] sum, sel;

  always_comb begin
    sum = (DATA_W+1)'(pi_u) + (DATA_W+1)'(ff);
    sel = ctrl_on ? sum : (DATA_W+1)'(ff);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         amp_out <= '0;
    else if (sel < 0)   amp_out <= '0;
    else if (sel > MAXV) amp_out <= DATA_W'(MAXV);
    else                amp_out <= DATA_W'(sel);
  end

  // The limiter guarantees a non-negative drive amplitude.
  a_nonneg: assert property (@(posedge clk) disable iff (!rst_n) amp_out >= 0);

endmodule
