// pulse_table: memory of one pulse shape, 2048 entries deep.
//
// Holds the time-dependent set values of a pulse (set point table) or the
// feed-forward drive (feed forward table). The host writes it through the
// write port; the pulse sequencer reads it through the read port. The depth of
// 2048 entries is the document's; the Q1.15 entry format and the separate host
// write port are this design's choice.
//
// Timing: write on the clock edge with we=1; read data is registered, valid
// one clock after raddr. Contents are not reset (memory array); the host loads
// them before the first pulse.
module pulse_table #(
  parameter int unsigned DEPTH  = llrf_pkg::TABLE_DEPTH,
  parameter int unsigned DATA_W = llrf_pkg::DATA_W,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
