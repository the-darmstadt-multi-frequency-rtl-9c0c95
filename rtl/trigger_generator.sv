// trigger_generator: start strobe for the pulse shape generator.
//
// Two sources: an internal counter that fires every `period` clocks (the
// periodic trigger generated inside the FPGA) or the rising edge of an
// external trigger input (the source intended for the test stand). The
// external input is asynchronous and passes a two-flop synchroniser first;
// synchroniser, edge detection and the programmable period are this design's
// choices.
//
// Timing: with enable=1 and use_ext=0 the first strobe comes one clock after
// enable rises, then one every `period` clocks (period 0 counts as 1). With
// use_ext=1 the strobe comes three clocks after the external rising edge.
// `trigger` is a one-clock pulse.
module trigger_generator (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        use_ext,
  input  logic [31:0] period,
  input  logic        ext_trig,
  output logic        trigger
);

  logic [31:0] cnt;
  logic [2:0]  ext_sync;   // [0],[1] synchroniser, [2] previous value

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt      <= '0;
      ext_sync <= '0;
      trigger  <= 1'b0;
    end else begin
      ext_sync <= {ext_sync[1:0], ext_trig};
      trigger  <= 1'b0;
      if (!enable) begin
        cnt <= '0;
      end else if (use_ext) begin
        cnt     <= '0;
        trigger <= ext_sync[1] & ~ext_sync[2];
      end else begin
        if (cnt == 0) trigger <= 1'b1;
        cnt <= (cnt + 32'd1 >= period) ? '0 : cnt + 32'd1;
      end
    end
  end

endmodule
