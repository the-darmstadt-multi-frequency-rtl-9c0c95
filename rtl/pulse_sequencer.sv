// pulse_sequencer: address generator of the pulse shape generator.
//
// A trigger strobe starts a pulse: the table address runs from 0 to
// pulse_len-1, advancing one entry every step_cycles clocks, and `active` is
// high for the whole pulse. With 2048 entries and one entry per microsecond a
// pulse can last up to about 2 ms, as the document describes; the programmable
// step and length are this design's choice. A trigger that arrives while a
// pulse is running is ignored. pulse_len = 0 or step_cycles = 0 start nothing.
//
// Timing: `active` rises and addr = 0 one clock after the trigger; each address
// is held for step_cycles clocks; `active` falls step_cycles clocks after the
// last address appeared. `done` pulses for one clock at the end of a pulse.
module pulse_sequencer #(
  parameter int unsigned DEPTH = llrf_pkg::TABLE_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          trigger,
  input  logic [15:0]   step_cycles,
  input  logic [AW:0]   pulse_len,
  output logic [AW-1:0] addr,
  output logic          active,
  output logic          done
);

  logic [15:0] step_cnt;
  logic        last_step, last_entry;

  assign last_step  = (step_cnt == step_cycles - 16'd1);
  assign last_entry = ({1'b0, addr} == pulse_len - 1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr     <= '0;
      active   <= 1'b0;
      done     <= 1'b0;
      step_cnt <= '0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        addr     <= '0;
        step_cnt <= '0;
        if (trigger && pulse_len != 0 && step_cycles != 0) active <= 1'b1;
      end else if (last_step) begin
        step_cnt <= '0;
        if (last_entry) begin
          active <= 1'b0;
          done   <= 1'b1;
          addr   <= '0;
        end else begin
          addr <= addr + 1'b1;
        end
      end else begin
        step_cnt <= step_cnt + 16'd1;
      end
    end
  end

  // During a pulse the address never leaves the programmed length.
  a_addr_in_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                    active |-> ({1'b0, addr} < pulse_len));

endmodule
