// llrf_pkg: types and constants shared by the pulsed low-level RF controller.
//
// All signal samples are 16-bit two's complement. Phases are 16-bit unsigned
// fractions of a full turn (2^16 = 360 degrees), so phase differences wrap
// naturally. Table entries are signed Q1.15 fractions of the amplitude setpoint.
// The widths are this design's choice; the control structure they serve
// (phase PID, amplitude PI, set point and feed-forward tables) follows the
// pulsed p-Linac algorithm.
package llrf_pkg;

  localparam int unsigned DATA_W      = 16;
  localparam int unsigned TABLE_DEPTH = 2048;
  localparam int unsigned TABLE_AW    = $clog2(TABLE_DEPTH);

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic        [DATA_W-1:0] phase_t;

  // Host-programmed settings of the controller.
  typedef struct packed {
    phase_t              phase_setpoint;  // wanted cavity phase
    sample_t             amp_setpoint;    // scales both tables
    sample_t             ph_kp;           // phase PID gains, Kp/Kd Q8.8, Ki 2^-16
    sample_t             ph_ki;
    sample_t             ph_kd;
    sample_t             amp_kp;          // amplitude PI gains
    sample_t             amp_ki;
    logic                amp_ctrl_on;     // 1: PI + feed forward, 0: feed forward only
    logic                trig_enable;     // trigger generator running
    logic                trig_use_ext;    // 1: external trigger input
    logic [31:0]         trig_period;     // clocks between internal triggers
    logic [15:0]         step_cycles;     // clocks per table entry
    logic [TABLE_AW:0]   pulse_len;       // table entries per pulse
  } llrf_cfg_t;

  // Saturate a wide signed value to DATA_W bits.
  function automatic sample_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return sample_t'(v);
  endfunction

endpackage
