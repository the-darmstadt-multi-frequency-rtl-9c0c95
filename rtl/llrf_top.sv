// llrf_top: pulsed low-level RF control algorithm of the FPGA board.
//
// The cavity field arrives as base-band samples: I and Q from the RF board's
// I/Q demodulator and the amplitude from its power detector, each digitised by
// an ADC. Phase and amplitude are controlled by separate loops:
//   * phase: a CORDIC converts I/Q to a phase; a PID controller acts on
//     (phase - phase setpoint). Its integrator holds between pulses, when the
//     measured phase has no meaning.
//   * amplitude: a trigger starts the pulse shape generator, which steps
//     through a 2048-entry set point table; the value, scaled by the amplitude
//     setpoint, is the time-dependent target of a PI controller. A second
//     table, also scaled by the amplitude setpoint, gives a feed-forward drive
//     that is added to the PI output (beam load compensation). With amplitude
//     control switched off, only the feed-forward drive is used. The result is
//     limited to >= 0.
// A second CORDIC turns the drive amplitude and phase into I/Q samples for
// the modulator DACs. This structure, the table depth and the trigger sources
// follow the document; widths, number formats, clock-per-entry stepping and
// the host settings port are this design's choices.
//
// Interface: cfg carries all host settings (see llrf_pkg::llrf_cfg_t); the
// host writes either table through tbl_we/tbl_sel/tbl_addr/tbl_wdata
// (tbl_sel 0: set point table, 1: feed-forward table).
//
// Timing: one sample per clock in every path. From the ADC to the DACs the
// amplitude path takes 2 + 17 = 19 clocks (PI, output stage, CORDIC) and the
// phase path 17 + 1 + 17 = 35 clocks (CORDIC, PID, CORDIC). A table entry
// reaches the PI controller 3 clocks after the sequencer addresses it. Both
// integrators hold while no pulse is running.
module llrf_top #(
  parameter int unsigned TABLE_DEPTH   = llrf_pkg::TABLE_DEPTH,
  parameter int unsigned CORDIC_STAGES = 16,
  localparam int unsigned AW           = $clog2(TABLE_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // ADC samples
  input  llrf_pkg::sample_t         adc_i,
  input  llrf_pkg::sample_t         adc_q,
  input  llrf_pkg::sample_t         adc_amp,
  // DAC samples
  output llrf_pkg::sample_t         dac_i,
  output llrf_pkg::sample_t         dac_q,
  // host settings and table write port
  input  llrf_pkg::llrf_cfg_t       cfg,
  input  logic            tbl_we,
  input  logic            tbl_sel,
  input  logic [AW-1:0]   tbl_addr,
  input  llrf_pkg::sample_t         tbl_wdata,
  // trigger and status
  input  logic            ext_trigger,
  output logic            trigger,
  output logic            pulse_active,
  output logic            pulse_done,
  output llrf_pkg::phase_t          meas_phase,
  output llrf_pkg::sample_t         amp_target,
  output llrf_pkg::sample_t         amp_drive,
  output llrf_pkg::phase_t          phase_drive
);

  // ---------------------------------------------------------------- trigger
  trigger_generator u_trig (
    .clk, .rst_n,
    .enable   (cfg.trig_enable),
    .use_ext  (cfg.trig_use_ext),
    .period   (cfg.trig_period),
    .ext_trig (ext_trigger),
    .trigger  (trigger)
  );

  // ----------------------------------------------------- pulse shape generator
  logic [AW-1:0] seq_addr;
  logic          seq_active;

  pulse_sequencer #(.DEPTH(TABLE_DEPTH)) u_seq (
    .clk, .rst_n,
    .trigger     (trigger),
    .step_cycles (cfg.step_cycles),
    .pulse_len   ((AW+1)'(cfg.pulse_len)),
    .addr        (seq_addr),
    .active      (seq_active),
    .done        (pulse_done)
  );
  assign pulse_active = seq_active;

  logic [llrf_pkg::DATA_W-1:0] sp_raw, ff_raw;

  pulse_table #(.DEPTH(TABLE_DEPTH), .DATA_W(llrf_pkg::DATA_W)) u_sp_table (
    .clk,
    .we    (tbl_we && !tbl_sel),
    .waddr (tbl_addr),
    .wdata (tbl_wdata),
    .raddr (seq_addr),
    .rdata (sp_raw)
  );

  pulse_table #(.DEPTH(TABLE_DEPTH), .DATA_W(llrf_pkg::DATA_W)) u_ff_table (
    .clk,
    .we    (tbl_we && tbl_sel),
    .waddr (tbl_addr),
    .wdata (tbl_wdata),
    .raddr (seq_addr),
    .rdata (ff_raw)
  );

  // Outside a pulse both tables read as 0; active_d[0] lines up with the
  // table read data, active_d[1] with the scaled values.
  logic [1:0] active_d;
  always_ff @(posedge clk) begin
    if (!rst_n) active_d <= '0;
    else        active_d <= {active_d[0], seq_active};
  end

  llrf_pkg::sample_t sp_gated, ff_gated, ff_scaled;
  assign sp_gated = active_d[0] ? llrf_pkg::sample_t'(sp_raw) : '0;
  assign ff_gated = active_d[0] ? llrf_pkg::sample_t'(ff_raw) : '0;

  setpoint_scaler #(.DATA_W(llrf_pkg::DATA_W)) u_sp_scale (
    .clk, .rst_n, .tbl(sp_gated), .scale(cfg.amp_setpoint), .y(amp_target)
  );
  setpoint_scaler #(.DATA_W(llrf_pkg::DATA_W)) u_ff_scale (
    .clk, .rst_n, .tbl(ff_gated), .scale(cfg.amp_setpoint), .y(ff_scaled)
  );

  logic hold;
  assign hold = !active_d[1];

  // ------------------------------------------------------------- phase loop
  logic [llrf_pkg::DATA_W+1:0] meas_mag_unused;
  llrf_pkg::sample_t           phase_u;

  cordic_vectoring #(.DATA_W(llrf_pkg::DATA_W), .STAGES(CORDIC_STAGES)) u_iq2ph (
    .clk, .rst_n, .i_in(adc_i), .q_in(adc_q), .phase(meas_phase), .mag(meas_mag_unused)
  );

  pid_controller #(.DATA_W(llrf_pkg::DATA_W), .USE_D(1'b1), .WRAP_ERR(1'b1)) u_phase_pid (
    .clk, .rst_n,
    .meas (llrf_pkg::sample_t'(meas_phase)),
    .setp (llrf_pkg::sample_t'(cfg.phase_setpoint)),
    .hold (hold),
    .kp   (cfg.ph_kp),
    .ki   (cfg.ph_ki),
    .kd   (cfg.ph_kd),
    .u    (phase_u)
  );
  assign phase_drive = llrf_pkg::phase_t'(phase_u);

  // --------------------------------------------------------- amplitude loop
  llrf_pkg::sample_t amp_pi_u;

  pid_controller #(.DATA_W(llrf_pkg::DATA_W), .USE_D(1'b0), .WRAP_ERR(1'b0)) u_amp_pi (
    .clk, .rst_n,
    .meas (adc_amp),
    .setp (amp_target),
    .hold (hold),
    .kp   (cfg.amp_kp),
    .ki   (cfg.amp_ki),
    .kd   ('0),
    .u    (amp_pi_u)
  );

  amp_output_stage #(.DATA_W(llrf_pkg::DATA_W)) u_amp_out (
    .clk, .rst_n,
    .pi_u    (amp_pi_u),
    .ff      (ff_scaled),
    .ctrl_on (cfg.amp_ctrl_on),
    .amp_out (amp_drive)
  );

  // ------------------------------------------------------------ to the DACs
  cordic_rotation #(.DATA_W(llrf_pkg::DATA_W), .STAGES(CORDIC_STAGES)) u_ap2iq (
    .clk, .rst_n, .amp(amp_drive), .phase(phase_drive), .i_out(dac_i), .q_out(dac_q)
  );

endmodule
