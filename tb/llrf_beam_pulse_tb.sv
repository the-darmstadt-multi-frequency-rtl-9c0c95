// llrf_beam_pulse_tb: p-Linac pulse workload with beam loading.
//
// Runs the controller, at its default sizes, through the operating case it
// was built for: 200 us RF pulses with a 36 us beam pulse in the middle that
// takes a large part of the field (beam loading). A 100 MHz clock is assumed,
// so one table entry per microsecond means step_cycles = 100 and a 200 us
// pulse is 200 entries. The trigger period is set for 4 Hz (25e6 clocks); each
// pulse is launched by re-enabling the trigger generator, whose first strobe
// comes right away, instead of simulating 250 ms of idle time.
//
// The cavity model (gain 0.8, 30 degree phase shift, low-pass time constant
// 1 us, which corresponds to a loaded Q of about 1000 at 325 MHz) is loaded by
// the beam from entry 100 to entry 136, timed to meet the feed-forward drive.
// Two pulses are compared:
//   A  feed-forward table steps up during the beam window by the drive the
//      beam takes away (beam load compensation);
//   B  flat feed-forward table, the PI controller alone fights the beam.
// Checked: in pulse A the amplitude stays within 1e-3 and the phase within
// 0.5 degrees of their setpoints from 60 us to the end of the pulse, beam
// window included; pulse B deviates by more than pulse A during the beam
// (the feed forward is what keeps the field in tolerance); the pulse lasts
// 200 entries. The settling time of each pulse is printed.
module llrf_beam_pulse_tb;
  import llrf_pkg::*;
  localparam real PI       = 3.14159265358979;
  localparam int  STEP     = 100;        // clocks per entry: 1 us at 100 MHz
  localparam int  LEN      = 200;        // 200 us pulse
  localparam int  BEAM_ON  = 100;        // beam from entry 100 ...
  localparam int  BEAM_OFF = 136;        // ... for 36 us
  localparam int  FF_LAT   = 20;         // table address -> DAC, clocks
  localparam real BEAM     = 4800.0;     // beam-induced field, counts

  logic      clk = 0, rst_n = 0;
  sample_t   adc_i, adc_q, adc_amp, dac_i, dac_q;
  llrf_cfg_t cfg;
  logic      tbl_we = 0, tbl_sel = 0;
  logic [10:0] tbl_addr = '0;
  sample_t   tbl_wdata = '0;
  logic      ext_trigger = 0, trigger, pulse_active, pulse_done;
  phase_t    meas_phase, phase_drive;
  sample_t   amp_target, amp_drive;
  logic      beam_now;
  logic [FF_LAT-1:0] beam_dly = '0;

  int checks = 0, failures = 0, cyc = 0;

  llrf_top dut (.*);

  cavity_model #(.ALPHA(0.01), .BEAM(BEAM), .BEAM_PHASE_DEG(45.0)) cav (
    .clk, .beam_on(beam_dly[FF_LAT-1]), .drive_i(dac_i), .drive_q(dac_q), .adc_i, .adc_q, .adc_amp);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // Beam timed from the table address, delayed like the feed-forward drive.
  assign beam_now = pulse_active && dut.seq_addr >= 11'(BEAM_ON) && dut.seq_addr < 11'(BEAM_OFF);
  always @(posedge clk) beam_dly <= {beam_dly[FF_LAT-2:0], beam_now};

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  task automatic load_ff(input bit compensate);
    for (int a = 0; a < 2048; a++) begin
      tbl_we <= 1; tbl_sel <= 1; tbl_addr <= 11'(a);
      // 0.5 of the setpoint; + BEAM/0.8 drive counts during the beam
      tbl_wdata <= sample_t'((compensate && a >= BEAM_ON && a < BEAM_OFF) ?
                             16384 + int'(BEAM / 0.8 / 20000.0 * 32768.0) : 16384);
      @(posedge clk);
    end
    tbl_we <= 0;
  endtask

  // Run one pulse; return the worst errors during the beam and after 60 us.
  task automatic run_pulse(input string name, output real worst_beam_a, output real worst_late_a,
                           output real worst_late_p);
    real target, sp, da, dp, settle;
    int start, n;
    worst_beam_a = 0.0; worst_late_a = 0.0; worst_late_p = 0.0; settle = -1.0;
    target = 0.8 * real'(cfg.amp_setpoint);
    sp = real'(cfg.phase_setpoint) * 360.0 / 65536.0;
    cfg.trig_enable = 1'b1;
    @(posedge pulse_active);
    #1 start = cyc;
    cfg.trig_enable = 1'b0;
    while (pulse_active) begin
      @(posedge clk); #1;
      n = cyc - start;
      da = (real'(adc_amp) - target) / target;
      if (da < 0) da = -da;
      dp = $atan2(real'(adc_q), real'(adc_i)) * 180.0 / PI - sp;
      if (dp < 0) dp = -dp;
      if (da < 1e-3 && dp < 0.5) begin
        if (settle < 0) settle = real'(n) / real'(STEP);
      end else if (n < BEAM_ON * STEP) settle = -1.0;
      if (n >= 60 * STEP && n < LEN * STEP - 2) begin
        if (da > worst_late_a) worst_late_a = da;
        if (dp > worst_late_p) worst_late_p = dp;
      end
      if (n >= BEAM_ON * STEP + FF_LAT && n < BEAM_OFF * STEP + FF_LAT + 5 * STEP && da > worst_beam_a)
        worst_beam_a = da;
    end
    expect_true({name, " pulse length"}, cyc - start == LEN * STEP);
    $display("%s: settled to 1e-3 / 0.5 deg after %0.1f us; worst amplitude error in beam %e, after 60 us %e; worst phase error after 60 us %0.4f deg",
             name, settle, worst_beam_a, worst_late_a, worst_late_p);
    repeat (3000) @(posedge clk);
  endtask

  initial begin
    real a_beam, a_late, a_ph, b_beam, b_late, b_ph;
    cfg = '0;
    cfg.phase_setpoint = 16'd8192;          // 45 degrees
    cfg.amp_setpoint   = 16'sd20000;
    cfg.ph_kp  = -16'sd64;
    cfg.ph_ki  = -16'sd100;
    cfg.amp_kp = -16'sd128;
    cfg.amp_ki = -16'sd100;
    cfg.amp_ctrl_on  = 1'b1;
    cfg.trig_period  = 32'd25_000_000;      // 4 Hz at 100 MHz
    cfg.step_cycles  = 16'(STEP);
    cfg.pulse_len    = 12'(LEN);
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int a = 0; a < 2048; a++) begin    // flat set point, 0.8
      tbl_we <= 1; tbl_sel <= 0; tbl_addr <= 11'(a); tbl_wdata <= 16'sd26214;
      @(posedge clk);
    end
    tbl_we <= 0;
    load_ff(1'b1);
    run_pulse("warm-up pulse", a_beam, a_late, a_ph);
    run_pulse("A: beam load feed forward", a_beam, a_late, a_ph);
    load_ff(1'b0);
    run_pulse("B: no beam load feed forward", b_beam, b_late, b_ph);
    expect_true("A amplitude within 1e-3 from 60 us on", a_late < 1e-3);
    expect_true("A phase within 0.5 deg from 60 us on", a_ph < 0.5);
    expect_true("feed forward reduces the beam-induced error", b_beam > a_beam && b_beam > 1e-3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
