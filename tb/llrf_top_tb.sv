// llrf_top_tb: end-to-end closed-loop test of the pulsed RF controller.
//
// The controller, at its default sizes (2048-entry tables, 16-stage
// CORDICs), drives a behavioural cavity model (first-order low-pass, gain 0.8,
// 30 degree phase shift). The testbench loads both tables through the host
// port, then runs a sequence of pulses:
//   1-2  internal periodic trigger, amplitude control on, feed forward on;
//   3    amplitude control off: the drive must equal the scaled feed-forward
//        table value;
//   4    external trigger, amplitude control on, a two-level set point table.
// Checked: trigger spacing equals the programmed period; each pulse lasts
// pulse_len * step_cycles clocks; at the end of each closed-loop pulse the
// cavity amplitude is within 1e-3 of the target and the phase (computed here
// from I/Q with atan2) within 0.5 degrees of the setpoint; both integrators
// stay frozen between pulses; the drive is never negative. Each mechanism
// (internal trigger, external trigger, integrator hold, control off, >= 0
// limit active, feed forward added, pulse end) is counted and a failure is
// counted for any that never happened.
module llrf_top_tb;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  STEP = 4;          // clocks per table entry
  localparam int  LEN  = 2048;       // entries per pulse
  localparam int  PERIOD = 12000;    // internal trigger period, clocks

  logic      clk = 0, rst_n = 0;
  sample_t   adc_i, adc_q, adc_amp, dac_i, dac_q;
  llrf_cfg_t cfg;
  logic      tbl_we = 0, tbl_sel = 0;
  logic [10:0] tbl_addr = '0;
  sample_t   tbl_wdata = '0;
  logic      ext_trigger = 0, trigger, pulse_active, pulse_done;
  phase_t    meas_phase, phase_drive;
  sample_t   amp_target, amp_drive;

  int checks = 0, failures = 0, cyc = 0;
  int n_int_trig = 0, n_ext_trig = 0, n_hold = 0, n_off = 0, n_clamp = 0, n_ff = 0, n_done = 0;

  llrf_top dut (.*);

  cavity_model cav (.clk, .beam_on(1'b0), .drive_i(dac_i), .drive_q(dac_q), .adc_i, .adc_q, .adc_amp);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---------------------------------------------------------------- monitors
  int last_trig = -1, pulse_start = -1;
  logic signed [63:0] ph_acc_q, amp_acc_q;
  logic was_active = 0, acc_seen = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    if (trigger) begin
      if (cfg.trig_use_ext) n_ext_trig++;
      else begin
        n_int_trig++;
        if (last_trig >= 0 && cfg.trig_enable) begin
          expect_true("internal trigger period", cyc - last_trig == PERIOD);
        end
        last_trig = cyc;
      end
    end
    if (pulse_active && !was_active) pulse_start = cyc;
    if (pulse_done) begin
      n_done++;
      expect_true("pulse length", cyc - pulse_start == LEN * STEP);
    end
    was_active = pulse_active;
    // integrators frozen while the scaled set point is outside a pulse
    if (acc_seen && !dut.active_d[1] && !dut.active_d[0] && !pulse_active) begin
      checks++;
      if (ph_acc_q != 64'(dut.u_phase_pid.acc) || amp_acc_q != 64'(dut.u_amp_pi.acc)) begin
        failures++;
        $display("FAIL integrator moved between pulses at cycle %0d", cyc);
      end
      n_hold++;
    end
    ph_acc_q  = 64'(dut.u_phase_pid.acc);
    amp_acc_q = 64'(dut.u_amp_pi.acc);
    acc_seen  = 1'b1;
    checks++;
    if (amp_drive < 0) begin
      failures++;
      $display("FAIL negative drive");
    end
    if (dut.u_amp_out.sel < 0) n_clamp++;
    if (cfg.amp_ctrl_on && pulse_active && dut.ff_scaled != 0 && dut.amp_pi_u != 0) n_ff++;
  end

  // ------------------------------------------------------------- helpers
  task automatic load_table(input bit sel, input int first_val, input int second_val, input int split);
    for (int a = 0; a < 2048; a++) begin
      tbl_we <= 1; tbl_sel <= sel; tbl_addr <= 11'(a);
      tbl_wdata <= sample_t'((a < split) ? first_val : second_val);
      @(posedge clk);
    end
    tbl_we <= 0;
  endtask

  // Wait for the end of the next pulse, checking regulation just before it.
  task automatic check_pulse(input string name, input bit closed_loop, input real target_frac);
    real amp, ph, sp, da, dp, target;
    int ff_ok = 1;
    @(posedge pulse_active);
    // near the end of the pulse
    repeat (LEN * STEP - 40) begin
      @(posedge clk);
      if (!closed_loop && cyc - pulse_start > 40) begin
        // open loop: drive equals the scaled feed-forward value
        if (int'(amp_drive) != ((16384 * int'(cfg.amp_setpoint)) >>> 15)) ff_ok = 0;
        n_off++;
      end
    end
    #1;
    if (closed_loop) begin
      target = target_frac * real'(cfg.amp_setpoint);
      amp = $sqrt(real'(adc_i) * real'(adc_i) + real'(adc_q) * real'(adc_q));
      ph  = $atan2(real'(adc_q), real'(adc_i)) * 180.0 / PI;
      sp  = real'(cfg.phase_setpoint) * 360.0 / 65536.0;
      if (sp > 180.0) sp -= 360.0;
      da  = (real'(adc_amp) - target) / target;
      dp  = ph - sp;
      $display("%s: amplitude %0.1f target %0.1f (rel. error %e), phase %0.3f deg setpoint %0.3f",
               name, real'(adc_amp), target, da, ph, sp);
      expect_true({name, " amplitude within 1e-3"}, da < 1e-3 && da > -1e-3);
      expect_true({name, " I/Q magnitude matches detector"}, (amp - real'(adc_amp)) < 3.0 && (real'(adc_amp) - amp) < 3.0);
      expect_true({name, " phase within 0.5 deg"}, dp < 0.5 && dp > -0.5);
    end else begin
      expect_true({name, " drive equals feed forward"}, ff_ok == 1);
    end
    @(negedge pulse_active);
  endtask

  initial begin
    cfg = '0;
    cfg.phase_setpoint = 16'd8192;          // 45 degrees
    cfg.amp_setpoint   = 16'sd20000;
    cfg.ph_kp  = -16'sd64;                  // error = measured - setpoint
    cfg.ph_ki  = -16'sd400;
    cfg.ph_kd  = 16'sd0;                    // D path used with zero gain
    cfg.amp_kp = -16'sd128;
    cfg.amp_ki = -16'sd400;
    cfg.amp_ctrl_on  = 1'b1;
    cfg.trig_enable  = 1'b0;
    cfg.trig_use_ext = 1'b0;
    cfg.trig_period  = 32'(PERIOD);
    cfg.step_cycles  = 16'(STEP);
    cfg.pulse_len    = 12'(LEN);
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    load_table(1'b0, 26214, 26214, 2048);   // set point 0.8 of the setpoint
    load_table(1'b1, 16384, 16384, 2048);   // feed forward 0.5
    cfg.trig_enable = 1'b1;
    check_pulse("pulse 1", 1'b1, 0.8);
    check_pulse("pulse 2", 1'b1, 0.8);
    cfg.amp_ctrl_on = 1'b0;
    check_pulse("pulse 3 (control off)", 1'b0, 0.0);
    // external trigger, two-level set point table
    repeat (100) @(posedge clk);
    cfg.trig_use_ext = 1'b1;
    cfg.amp_ctrl_on  = 1'b1;
    load_table(1'b0, 16384, 29491, 1024);   // 0.5 then 0.9
    repeat (500) @(posedge clk);
    fork
      check_pulse("pulse 4 (external trigger)", 1'b1, 0.9);
      begin
        #3 ext_trigger = 1;
        repeat (50) @(posedge clk);
        ext_trigger = 0;
      end
    join
    repeat (200) @(posedge clk);
    expect_true("internal trigger used", n_int_trig > 0);
    expect_true("external trigger used", n_ext_trig > 0);
    expect_true("integrators held between pulses", n_hold > 0);
    expect_true("amplitude control switched off", n_off > 0);
    expect_true(">= 0 limit active", n_clamp > 0);
    expect_true("feed forward added to PI output", n_ff > 0);
    expect_true("pulses ended", n_done == 4);
    $display("mechanisms: int_trig=%0d ext_trig=%0d hold=%0d off=%0d clamp=%0d ff=%0d done=%0d",
             n_int_trig, n_ext_trig, n_hold, n_off, n_clamp, n_ff, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
