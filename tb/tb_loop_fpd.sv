// Testbench for loop_fpd.
//
// An independent edge-count model (reference edges minus loop edges, held
// between -1 and 2) predicts pd_out, sat_hi and sat_lo; the outputs are
// compared with it shortly after every RF edge. On top of that the test
// checks the three regimes of the detector:
//   - same frequency, reference ahead by a fraction p of the period: the
//     output is high for p of each period (phase detector, range 0..2*pi);
//   - loop slower than the reference: once the reference has slipped a
//     cycle the output stays high (frequency discriminator, pull up);
//   - loop faster: the output stays low (pull down);
// that at equal frequency after a pull the output stays held, and that a
// small frequency offset brings it back to phase detection.
// The RF period is 2.5 ns (400 MHz).
module tb_loop_fpd;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T_PS = 2500;

  logic rst = 1'b0;
  logic rf_ref = 1'b0, rf_loop = 1'b0;
  logic pd_out, sat_hi, sat_lo;
  int   checks = 0;
  int   failures = 0;

  loop_fpd dut (.rst, .rf_ref, .rf_loop, .pd_out, .sat_hi, .sat_lo);

  // reference model
  int   m = 0;
  logic ref_q = 1'b0, loop_q = 1'b0;
  always @(rf_ref or rf_loop) begin
    if (rf_ref && !ref_q && m < 2)    m++;
    if (rf_loop && !loop_q && m > -1) m--;
    ref_q  = rf_ref;
    loop_q = rf_loop;
  end

  // compare with the model every 25 ps, away from the input edges
  realtime t_edge = 0;
  logic    started = 1'b0;
  always @(rf_ref or rf_loop) t_edge = $realtime;
  initial forever begin
    #25ps;
    if (started && $realtime - t_edge > 15) begin
      checks++;
      if (pd_out !== (m >= 1) || sat_hi !== (m == 2) || sat_lo !== (m == -1)) begin
        failures++;
        if (failures < 10)
          $display("FAIL at %0t: model %0d, pd_out=%0b sat_hi=%0b sat_lo=%0b",
                   $time, m, pd_out, sat_hi, sat_lo);
      end
    end
  end

  // high time of pd_out while measuring
  real  t_hi_start, hi_ps;
  int   n_fall;
  logic meas = 1'b0;
  always @(posedge pd_out) t_hi_start = $realtime;
  always @(negedge pd_out) if (meas) begin
    hi_ps += $realtime - t_hi_start;
    n_fall++;
  end

  // two square waves: n_ref reference periods of T_PS and n_loop loop
  // periods of loop_per, the loop wave starting loop_off later
  event go;
  int   n_ref, n_loop, loop_per, loop_off;
  logic ref_busy = 1'b0, loop_busy = 1'b0;

  always begin
    @go;
    ref_busy = 1'b1;
    repeat (n_ref) begin
      rf_ref = 1'b1; #((T_PS / 2) * 1ps);
      rf_ref = 1'b0; #((T_PS - T_PS / 2) * 1ps);
    end
    ref_busy = 1'b0;
  end

  always begin
    @go;
    loop_busy = 1'b1;
    #(loop_off * 1ps);
    repeat (n_loop) begin
      rf_loop = 1'b1; #((loop_per / 2) * 1ps);
      rf_loop = 1'b0; #((loop_per - loop_per / 2) * 1ps);
    end
    loop_busy = 1'b0;
  end

  task automatic start_waves(input int tl_ps, input int off_ps, input int dur_ps);
    n_ref    = dur_ps / T_PS;
    n_loop   = dur_ps / tl_ps;
    loop_per = tl_ps;
    loop_off = off_ps;
    ->go;
    #1ps;
  endtask

  task automatic run_waves(input int tl_ps, input int off_ps, input int dur_ps);
    start_waves(tl_ps, off_ps, dur_ps);
    wait (!ref_busy && !loop_busy);
  endtask

  task automatic phase_case(input int off_ps);
    real duty;
    hi_ps = 0.0; n_fall = 0;
    meas = 1'b1;
    run_waves(T_PS, off_ps, 40 * T_PS);
    #((off_ps + 10) * 1ps);
    meas = 1'b0;
    duty = hi_ps / (n_fall * T_PS);
    checks++;
    if (n_fall < 38 || duty < real'(off_ps) / T_PS - 0.005 || duty > real'(off_ps) / T_PS + 0.005) begin
      failures++;
      $display("FAIL phase offset %0d ps: %0d pulses, duty %f expected %f",
               off_ps, n_fall, duty, real'(off_ps) / T_PS);
    end
  endtask

  int   falls_before;
  int   rises, n_sat_hi = 0, n_sat_lo = 0;
  logic watch_rise = 1'b0;
  always @(posedge pd_out) if (watch_rise) rises++;

  initial begin
    #100ps;
    rst = 1'b1;
    #1ns;
    rst = 1'b0;
    started = 1'b1;
    #1ns;
    // phase detector: ref ahead by 10 %, 25 %, 50 %, 90 % of a period
    phase_case(250);
    phase_case(625);
    phase_case(1250);
    phase_case(2250);

    // loop slower (2.7 ns against 2.5 ns): pulled high after the first slip
    hi_ps = 0.0; n_fall = 0; meas = 1'b1;
    start_waves(2700, 1037, 200 * T_PS);
    wait (sat_hi);
    n_sat_hi++;
    falls_before = n_fall;
    wait (!ref_busy && !loop_busy);
    meas = 1'b0;
    checks++;
    if (n_fall != falls_before || pd_out !== 1'b1) begin
      failures++;
      $display("FAIL slow loop: output fell %0d times after saturating high",
               n_fall - falls_before);
    end

    // loop faster (2.3 ns): falls to the low saturation and stays low
    start_waves(2300, 1037, 200 * T_PS);
    wait (sat_lo);
    n_sat_lo++;
    rises = 0;
    watch_rise = 1'b1;
    wait (!ref_busy && !loop_busy);
    watch_rise = 1'b0;
    checks++;
    if (rises != 0 || pd_out !== 1'b0 || m > 0) begin
      failures++;
      $display("FAIL fast loop: output rose %0d times after saturating low", rises);
    end

    // equal frequency after the pull-down: the phase is beyond the linear
    // range, so the output stays low
    rises = 0;
    watch_rise = 1'b1;
    run_waves(T_PS, 1037, 40 * T_PS);
    watch_rise = 1'b0;
    checks++;
    if (rises != 0) begin
      failures++;
      $display("FAIL held low at equal frequency: %0d rises", rises);
    end

    // a slightly slower loop brings the phase back into range: pulses
    // reappear and widen by 200 ps per period until the next slip
    rises = 0; hi_ps = 0.0; n_fall = 0; meas = 1'b1;
    start_waves(2700, 1037, 40 * T_PS);
    wait (!ref_busy && !loop_busy);
    meas = 1'b0;
    checks++;
    if (n_fall < 5) begin
      failures++;
      $display("FAIL no return to phase detection: %0d pulses", n_fall);
    end

    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("FAIL a saturation never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
