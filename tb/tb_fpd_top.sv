// End-to-end testbench of fpd_top, with a shortened 20000-cycle (200 us)
// frequency gate and a 2**12-sample phase-error window; everything else at
// its default.
//
// Four square-wave generators stand in for the comparator outputs: reference
// rf_in[0], loop rf_in[1], cavity pickup rf_in[2] and cavity drive rf_in[3].
// The test walks the board through the situations the design is built for
// and counts each mechanism it sees:
//   tune_lead / tune_lag  tuning detector with drive ahead of / behind pickup
//   loop_linear           loop detector in its linear phase range (locked)
//   loop_pull_up          loop slower than reference: output held high
//   loop_pull_down        loop faster than reference: output held low
//   freq_round            frequency round with both inputs present
//   freq_no_signal        frequency round with the loop input missing
// Each must happen at least once. Digital phase errors are compared with
// phase/pi (tuning) and phase/2pi (loop) times the window, with the RF
// period (5.003 ns) kept off a multiple of the clock so sampling spreads, the frequencies
// with the true ones to within f/Ns + 1 Hz, and the error with their exact
// difference; the four filter outputs are checked to be the detector pulses.
module tb_fpd_top;
  timeunit 1ps;
  timeprecision 1ps;
  import fpd_pkg::*;

  localparam int unsigned GATE = 20_000;
  localparam int unsigned WIN  = 12;
  localparam int          W    = 2 ** WIN;
  localparam longint      T    = 5003;   // 199.9 MHz, not locked to clk_tb

  logic   clk_tb = 1'b0;
  logic   rst_n = 1'b1;
  logic [3:0] rf_in = '0;
  logic   freq_enable = 1'b0;
  logic [3:0] pd_out;
  logic   loop_sat_hi, loop_sat_lo;
  logic   tune_phase_valid, loop_phase_valid;
  phase_t tune_phase_err, loop_phase_err;
  logic   freq_valid, freq_no_signal;
  count_t f_ref_hz, f_loop_hz;
  logic signed [CNT_W:0] f_err_hz;

  int checks = 0;
  int failures = 0;

  fpd_top #(.GATE_CYCLES(GATE), .WIN_LOG2(WIN)) dut (
    .clk_tb, .rst_n, .rf_in, .freq_enable,
    .pd_out, .loop_sat_hi, .loop_sat_lo,
    .tune_phase_valid, .tune_phase_err, .loop_phase_valid, .loop_phase_err,
    .freq_valid, .freq_no_signal, .f_ref_hz, .f_loop_hz, .f_err_hz
  );

  always #5000 clk_tb = ~clk_tb;

  // generators: period per[i] (0 = stopped), first edge off[i] after release
  longint per[4] = '{5000, 5000, 5000, 5000};
  longint off[4] = '{0, 0, 0, 0};
  logic   hold = 1'b1;
  logic [3:0] running = '0;

  for (genvar i = 0; i < 4; i++) begin : g_gen
    always begin
      wait (!hold);
      running[i] = 1'b1;
      #(off[i] + 1);
      while (!hold) begin
        if (per[i] == 0) #1000;
        else begin
          rf_in[i] = 1'b1; #(per[i] / 2);
          rf_in[i] = 1'b0; #(per[i] - per[i] / 2);
        end
      end
      running[i] = 1'b0;
    end
  end

  task automatic pulse(input int i);
    rf_in[i] = 1'b1; #2000;
    rf_in[i] = 1'b0; #2000;
  endtask

  task automatic set_waves(input longint p0, p1, p2, p3, o0, o1, o2, o3);
    hold = 1'b1;
    wait (running == '0);
    per = '{p0, p1, p2, p3};
    off = '{o0, o1, o2, o3};
    // Both detectors remember the phase of the previous setting (they are
    // unwrapped beyond one period); single edges bring them back to their
    // zero state so that the new offsets are read as intended.
    #1000;
    while (dut.tune_up || dut.tune_dn) begin
      if (dut.tune_up) pulse(2); else pulse(3);
    end
    while (pd_out[2] || loop_sat_lo) begin
      if (loop_sat_lo) pulse(0); else pulse(1);
    end
    #1000;
    hold = 1'b0;
  endtask

  // mechanism counters
  int n_tune_lead = 0, n_tune_lag = 0, n_loop_linear = 0;
  int n_pull_up = 0, n_pull_down = 0, n_freq = 0, n_nosig = 0;

  always @(posedge loop_sat_hi) n_pull_up++;
  always @(posedge loop_sat_lo) n_pull_down++;

  // the filter outputs are the detector pulses
  always @(negedge clk_tb) begin
    checks++;
    if (pd_out[3] !== ~pd_out[2] || pd_out[0] !== dut.u_tuning_pd.up ||
        pd_out[1] !== dut.u_tuning_pd.dn || pd_out[2] !== dut.u_loop_fpd.pd_out) begin
      failures++;
      $display("FAIL filter outputs %b", pd_out);
    end
  end

  task automatic expect_phase(input int tune_exp, input int loop_exp, input int tol);
    // skip two windows that may straddle the change, then check one
    repeat (3) @(posedge clk_tb iff tune_phase_valid);
    #1;
    checks++;
    if (int'(tune_phase_err) < tune_exp - tol || int'(tune_phase_err) > tune_exp + tol) begin
      failures++;
      $display("FAIL tuning phase error %0d, expected %0d", tune_phase_err, tune_exp);
    end
    checks++;
    if (int'(loop_phase_err) < loop_exp - tol || int'(loop_phase_err) > loop_exp + tol) begin
      failures++;
      $display("FAIL loop phase error %0d, expected %0d", loop_phase_err, loop_exp);
    end
  endtask

  function automatic bit near(input count_t got, input longint period_ps);
    real f, tol;
    f   = 1.0e12 / real'(period_ps);
    tol = f / real'(GATE) + 1.0;
    return real'(got) >= f - tol && real'(got) <= f + tol;
  endfunction

  task automatic expect_freq(input bit signal);
    // the first round may have started before the change: check the second
    repeat (2) @(posedge clk_tb iff freq_valid);
    #1;
    checks++;
    if (freq_no_signal !== !signal) begin
      failures++;
      $display("FAIL freq_no_signal=%0b", freq_no_signal);
      return;
    end
    if (!signal) begin
      n_nosig++;
      return;
    end
    n_freq++;
    checks++;
    if (!near(f_ref_hz, per[0]) || !near(f_loop_hz, per[1]) ||
        f_err_hz != $signed({1'b0, f_ref_hz}) - $signed({1'b0, f_loop_hz})) begin
      failures++;
      $display("FAIL frequencies ref %0d loop %0d error %0d", f_ref_hz, f_loop_hz, f_err_hz);
    end
  endtask

  initial begin
    #2000 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    freq_enable = 1'b1;

    // 200 MHz, locked: loop 1250 ps behind the reference (about pi/2),
    // drive 1000 ps ahead of the pickup (about 0.4 pi)
    set_waves(T, T, T, T, 0, 1250, 1000, 0);
    expect_phase(2 * 1000 * W / T, 1250 * W / T, W / 40);
    n_tune_lead++;
    n_loop_linear++;
    expect_freq(1);

    // pickup ahead of drive by 1500 ps (about -0.6 pi), loop 3750 ps behind
    set_waves(T, T, T, T, 0, 3750, 0, 1500);
    expect_phase(-2 * 1500 * W / T, 3750 * W / T, W / 40);
    n_tune_lag++;
    n_loop_linear++;

    // loop 4 % slower than the reference: the loop detector is held high
    set_waves(T, 5200, T, T, 0, 1037, 1000, 0);
    expect_phase(2 * 1000 * W / T, W - 1, W / 40);
    expect_freq(1);

    // loop 4 % faster: held low
    set_waves(T, 4800, T, T, 0, 1037, 1000, 0);
    expect_phase(2 * 1000 * W / T, 0, W / 40);
    expect_freq(1);

    // loop input lost
    set_waves(T, 0, T, T, 0, 0, 1000, 0);
    expect_freq(0);

    checks++;
    if (n_tune_lead == 0 || n_tune_lag == 0 || n_loop_linear == 0 || n_pull_up == 0 ||
        n_pull_down == 0 || n_freq == 0 || n_nosig == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: tune_lead=%0d tune_lag=%0d loop_linear=%0d loop_pull_up=%0d loop_pull_down=%0d freq_round=%0d freq_no_signal=%0d",
             n_tune_lead, n_tune_lag, n_loop_linear, n_pull_up, n_pull_down, n_freq, n_nosig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * GATE) @(posedge clk_tb);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
