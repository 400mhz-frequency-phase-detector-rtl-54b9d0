// Bench-test workloads run on fpd_top with every parameter at its default.
//
// Part 1, phase detectors over frequency: the reference/loop pair and the
// drive/pickup pair are run at 5, 50, 200, 220 and 400 MHz. The tuning
// detector is driven up to 220 MHz and the loop detector up to 400 MHz,
// which are the highest frequencies each is meant for. At each frequency the
// drive leads the pickup by 0.2 of a period, reading 2 * 0.2 * 32768 on the
// 16-bit tuning phase error. The loop lags the reference by 0.25 of a
// period, reading 0.25 * 32768. Periods are kept slightly off multiples of
// the 10 ns clock so the meters sample the whole period.
//
// Part 2, frequency discriminator: two 10 MHz inputs 1 Hz apart (periods of
// 100 000.000 ps and 100 000.010 ps), one full 1 s round. The error must
// read 0, 1 or 2 Hz, as in the bench test of the original board.
module tb_fpd_bench;
  timeunit 1ps;
  timeprecision 1fs;
  import fpd_pkg::*;

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

  fpd_top dut (
    .clk_tb, .rst_n, .rf_in, .freq_enable,
    .pd_out, .loop_sat_hi, .loop_sat_lo,
    .tune_phase_valid, .tune_phase_err, .loop_phase_valid, .loop_phase_err,
    .freq_valid, .freq_no_signal, .f_ref_hz, .f_loop_hz, .f_err_hz
  );

  always #5000 clk_tb = ~clk_tb;

  // generators: period per[i] (0 = stopped), first edge off[i] after release
  real    per[4] = '{5000.0, 5000.0, 5000.0, 5000.0};
  real    off[4] = '{0.0, 0.0, 0.0, 0.0};
  logic   hold = 1'b1;
  logic [3:0] running = '0;

  for (genvar i = 0; i < 4; i++) begin : g_gen
    always begin
      wait (!hold);
      running[i] = 1'b1;
      #(off[i] + 1.0);
      while (!hold) begin
        if (per[i] == 0.0) #1000;
        else begin
          rf_in[i] = 1'b1; #(per[i] / 2.0);
          rf_in[i] = 1'b0; #(per[i] / 2.0);
        end
      end
      running[i] = 1'b0;
    end
  end

  task automatic pulse(input int i);
    rf_in[i] = 1'b1; #2000;
    rf_in[i] = 1'b0; #2000;
  endtask

  task automatic set_waves(input real p0, p1, p2, p3, o0, o1, o2, o3);
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

  // one frequency point: pl for the loop pair, pt for the tuning pair
  task automatic phase_point(input real pl, input real pt);
    int tune_exp, loop_exp;
    set_waves(pl, pl, pt, pt, 0.0, 0.25 * pl, 0.2 * pt, 0.0);
    repeat (2) @(posedge clk_tb iff tune_phase_valid);
    #1;
    tune_exp = int'(2.0 * 0.2 * 32768.0);
    loop_exp = int'(0.25 * 32768.0);
    checks++;
    if (int'(tune_phase_err) < tune_exp - 655 || int'(tune_phase_err) > tune_exp + 655) begin
      failures++;
      $display("FAIL tuning detector at %0.1f MHz: %0d, expected %0d", 1.0e6 / pt, tune_phase_err, tune_exp);
    end
    checks++;
    if (int'(loop_phase_err) < loop_exp - 655 || int'(loop_phase_err) > loop_exp + 655) begin
      failures++;
      $display("FAIL loop detector at %0.1f MHz: %0d, expected %0d", 1.0e6 / pl, loop_phase_err, loop_exp);
    end
  endtask

  initial begin
    #2000 rst_n = 1'b0;
    #20000 rst_n = 1'b1;

    phase_point(200_003.0, 200_003.0);   //   5 MHz
    phase_point(20_011.0, 20_011.0);     //  50 MHz
    phase_point(5_003.0, 5_003.0);       // 200 MHz
    phase_point(4_547.0, 4_547.0);       // 220 MHz
    phase_point(2_501.0, 4_547.0);       // 400 MHz loop, tuning stays at 220 MHz

    // 10 MHz, loop 1 Hz lower; tuning pair idle at 1 MHz
    set_waves(100_000.0, 100_000.010, 1_000_003.0, 1_000_003.0, 0.0, 25_000.0, 0.0, 0.0);
    #1000;
    freq_enable = 1'b1;
    @(posedge clk_tb iff freq_valid);
    #1;
    $display("10 MHz pair 1 Hz apart: f_ref=%0d f_loop=%0d error=%0d Hz", f_ref_hz, f_loop_hz, f_err_hz);
    checks++;
    if (freq_no_signal || f_err_hz < 0 || f_err_hz > 2 ||
        f_ref_hz < 9_999_999 || f_ref_hz > 10_000_001 ||
        f_loop_hz < 9_999_998 || f_loop_hz > 10_000_000) begin
      failures++;
      $display("FAIL frequency discriminator");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (130_000_000) @(posedge clk_tb);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
