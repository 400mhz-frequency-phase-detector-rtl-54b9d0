// Full-size run of fpd_top with every parameter at its default: 100 MHz time
// base, 1 s frequency gate, 2**15-sample phase-error window.
//
// It repeats the bench test of the frequency discriminator: a 1 MHz
// reference and a loop input 1 Hz lower (periods of 1 000 000 ps and
// 1 000 001 ps). One complete frequency round must report both frequencies
// within f/Ns + 1 Hz of the truth and an error of 0, 1 or 2 Hz. In the first
// milliseconds it also checks the two 16-bit digital phase errors: the cavity
// drive leads the pickup by 100 ns of a 1 us period (0.2 pi, reading
// 0.2 * 32768) and the loop lags the reference by 250 ns (pi/2, reading
// 0.25 * 32768).
module tb_fpd_full;
  timeunit 1ps;
  timeprecision 1ps;
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

  localparam longint P_REF  = 1_000_000;
  localparam longint P_LOOP = 1_000_001;
  localparam longint P_CAV  = 1_000_003;

  logic go = 1'b0;
  task automatic square(input int i, input longint p, input longint off);
    wait (go);
    #(off);
    forever begin
      rf_in[i] = 1'b1; #(p / 2);
      rf_in[i] = 1'b0; #(p - p / 2);
    end
  endtask
  initial square(0, P_REF, 0);
  initial square(1, P_LOOP, 250_000);
  initial square(2, P_CAV, 100_000);
  initial square(3, P_CAV, 0);

  initial begin
    int tune_exp, loop_exp;
    real f, tol;
    #2000 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    #10000;
    go = 1'b1;
    freq_enable = 1'b1;

    // digital phase errors: skip the first window, check the second
    repeat (2) @(posedge clk_tb iff tune_phase_valid);
    #1;
    tune_exp = int'(2.0 * 100_000.0 / P_CAV * 32768.0);
    loop_exp = int'(250_000.0 / P_REF * 32768.0);
    checks++;
    if (int'(tune_phase_err) < tune_exp - 500 || int'(tune_phase_err) > tune_exp + 500) begin
      failures++;
      $display("FAIL tuning phase error %0d, expected %0d", tune_phase_err, tune_exp);
    end
    checks++;
    if (int'(loop_phase_err) < loop_exp - 500 || int'(loop_phase_err) > loop_exp + 500) begin
      failures++;
      $display("FAIL loop phase error %0d, expected %0d", loop_phase_err, loop_exp);
    end

    // one full frequency round
    @(posedge clk_tb iff freq_valid);
    #1;
    $display("f_ref=%0d Hz f_loop=%0d Hz error=%0d Hz at %0t", f_ref_hz, f_loop_hz, f_err_hz, $time);
    checks++;
    if (freq_no_signal) begin
      failures++;
      $display("FAIL no_signal");
    end
    f = 1.0e12 / P_REF;  tol = f / 1.0e8 + 1.0;
    checks++;
    if (real'(f_ref_hz) < f - tol || real'(f_ref_hz) > f + tol) begin
      failures++;
      $display("FAIL f_ref %0d", f_ref_hz);
    end
    f = 1.0e12 / P_LOOP; tol = f / 1.0e8 + 1.0;
    checks++;
    if (real'(f_loop_hz) < f - tol || real'(f_loop_hz) > f + tol) begin
      failures++;
      $display("FAIL f_loop %0d", f_loop_hz);
    end
    checks++;
    if (f_err_hz < 0 || f_err_hz > 2) begin
      failures++;
      $display("FAIL frequency error %0d Hz, expected 0..2 Hz", f_err_hz);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150_000_000) @(posedge clk_tb);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
