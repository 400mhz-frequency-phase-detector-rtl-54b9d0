// Testbench for freq_discriminator with a 100 MHz time base and a shortened
// 20000-cycle (200 us) gate.
//
// The reference and loop inputs are square waves of known period. Every
// result must lie within the equal-precision bound f/Ns + 1 Hz of the true
// frequency (Eq. 4 plus truncation to whole Hz), and the error output must
// be exactly f_ref_hz - f_loop_hz. Back-to-back rounds must follow each
// other within one gate time plus four input periods plus 100 cycles (two
// gate times when an input is missing). A stopped loop input must give
// a round flagged no_signal with a zero error, and measurement must resume
// when the input returns.
module tb_freq_discriminator;
  timeunit 1ps;
  timeprecision 1ps;
  import fpd_pkg::*;

  localparam int unsigned GATE = 20_000;
  localparam int unsigned FS   = 100_000_000;

  logic   clk_tb = 1'b0;
  logic   rst_n = 1'b1;
  logic   enable = 1'b0;
  logic   rf_ref = 1'b0, rf_loop = 1'b0;
  logic   valid, no_signal;
  count_t f_ref_hz, f_loop_hz;
  logic signed [CNT_W:0] f_err_hz;
  int     checks = 0;
  int     failures = 0;

  freq_discriminator #(.FS_HZ(FS), .GATE_CYCLES(GATE)) dut (
    .clk_tb, .rst_n, .enable, .rf_ref, .rf_loop,
    .valid, .no_signal, .f_ref_hz, .f_loop_hz, .f_err_hz
  );

  always #5000 clk_tb = ~clk_tb;

  longint t_ref = 40_000, t_loop = 40_016;
  always begin
    rf_ref = 1'b1; #(t_ref / 2);
    rf_ref = 1'b0; #(t_ref - t_ref / 2);
  end
  always begin
    if (t_loop == 0) #1000;
    else begin
      rf_loop = 1'b1; #(t_loop / 2);
      rf_loop = 1'b0; #(t_loop - t_loop / 2);
    end
  end

  function automatic bit near(input count_t got, input longint period_ps);
    real f, tol;
    f   = 1.0e12 / real'(period_ps);
    tol = f / real'(GATE) + 1.0;
    return real'(got) >= f - tol && real'(got) <= f + tol;
  endfunction

  longint cyc = 0, last_valid = -1;
  always @(posedge clk_tb) cyc++;

  task automatic check_round(input bit expect_signal);
    @(posedge clk_tb iff valid);
    #1;
    if (last_valid >= 0) begin
      checks++;
      begin
      longint lim;
      lim = expect_signal ? GATE + 4 * (t_ref > t_loop ? t_ref : t_loop) / 10_000 + 100
                          : 2 * GATE + 200;
      if (cyc - last_valid > lim) begin
        failures++;
        $display("FAIL rounds %0d cycles apart", cyc - last_valid);
      end
      end
    end
    last_valid = cyc;
    checks++;
    if (no_signal !== !expect_signal) begin
      failures++;
      $display("FAIL no_signal=%0b", no_signal);
    end
    if (!expect_signal) begin
      checks++;
      if (f_err_hz != 0) begin
        failures++;
        $display("FAIL error %0d reported without signal", f_err_hz);
      end
      return;
    end
    checks++;
    if (!near(f_ref_hz, t_ref) || !near(f_loop_hz, t_loop)) begin
      failures++;
      $display("FAIL f_ref=%0d (period %0d ps) f_loop=%0d (period %0d ps)",
               f_ref_hz, t_ref, f_loop_hz, t_loop);
    end
    checks++;
    if (f_err_hz != $signed({1'b0, f_ref_hz}) - $signed({1'b0, f_loop_hz})) begin
      failures++;
      $display("FAIL f_err=%0d", f_err_hz);
    end
  endtask

  initial begin
    #2000 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    #10000 enable = 1'b1;
    check_round(1);
    check_round(1);
    t_ref = 8_333; t_loop = 8_334;     // 120 MHz, loop a little lower
    check_round(1);
    check_round(1);
    t_ref = 1_000_000; t_loop = 999_000;   // 1 MHz, loop higher
    check_round(1);
    check_round(1);
    t_loop = 0;                         // loop input lost
    check_round(0);
    check_round(0);
    t_loop = 2_500;                     // 400 MHz
    check_round(1);
    check_round(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * GATE) @(posedge clk_tb);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
