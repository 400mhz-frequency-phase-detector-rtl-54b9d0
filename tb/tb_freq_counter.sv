// Testbench for freq_counter with a 100 MHz time base and a shortened
// 5000-cycle (50 us) preset gate.
//
// For input periods from 2.5 ns (400 MHz) to 1 us it checks the defining
// property of the equal-precision method: Nx whole input periods and Ns
// time-base periods cover the same gate to within one time-base period,
// |Ns*Ts - Nx*Tx| <= Ts. It also checks that the gate spans the preset time
// to within the synchroniser delays, the time from start to done, and that a
// missing input ends the measurement with no_signal.
module tb_freq_counter;
  timeunit 1ps;
  timeprecision 1ps;
  import fpd_pkg::*;

  localparam int unsigned GATE = 5000;
  localparam longint      TS   = 10_000;   // time base period, ps

  logic   clk_tb = 1'b0;
  logic   rst_n = 1'b1;
  logic   start = 1'b0;
  logic   rf_x = 1'b0;
  logic   busy, done, no_signal;
  count_t ns, nx;
  int     checks = 0;
  int     failures = 0;

  freq_counter #(.GATE_CYCLES(GATE)) dut (
    .clk_tb, .rst_n, .start, .rf_x, .busy, .done, .no_signal, .ns, .nx
  );

  always #(TS / 2) clk_tb = ~clk_tb;

  longint tx_ps = 0;      // 0: input stopped
  always begin
    if (tx_ps == 0) #1000;
    else begin
      rf_x = 1'b1; #(tx_ps / 2);
      rf_x = 1'b0; #(tx_ps - tx_ps / 2);
    end
  end

  task automatic measure(input longint tx, input bit expect_signal);
    int     cyc;
    longint lim;
    tx_ps = tx;
    #2_100_000;   // let the previous period finish
    @(negedge clk_tb);
    start = 1'b1;
    @(negedge clk_tb);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 3 * GATE) begin
      @(negedge clk_tb);
      cyc++;
    end
    if (!expect_signal) begin
      checks++;
      if (!done || !no_signal || nx != 0 || ns != 0) begin
        failures++;
        $display("FAIL no input: done=%0b no_signal=%0b", done, no_signal);
      end
      return;
    end
    checks++;
    if (!done || no_signal) begin
      failures++;
      $display("FAIL Tx=%0d: done=%0b no_signal=%0b", tx, done, no_signal);
      return;
    end
    // equal precision: both counters cover the same gate
    checks++;
    if (longint'(ns) * TS - longint'(nx) * tx > TS ||
        longint'(nx) * tx - longint'(ns) * TS > TS) begin
      failures++;
      $display("FAIL Tx=%0d: Ns=%0d Nx=%0d differ by more than one time-base period",
               tx, ns, nx);
    end
    // gate length: the preset gate, moved by at most one input period and
    // two time-base periods at either end
    checks++;
    if (longint'(nx) * tx < GATE * TS - tx - 2 * TS ||
        longint'(nx) * tx > GATE * TS + tx + 2 * TS) begin
      failures++;
      $display("FAIL Tx=%0d: gate of %0d ps, preset %0d ps", tx, longint'(nx) * tx, GATE * TS);
    end
    // done follows the close of the gate
    lim = GATE + (4 * tx) / TS + 8;
    checks++;
    if (cyc > lim) begin
      failures++;
      $display("FAIL Tx=%0d: done after %0d cycles, limit %0d", tx, cyc, lim);
    end
  endtask

  initial begin
    #2000 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    measure(37_301, 1);     // 26.8 MHz
    measure(2_500, 1);      // 400 MHz
    measure(4_999, 1);      // 200 MHz
    measure(123_457, 1);    // 8.1 MHz
    measure(10_000, 1);     // same as the time base
    measure(1_003_000, 1);  // 997 kHz
    for (int i = 0; i < 6; i++) measure(longint'($urandom_range(200_000, 2_400)), 1);
    measure(0, 0);          // no input
    measure(33_333, 1);     // recovers
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk_tb);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
