// Testbench for phase_err_meter with the default 2**15-sample window and a
// 100 MHz sampling clock.
//
// up and dn are pulse trains with a period of 77.731 ns, not locked to the
// clock, and chosen duty cycles. For each pair the second full window after
// the change must read (duty_up - duty_dn) * 32768, clamped to the 16-bit
// range, within 0.5 % of full scale. The spacing of the valid pulses must be
// exactly 2**15 clocks.
module tb_phase_err_meter;
  timeunit 1ps;
  timeprecision 1ps;
  import fpd_pkg::*;

  localparam int     WIN = 15;
  localparam longint TP  = 77_731;

  logic   clk = 1'b0;
  logic   rst_n = 1'b1;
  logic   up = 1'b0, dn = 1'b0;
  logic   valid;
  phase_t phase_err;
  int     checks = 0;
  int     failures = 0;

  phase_err_meter #(.WIN_LOG2(WIN)) dut (.clk, .rst_n, .up, .dn, .valid, .phase_err);

  always #5000 clk = ~clk;

  real du = 0.0, dd = 0.0;   // duty cycles of up and dn
  always begin
    longint hi;
    hi = longint'(du * TP);
    if (hi > 0)  begin up = 1'b1; #(hi); end
    if (hi < TP) begin up = 1'b0; #(TP - hi); end
  end
  initial begin
    #(TP / 3);
    forever begin
      longint hi;
      hi = longint'(dd * TP);
      if (hi > 0)  begin dn = 1'b1; #(hi); end
      if (hi < TP) begin dn = 1'b0; #(TP - hi); end
    end
  end

  // valid spacing
  longint last_valid = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (valid) begin
      if (last_valid >= 0) begin
        checks++;
        if (cyc - last_valid != 2 ** WIN) begin
          failures++;
          $display("FAIL valid spacing %0d", cyc - last_valid);
        end
      end
      last_valid = cyc;
    end
  end

  task automatic run_case(input real u, input real d);
    int exp_v;
    real e;
    du = u; dd = d;
    repeat (2) @(posedge valid);
    @(posedge valid);
    e = (u - d) * 32768.0;
    if (e > 32767.0) e = 32767.0;
    exp_v = int'(e);
    checks++;
    if (int'(phase_err) < exp_v - 164 || int'(phase_err) > exp_v + 164) begin
      failures++;
      $display("FAIL up %f dn %f: phase_err=%0d expected %0d", u, d, phase_err, exp_v);
    end
  endtask

  initial begin
    #2000 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    run_case(0.25, 0.0);
    run_case(0.0, 0.5);
    run_case(0.3, 0.1);
    run_case(0.1, 0.35);
    run_case(1.0, 0.0);
    run_case(0.0, 1.0);
    run_case(0.0, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (32 * 32768) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
