// Testbench for tuning_pd at 200 MHz (5 ns period).
//
// For each phase offset d (rf_a ahead of rf_b by d picoseconds, negative when
// rf_b leads) it runs a burst of RF periods and checks every output pulse:
// the leading side's pulse lasts |d| + D and the lagging side's pulse D,
// where D is the reset delay, so that even at d = 0 both pulses are present
// (no dead zone). It then checks the characteristic: the time average of
// (up - dn) over the burst equals d / T, i.e. phase/(2*pi).
module tb_tuning_pd;
  localparam int unsigned D_PS = 300;
  localparam int          T_PS = 5000;
  localparam int          N    = 20;

  logic rst = 1'b0;
  logic rf_a = 1'b0, rf_b = 1'b0;
  logic up, dn;
  int   checks = 0;
  int   failures = 0;

  tuning_pd #(.RST_DELAY_PS(D_PS)) dut (.rst, .rf_a, .rf_b, .up, .dn);

  int   exp_up_ps, exp_dn_ps;
  int   n_up, n_dn;
  real  t_up, t_dn;
  real  sum_up_ps, sum_dn_ps;
  logic measuring = 1'b0;

  always @(posedge up) t_up = $realtime;
  always @(posedge dn) t_dn = $realtime;

  always @(negedge up) if (measuring) begin
    real w;
    w = ($realtime - t_up) * 1000.0;
    sum_up_ps += w;
    n_up++;
    checks++;
    if (w < exp_up_ps - 1 || w > exp_up_ps + 1) begin
      failures++;
      $display("FAIL up width %0.1f ps, expected %0d ps", w, exp_up_ps);
    end
  end

  always @(negedge dn) if (measuring) begin
    real w;
    w = ($realtime - t_dn) * 1000.0;
    sum_dn_ps += w;
    n_dn++;
    checks++;
    if (w < exp_dn_ps - 1 || w > exp_dn_ps + 1) begin
      failures++;
      $display("FAIL dn width %0.1f ps, expected %0d ps", w, exp_dn_ps);
    end
  end

  // one burst of N periods with rf_a ahead of rf_b by d_ps
  task automatic run_case(input int d_ps);
    int  lead, lag;
    real avg, exp_avg;
    exp_up_ps = (d_ps > 0 ? d_ps : 0) + D_PS;
    exp_dn_ps = (d_ps < 0 ? -d_ps : 0) + D_PS;
    n_up = 0; n_dn = 0; sum_up_ps = 0.0; sum_dn_ps = 0.0;
    lead = d_ps > 0 ? d_ps : -d_ps;
    measuring = 1'b1;
    for (int k = 0; k < N; k++) begin
      if (d_ps >= 0) begin
        rf_a = 1'b1;
        if (lead > 0) #(lead * 1ps);
        rf_b = 1'b1;
      end else begin
        rf_b = 1'b1;
        #(lead * 1ps);
        rf_a = 1'b1;
      end
      #((T_PS / 2) * 1ps);
      rf_a = 1'b0;
      rf_b = 1'b0;
      lag = T_PS / 2 - lead;
      #(lag * 1ps);
    end
    #1ns;
    measuring = 1'b0;
    checks++;
    if (n_up != N || n_dn != N) begin
      failures++;
      $display("FAIL d=%0d: %0d up and %0d dn pulses, expected %0d", d_ps, n_up, n_dn, N);
    end
    // characteristic: mean(up - dn) = phase / (2*pi) = d / T
    avg     = (sum_up_ps - sum_dn_ps) / (N * T_PS);
    exp_avg = real'(d_ps) / real'(T_PS);
    checks++;
    if (avg < exp_avg - 0.001 || avg > exp_avg + 0.001) begin
      failures++;
      $display("FAIL d=%0d: mean(up-dn)=%f expected %f", d_ps, avg, exp_avg);
    end
  endtask

  initial begin
    #100ps;
    rst = 1'b1;
    #2ns;
    rst = 1'b0;
    #2ns;
    checks++;
    if (up !== 1'b0 || dn !== 1'b0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    run_case(0);
    run_case(700);
    run_case(-700);
    run_case(1800);
    run_case(-1800);
    run_case(10);
    run_case(-10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
