// Frequency/phase detector and counter: FPGA firmware of the LLRF daughter
// board.
//
// Four RF inputs arrive as square waves from external comparators:
//   rf_in[0] reference, rf_in[1] loop (self-excited loop signal),
//   rf_in[2] cavity pickup, rf_in[3] cavity drive.
// The tuning phase detector (tuning_pd) compares drive with pickup for the
// tuning loop; the loop frequency/phase detector (loop_fpd) compares the
// reference with the loop signal for the phase loop. Their four pulse
// outputs, pd_out = {loop_n, loop, tune_dn, tune_up}, go to the external
// active filters that make the analog phase errors. Two phase_err_meter
// instances turn the same pulses into 16-bit digital phase errors. The
// frequency discriminator measures the reference and loop frequencies with
// equal-precision counters on the time base clk_tb and reports both and
// their difference, for the processor that serves the PC.
//
// The set of blocks and what each one does follow the document. The mapping
// of the inputs, the inverted loop output as fourth filter channel, the
// digital phase error as a time average, and all result/handshake ports
// (read by the processor, which is not part of this RTL) are this design's
// choice. rst_n is an asynchronous active-low reset for every block.
module fpd_top
  import fpd_pkg::*;
#(
  parameter int unsigned FS_HZ        = fpd_pkg::DEF_FS_HZ,
  parameter int unsigned GATE_CYCLES  = fpd_pkg::DEF_GATE_CYCLES,
  parameter int unsigned RST_DELAY_PS = 300,
  parameter int unsigned WIN_LOG2     = 15
) (
  input  logic                  clk_tb,
  input  logic                  rst_n,
  input  logic [3:0]            rf_in,
  input  logic                  freq_enable,
  // to the active filters
  output logic [3:0]            pd_out,
  output logic                  loop_sat_hi,
  output logic                  loop_sat_lo,
  // digital phase errors
  output logic                  tune_phase_valid,
  output phase_t                tune_phase_err,
  output logic                  loop_phase_valid,
  output phase_t                loop_phase_err,
  // frequency discriminator results
  output logic                  freq_valid,
  output logic                  freq_no_signal,
  output count_t                f_ref_hz,
  output count_t                f_loop_hz,
  output logic signed [CNT_W:0] f_err_hz
);
  logic rst;
  logic tune_up, tune_dn, loop_pd;

  assign rst = ~rst_n;

  tuning_pd #(.RST_DELAY_PS(RST_DELAY_PS)) u_tuning_pd (
    .rst, .rf_a(rf_in[3]), .rf_b(rf_in[2]), .up(tune_up), .dn(tune_dn)
  );

  loop_fpd u_loop_fpd (
    .rst, .rf_ref(rf_in[0]), .rf_loop(rf_in[1]),
    .pd_out(loop_pd), .sat_hi(loop_sat_hi), .sat_lo(loop_sat_lo)
  );

  assign pd_out = {~loop_pd, loop_pd, tune_dn, tune_up};

  phase_err_meter #(.WIN_LOG2(WIN_LOG2), .SHIFT(1)) u_tune_meter (
    .clk(clk_tb), .rst_n, .up(tune_up), .dn(tune_dn),
    .valid(tune_phase_valid), .phase_err(tune_phase_err)
  );

  phase_err_meter #(.WIN_LOG2(WIN_LOG2)) u_loop_meter (
    .clk(clk_tb), .rst_n, .up(loop_pd), .dn(1'b0),
    .valid(loop_phase_valid), .phase_err(loop_phase_err)
  );

  freq_discriminator #(.FS_HZ(FS_HZ), .GATE_CYCLES(GATE_CYCLES)) u_freq (
    .clk_tb, .rst_n, .enable(freq_enable),
    .rf_ref(rf_in[0]), .rf_loop(rf_in[1]),
    .valid(freq_valid), .no_signal(freq_no_signal),
    .f_ref_hz, .f_loop_hz, .f_err_hz
  );
endmodule
