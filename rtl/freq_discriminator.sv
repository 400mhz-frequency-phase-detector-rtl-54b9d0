// Frequency discriminator: measures the reference and the loop frequency
// with two independent equal-precision counters and reports their difference.
//
// While enable is high the block runs back-to-back measurements. Each round
// starts both freq_counter instances on the same time-base cycle, waits until
// both have finished, converts both count pairs to Hz with two freq_calc
// dividers, and then publishes f_ref_hz, f_loop_hz and the signed error
// f_err_hz = f_ref_hz - f_loop_hz with a one-cycle valid pulse. A round takes
// one gate time plus a few input periods plus about 70 time-base cycles.
// If either input is missing, no_signal is set for that round and the error
// is reported as zero.
//
// Two counters per input, computing each frequency on its own and then the
// error, follows the document; the round sequencing is this design's choice.
module freq_discriminator
  import fpd_pkg::*;
#(
  parameter int unsigned FS_HZ       = fpd_pkg::DEF_FS_HZ,
  parameter int unsigned GATE_CYCLES = fpd_pkg::DEF_GATE_CYCLES
) (
  input  logic                    clk_tb,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    rf_ref,
  input  logic                    rf_loop,
  output logic                    valid,
  output logic                    no_signal,
  output count_t                  f_ref_hz,
  output count_t                  f_loop_hz,
  output logic signed [CNT_W:0]   f_err_hz
);
  typedef enum logic [1:0] {S_IDLE, S_COUNT, S_CALC} state_t;
  state_t state;

  logic   cnt_start, calc_start;
  logic   ref_done, loop_done, ref_nosig, loop_nosig;
  logic   ref_busy, loop_busy;
  count_t ref_ns, ref_nx, loop_ns, loop_nx;
  logic   ref_got, loop_got;
  logic   ref_calc_busy, loop_calc_busy, ref_calc_done, loop_calc_done;
  logic   ref_cdone, loop_cdone;
  count_t ref_fx, loop_fx;
  logic   nosig_round;

  freq_counter #(.GATE_CYCLES(GATE_CYCLES)) u_cnt_ref (
    .clk_tb, .rst_n, .start(cnt_start), .rf_x(rf_ref),
    .busy(ref_busy), .done(ref_done), .no_signal(ref_nosig),
    .ns(ref_ns), .nx(ref_nx)
  );

  freq_counter #(.GATE_CYCLES(GATE_CYCLES)) u_cnt_loop (
    .clk_tb, .rst_n, .start(cnt_start), .rf_x(rf_loop),
    .busy(loop_busy), .done(loop_done), .no_signal(loop_nosig),
    .ns(loop_ns), .nx(loop_nx)
  );

  freq_calc #(.FS_HZ(FS_HZ)) u_calc_ref (
    .clk(clk_tb), .rst_n, .start(calc_start), .nx(ref_nx), .ns(ref_ns),
    .busy(ref_calc_busy), .done(ref_calc_done), .fx_hz(ref_fx)
  );

  freq_calc #(.FS_HZ(FS_HZ)) u_calc_loop (
    .clk(clk_tb), .rst_n, .start(calc_start), .nx(loop_nx), .ns(loop_ns),
    .busy(loop_calc_busy), .done(loop_calc_done), .fx_hz(loop_fx)
  );

  always_ff @(posedge clk_tb or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt_start   <= 1'b0;
      calc_start  <= 1'b0;
      ref_got     <= 1'b0;
      loop_got    <= 1'b0;
      ref_cdone   <= 1'b0;
      loop_cdone  <= 1'b0;
      nosig_round <= 1'b0;
      valid       <= 1'b0;
      no_signal   <= 1'b0;
      f_ref_hz    <= '0;
      f_loop_hz   <= '0;
      f_err_hz    <= '0;
    end else begin
      cnt_start  <= 1'b0;
      calc_start <= 1'b0;
      valid      <= 1'b0;
      case (state)
        S_IDLE: if (enable && !ref_busy && !loop_busy &&
                     !ref_calc_busy && !loop_calc_busy) begin
          cnt_start   <= 1'b1;
          ref_got     <= 1'b0;
          loop_got    <= 1'b0;
          nosig_round <= 1'b0;
          state       <= S_COUNT;
        end
        S_COUNT: begin
          if (ref_done)  begin ref_got  <= 1'b1; if (ref_nosig)  nosig_round <= 1'b1; end
          if (loop_done) begin loop_got <= 1'b1; if (loop_nosig) nosig_round <= 1'b1; end
          if ((ref_got || ref_done) && (loop_got || loop_done)) begin
            calc_start <= 1'b1;
            ref_cdone  <= 1'b0;
            loop_cdone <= 1'b0;
            state      <= S_CALC;
          end
        end
        S_CALC: begin
          if (ref_calc_done)  ref_cdone  <= 1'b1;
          if (loop_calc_done) loop_cdone <= 1'b1;
          if ((ref_cdone || ref_calc_done) && (loop_cdone || loop_calc_done)) begin
            valid     <= 1'b1;
            no_signal <= nosig_round;
            f_ref_hz  <= ref_fx;
            f_loop_hz <= loop_fx;
            f_err_hz  <= nosig_round ? '0
                       : $signed({1'b0, ref_fx}) - $signed({1'b0, loop_fx});
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
