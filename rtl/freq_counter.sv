// Equal-precision (reciprocal) frequency counter.
//
// Two counters run over the same gate: Ns counts cycles of the time base
// clk_tb and Nx counts cycles of the measured input rf_x. A preset gate of
// GATE_CYCLES time-base cycles is opened on start; the actual gate is that
// preset gate re-timed to the rising edges of rf_x, so it always spans a whole
// number of input periods and Nx has no counting error. Only Ns can be off by
// one, which bounds the relative error of fx = Nx * fs / Ns by 1/Ns (Eq. 4).
//
// Clock domains: the preset gate is passed to the rf_x domain through two
// flip-flops; the third rf_x flip-flop is the actual gate, which enables the
// Nx counter. The actual gate is passed back through two clk_tb flip-flops to
// enable the Ns counter. Both transfers add the same number of cycles at the
// opening and the closing of the gate, so they cancel in Ns apart from the
// one-cycle sampling uncertainty. When the gate has closed in both domains Nx
// is static and is copied into the clk_tb domain.
//
// Timing: done pulses for one clk_tb cycle about GATE_CYCLES + a few input
// periods + 4 clk_tb cycles after start; ns and nx then hold the result until
// the next done. If no rf_x edge opens the gate within 2 * GATE_CYCLES, the
// measurement ends with no_signal set and zero counts.
//
// The two counters, the input-synchronised gate and Eq. (1) follow the
// document; the synchroniser depth, the start/done handshake and the
// missing-input timeout are this design's choice.
module freq_counter
  import fpd_pkg::*;
#(
  parameter int unsigned GATE_CYCLES = fpd_pkg::DEF_GATE_CYCLES
) (
  input  logic   clk_tb,
  input  logic   rst_n,
  input  logic   start,
  input  logic   rf_x,
  output logic   busy,
  output logic   done,
  output logic   no_signal,
  output count_t ns,
  output count_t nx
);
  typedef enum logic [1:0] {IDLE, PRESET, CLOSING} state_t;

  state_t state;
  count_t timer;
  logic   gate_pre;
  logic   gate_seen;

  // rf_x domain
  logic   pre_s1, pre_s2, gate_x;
  count_t nx_cnt;

  always_ff @(posedge rf_x or negedge rst_n) begin
    if (!rst_n) begin
      pre_s1 <= 1'b0;
      pre_s2 <= 1'b0;
      gate_x <= 1'b0;
      nx_cnt <= '0;
    end else begin
      pre_s1 <= gate_pre;
      pre_s2 <= pre_s1;
      gate_x <= pre_s2;
      if (gate_x)      nx_cnt <= nx_cnt + 1'b1;
      else if (pre_s2) nx_cnt <= '0;
    end
  end

  // clk_tb domain
  logic   gx_s1, gx_s2, gate_s;
  count_t ns_cnt;

  always_ff @(posedge clk_tb or negedge rst_n) begin
    if (!rst_n) begin
      gx_s1  <= 1'b0;
      gx_s2  <= 1'b0;
      gate_s <= 1'b0;
      ns_cnt <= '0;
    end else begin
      gx_s1  <= gate_x;
      gx_s2  <= gx_s1;
      gate_s <= gx_s2;
      if (gate_s)     ns_cnt <= ns_cnt + 1'b1;
      else if (gx_s2) ns_cnt <= '0;
    end
  end

  always_ff @(posedge clk_tb or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      timer     <= '0;
      gate_pre  <= 1'b0;
      gate_seen <= 1'b0;
      done      <= 1'b0;
      no_signal <= 1'b0;
      ns        <= '0;
      nx        <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state     <= PRESET;
          timer     <= '0;
          gate_pre  <= 1'b1;
          gate_seen <= 1'b0;
        end
        PRESET: begin
          if (gate_s) gate_seen <= 1'b1;
          if (timer == count_t'(GATE_CYCLES - 1)) begin
            state    <= CLOSING;
            timer    <= '0;
            gate_pre <= 1'b0;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        CLOSING: begin
          timer <= timer + 1'b1;
          if (gate_s) gate_seen <= 1'b1;
          // the gate has been open and is now closed in both domains
          if (gate_seen && !gate_s && !gx_s2) begin
            state     <= IDLE;
            done      <= 1'b1;
            no_signal <= 1'b0;
            ns        <= ns_cnt;
            nx        <= nx_cnt;
          end else if (!gate_seen && !gate_s && !gx_s2 &&
                       timer == count_t'(GATE_CYCLES - 1)) begin
            state     <= IDLE;
            done      <= 1'b1;
            no_signal <= 1'b1;
            ns        <= '0;
            nx        <= '0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // the result handed out always covers a whole, non-empty gate
  a_counts: assert property (@(posedge clk_tb)
    done && !no_signal |-> nx != '0 && ns != '0);
endmodule
