// Digital phase error: the time average of a phase detector's pulse outputs.
//
// up and dn come straight from a phase detector and are brought into the clk
// domain by two flip-flops each. Every clock the sampled (up - dn), one of
// -1, 0, +1, is added to an accumulator; after 2**WIN_LOG2 samples the sum
// is the mean of (up - dn) scaled so that a permanently high up reads
// 2**WIN_LOG2, and it is then multiplied by 2**SHIFT. With the default
// WIN_LOG2 = 15 a mean of 1 is full scale of the 16-bit signed output, which
// saturates at +32767 and -32768. For the loop detector (dn tied low, SHIFT
// 0) the reading is phase/(2*pi) * 32768 over 0..2*pi. The tuning detector's
// mean (up - dn) is phase/(2*pi); with SHIFT = 1 the reading becomes
// phase/pi * 32768, full scale at +-pi, the range and gain 1/pi that the
// document gives for that detector.
//
// The sampling clock must not be locked to the RF inputs, so that the samples
// fall at spread positions within the RF period; the average then converges
// to the duty cycle. phase_err updates with a one-cycle valid pulse every
// 2**WIN_LOG2 clocks. The 16-bit width is the document's; the averaging
// method and window are this design's choice.
module phase_err_meter
  import fpd_pkg::*;
#(
  parameter int unsigned WIN_LOG2 = 15,
  parameter int unsigned SHIFT    = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   up,
  input  logic   dn,
  output logic   valid,
  output phase_t phase_err
);
  localparam int unsigned ACC_W = (WIN_LOG2 + 2 > PHASE_W + 1) ? WIN_LOG2 + 2 : PHASE_W + 1;
  localparam int unsigned SUM_W = ACC_W + SHIFT;
  localparam logic signed [SUM_W-1:0] PMAX = SUM_W'(2**(PHASE_W-1) - 1);
  localparam logic signed [SUM_W-1:0] PMIN = -SUM_W'(2**(PHASE_W-1));

  logic [1:0] up_s, dn_s;
  logic signed [ACC_W-1:0] acc, acc_next;
  logic signed [SUM_W-1:0] sum;
  logic [WIN_LOG2-1:0] n;

  assign sum = SUM_W'(acc_next) <<< SHIFT;

  always_comb begin
    acc_next = acc;
    if (up_s[1] && !dn_s[1]) acc_next = acc + 1'b1;
    if (dn_s[1] && !up_s[1]) acc_next = acc - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_s      <= '0;
      dn_s      <= '0;
      acc       <= '0;
      n         <= '0;
      valid     <= 1'b0;
      phase_err <= '0;
    end else begin
      up_s  <= {up_s[0], up};
      dn_s  <= {dn_s[0], dn};
      valid <= 1'b0;
      n     <= n + 1'b1;
      if (n == '1) begin
        valid <= 1'b1;
        if (sum > PMAX)      phase_err <= PMAX[PHASE_W-1:0];
        else if (sum < PMIN) phase_err <= PMIN[PHASE_W-1:0];
        else                 phase_err <= sum[PHASE_W-1:0];
        acc <= '0;
      end else begin
        acc <= acc_next;
      end
    end
  end
endmodule
