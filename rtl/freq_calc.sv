// Frequency calculation of the equal-precision counter: fx = Nx * fs / Ns.
//
// On start the product Nx * FS_HZ (64 bits) is formed and divided by Ns with
// a restoring divider that produces one quotient bit per clock. done pulses
// for one cycle 2 * CNT_W + 2 = 66 cycles after the cycle in which start is
// high, and fx_hz holds the result from then on.
// The quotient is truncated to whole Hz. A quotient that does not fit in
// CNT_W bits returns all ones; Ns = 0 returns 0. Eq. (1) is the document's;
// the divider, the rounding and the handshake are this design's choice.
module freq_calc
  import fpd_pkg::*;
#(
  parameter int unsigned FS_HZ = fpd_pkg::DEF_FS_HZ
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  count_t nx,
  input  count_t ns,
  output logic   busy,
  output logic   done,
  output count_t fx_hz
);
  localparam int unsigned NUM_W = 2 * CNT_W;

  logic [NUM_W-1:0] quo;
  count_t           rem;
  count_t           den;
  logic [$clog2(NUM_W+1)-1:0] step;
  logic             running;
  logic [CNT_W:0]   rem_sh;

  assign rem_sh = {rem[CNT_W-1:0], quo[NUM_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quo     <= '0;
      rem     <= '0;
      den     <= '0;
      step    <= '0;
      running <= 1'b0;
      done    <= 1'b0;
      fx_hz   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        quo     <= NUM_W'(nx) * NUM_W'(FS_HZ);
        rem     <= '0;
        den     <= ns;
        step    <= '0;
        running <= 1'b1;
      end else if (running) begin
        if (step == NUM_W[$bits(step)-1:0]) begin
          running <= 1'b0;
          done    <= 1'b1;
          if (den == '0)                fx_hz <= '0;
          else if (quo[NUM_W-1:CNT_W] != '0) fx_hz <= '1;
          else                          fx_hz <= quo[CNT_W-1:0];
        end else begin
          step <= step + 1'b1;
          if (rem_sh >= {1'b0, den}) begin
            rem <= count_t'(rem_sh - {1'b0, den});
            quo <= {quo[NUM_W-2:0], 1'b1};
          end else begin
            rem <= rem_sh[CNT_W-1:0];
            quo <= {quo[NUM_W-2:0], 1'b0};
          end
        end
      end
    end
  end

  assign busy = running;
endmodule
