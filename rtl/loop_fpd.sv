// Loop frequency/phase detector: a phase detector that turns into a
// frequency discriminator away from lock.
//
// Each RF input clocks a 2-bit Gray-code counter of its own rising edges.
// Their difference d = (reference edges - loop edges) mod 4 is read as one of
// four states -1, 0, 1, 2. A reference edge raises d, a loop edge lowers it,
// and d saturates at 2 and at -1: a reference edge in state 2, or a loop edge
// in state -1, is ignored. The output is high in states 1 and 2.
//
// Near lock d toggles between 0 and 1: the output is set by the reference
// edge and cleared by the loop edge, so its duty cycle is the phase of the
// reference ahead of the loop divided by 2*pi (range 0..2*pi, lock point at
// pi). When the loop is slower the reference edges overtake it and d moves
// between 1 and 2: the output stays high. When the loop is faster d moves
// between -1 and 0: the output stays low. The detector thus acts as a
// frequency discriminator whose output is held high or low until the loop
// frequency is pulled back within one cycle, the behaviour the document
// asks of the phase-loop detector. The state machine itself is this
// design's choice; the Gray code makes each edge change one bit of d's inputs.
//
// Interface: rst is an asynchronous active-high clear to state 0. pd_out goes
// to an external filter; sat_hi and sat_lo show the saturated states 2 and -1.
// There is no clock: each counter is clocked by its own RF input.
module loop_fpd (
  input  logic rst,
  input  logic rf_ref,
  input  logic rf_loop,
  output logic pd_out,
  output logic sat_hi,
  output logic sat_lo
);
  logic [1:0] g_ref;
  logic [1:0] g_loop;
  logic [1:0] d;

  function automatic logic [1:0] gray2bin(input logic [1:0] g);
    return {g[1], g[1] ^ g[0]};
  endfunction

  function automatic logic [1:0] gray_inc(input logic [1:0] g);
    logic [1:0] b;
    b = gray2bin(g) + 2'd1;
    return {b[1], b[1] ^ b[0]};
  endfunction

  function automatic logic [1:0] diff(input logic [1:0] gr, input logic [1:0] gl);
    return gray2bin(gr) - gray2bin(gl);
  endfunction

  always_ff @(posedge rf_ref or posedge rst) begin
    if (rst)                             g_ref <= 2'b00;
    else if (diff(g_ref, g_loop) != 2'd2) g_ref <= gray_inc(g_ref);
  end

  always_ff @(posedge rf_loop or posedge rst) begin
    if (rst)                             g_loop <= 2'b00;
    else if (diff(g_ref, g_loop) != 2'd3) g_loop <= gray_inc(g_loop);
  end

  assign d = diff(g_ref, g_loop);

  assign pd_out = (d == 2'd1) || (d == 2'd2);
  assign sat_hi = (d == 2'd2);
  assign sat_lo = (d == 2'd3);
endmodule
