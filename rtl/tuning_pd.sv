// Tuning phase detector: a type-4 edge-triggered phase detector.
//
// Two D flip-flops with D tied high are clocked by the rising edges of the
// two RF square waves. The first edge sets its flip-flop; when the other edge
// arrives both flip-flops are set, and the AND of the two, passed through a
// short delay (reset_delay), clears them together. The time-averaged value of
// (up - dn) is therefore the phase of rf_a ahead of rf_b divided by 2*pi: a
// symmetric characteristic through zero. Normalised so that +-pi reads full
// scale (as the digital phase error does), this is the range -pi..pi and
// gain 1/pi that the document gives. Because both outputs always pulse for at least the
// reset delay, there is no dead zone around zero.
//
// Interface: rf_a (cavity drive) and rf_b (cavity pickup) are the square waves
// from the comparators; rst is an asynchronous active-high clear. up and dn
// go to the external active filters. There is no clock; timing is set only by
// the input edges and RST_DELAY_PS. The path from the flip-flops through the
// AND gate and the delay back to their clears is a deliberate loop: it is
// how this kind of detector ends its pulses, and tools report it as a
// combinational loop. The structure follows the document; the
// asynchronous reset input and the delay value are this design's choice.
module tuning_pd #(
  parameter int unsigned RST_DELAY_PS = 300
) (
  input  logic rst,
  input  logic rf_a,
  input  logic rf_b,
  output logic up,
  output logic dn
);
  logic both_set;
  logic both_set_dly;
  logic clr;

  assign both_set = up & dn;

  reset_delay #(.DELAY_PS(RST_DELAY_PS)) u_rst_delay (
    .a(both_set),
    .y(both_set_dly)
  );

  assign clr = rst | both_set_dly;

  always_ff @(posedge rf_a or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge rf_b or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end
endmodule
