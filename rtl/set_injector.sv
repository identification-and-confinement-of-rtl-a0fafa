// set_injector: fault injection point on a bundle of victim wires.
//
// Each wire passes through an XOR with its own `flip` control: while flip[i]
// is 1 the wire carries the inverse of its driver, which models a single
// event transient (a short voltage pulse) on that wire. With flip = 0 the
// injector is transparent. The pulse shape and timing are set entirely by
// whoever drives `flip`; there is no clock and no delay.
//
// Inserting a gate on the victim wires is this design's way of making the
// injection points part of the netlist; a simulator-level force gives the
// same waveform.
module set_injector #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] flip,
  output logic [W-1:0] y
);

  always_comb y = a ^ flip;

endmodule
