// c_element: N-input Muller C gate with an asynchronous reset.
//
// The output goes to 1 when all inputs are 1, goes to 0 when all inputs are
// 0, and otherwise keeps its value: an AND gate with hysteresis. It is the
// storage element of the WCHB half buffer and the gate that merges the
// per-bit completion signals of a completion detector.
//
// The state is held in a level-sensitive latch that loads when all inputs
// agree; this is the standard gate-level model of the C gate, so the latch
// that synthesis reports is the intended storage. Once the gate sits inside
// a handshake loop, Verilator's latch check no longer recognises the
// always_latch (NOLATCH warning); the block is a latch all the same. rst (active
// high) forces the output to 0, the spacer state used to start every
// pipeline. There is no clock: the output follows its inputs with zero delay.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic [N-1:0] a,
  output logic         q
);

  logic all_one, all_zero;

  always_comb begin
    all_one  = &a;
    all_zero = ~|a;
  end

  always_latch begin
    if (rst)           q = 1'b0;
    else if (all_one)  q = 1'b1;
    else if (all_zero) q = 1'b0;
  end

endmodule
