// asym_c_element: asymmetric Muller C gate with an asynchronous reset.
//
// Besides its N symmetric inputs `a` it has two asymmetric inputs:
//   set_en : must be 1 for the gate to switch to 1, is ignored when it
//            switches back to 0 (a "plus" input);
//   rst_blk: must be 0 for the gate to switch to 0, is ignored when it
//            switches to 1 (a "minus" input; 1 blocks the return to zero).
// Output rule: 1 when &a && set_en, 0 when ~|a && !rst_blk, else hold.
// With set_en = 1 and rst_blk = 0 the gate is a plain C gate.
//
// Two such gates, cross coupled through these inputs, make the deadlocking
// and the interlocking half buffers. The gate is a latch by nature and the
// latch synthesis reports is the intended state holder. Verilator flags the
// always_latch as "no latch" (NOLATCH) once the gate is inside a feedback
// loop, and reports the loop through q (UNOPTFLAT); both belong to the
// cross-coupled, self-timed circuit and are expected. rst (active high)
// clears the gate. Zero delay, no clock.
module asym_c_element #(
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic [N-1:0] a,
  input  logic         set_en,
  input  logic         rst_blk,
  output logic         q
);

  logic do_set, do_clr;

  always_comb begin
    do_set = (&a) && set_en;
    do_clr = (~|a) && !rst_blk;
  end

  always_latch begin
    if (rst)          q = 1'b0;
    else if (do_set)  q = 1'b1;
    else if (do_clr)  q = 1'b0;
  end

endmodule
