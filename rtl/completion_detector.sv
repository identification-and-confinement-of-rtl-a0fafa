// completion_detector: completion detection for a dual-rail word.
//
// Each dual-rail bit is checked by an OR of its two rails (1 = this bit
// carries data, 0 = this bit is spacer). The per-bit results are merged by
// a BITS-input C gate, so `done` rises only once every bit holds data and
// falls only once every bit has returned to spacer. Note that the OR also
// reports the illegal code {1,1} as complete; that is what lets an illegal
// word travel down a classic pipeline.
//
// In a WCHB stage the detector closes the handshake loop back to the gates
// it watches, so simulators report a combinational loop through it; that
// loop is the handshake itself.
//
// Interface: `d` is the word to watch, `done` the completion signal, which
// in a WCHB stage is the stage's acknowledge to its predecessor. A
// one-bit word needs no C gate and uses the OR output directly.
module completion_detector #(
  parameter int unsigned BITS = 2
) (
  input  logic                      rst,
  input  qdi_pkg::dr_bit_t [BITS-1:0] d,
  output logic                      done
);

  logic [BITS-1:0] bit_valid;

  always_comb begin
    for (int i = 0; i < BITS; i++) bit_valid[i] = d[i].t | d[i].f;
  end

  if (BITS == 1) begin : g_single
    assign done = bit_valid[0];
  end else begin : g_merge
    c_element #(.N(BITS)) u_merge (
      .rst (rst),
      .a   (bit_valid),
      .q   (done)
    );
  end

endmodule
