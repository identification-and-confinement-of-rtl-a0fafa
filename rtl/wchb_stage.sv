// wchb_stage: one dual-rail weak-conditioned half buffer (WCHB) of BITS bits.
//
// Every rail of the input word feeds a C gate whose second input is the
// enable en = ~ack_in, the inverted acknowledge of the next stage. While
// the next stage holds spacer (ack_in = 0) the gates are armed for rising
// rails and capture the data token; once the next stage acknowledges
// (ack_in = 1) they are armed for falling rails and take the spacer. The
// completion detector on the gate outputs (OR per bit, C gate across bits)
// produces ack_out, the acknowledge returned to the previous stage.
//
// STYLE chooses how the two gates of one dual-rail bit interact:
//   WCHB_CLASSIC      two independent symmetric C gates. Any rising rail that
//                     arrives while the gates are armed is stored, so a
//                     transient pulse on the idle rail leaves the illegal
//                     code {1,1} behind.
//   WCHB_DEADLOCKING  asymmetric C gates; each gate's output feeds the
//                     reset-blocking input of the other. A bit that ends up
//                     {1,1} can never return to spacer, so the pipeline stops
//                     instead of passing on corrupt data (fail stop).
//   WCHB_INTERLOCKING asymmetric C gates; each gate's output, inverted, feeds
//                     the set-enable input of the other. The first rail to rise
//                     locks its partner at 0, so {1,1} cannot be formed (up to
//                     simultaneous arrival). The lock acts on the partner gate
//                     directly, not through the completion detector.
// The three behaviours follow the description of the buffers; the exact
// assignment of the feedback to set- or reset-side asymmetric inputs is this
// design's reading of it.
//
// Interface: in_d/ack_out is the input channel (push, 4-phase, dual-rail),
// out_d/ack_in the output channel. rst (active high) clears every gate to
// spacer. Timing: purely event driven with zero gate delay; a token passes
// the stage as soon as it is armed. The gates are latches and the stage
// closes combinational loops through the handshake (Verilator: UNOPTFLAT);
// both are inherent to QDI logic and intended. The loops settle because
// every gate only switches when its inputs agree.
module wchb_stage
  import qdi_pkg::*;
#(
  parameter int unsigned BITS  = 2,
  parameter wchb_style_e STYLE = WCHB_INTERLOCKING
) (
  input  logic                rst,
  input  dr_bit_t [BITS-1:0]  in_d,
  output logic                ack_out,
  output dr_bit_t [BITS-1:0]  out_d,
  input  logic                ack_in
);

  logic en;
  assign en = ~ack_in;

  for (genvar i = 0; i < BITS; i++) begin : g_bit
    logic t_set_en, f_set_en, t_rst_blk, f_rst_blk;

    always_comb begin
      unique case (STYLE)
        WCHB_DEADLOCKING: begin
          t_set_en  = 1'b1;
          f_set_en  = 1'b1;
          t_rst_blk = out_d[i].f;
          f_rst_blk = out_d[i].t;
        end
        WCHB_INTERLOCKING: begin
          t_set_en  = ~out_d[i].f;
          f_set_en  = ~out_d[i].t;
          t_rst_blk = 1'b0;
          f_rst_blk = 1'b0;
        end
        default: begin
          t_set_en  = 1'b1;
          f_set_en  = 1'b1;
          t_rst_blk = 1'b0;
          f_rst_blk = 1'b0;
        end
      endcase
    end

    asym_c_element #(.N(2)) u_t (
      .rst     (rst),
      .a       ({in_d[i].t, en}),
      .set_en  (t_set_en),
      .rst_blk (t_rst_blk),
      .q       (out_d[i].t)
    );

    asym_c_element #(.N(2)) u_f (
      .rst     (rst),
      .a       ({in_d[i].f, en}),
      .set_en  (f_set_en),
      .rst_blk (f_rst_blk),
      .q       (out_d[i].f)
    );
  end

  completion_detector #(.BITS(BITS)) u_cd (
    .rst  (rst),
    .d    (out_d),
    .done (ack_out)
  );

endmodule
