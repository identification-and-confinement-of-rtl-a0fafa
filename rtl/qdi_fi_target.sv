// qdi_fi_target: fault injection target for the two proposed half buffers.
//
// Two independent dual-rail WCHB pipelines stand side by side, built from
// the two hardened buffers: one of deadlocking WCHBs (prefix dl_) and one
// of interlocking WCHBs (prefix il_). Each is the evaluation pipeline of
// STAGES buffers and BITS dual-rail bits (4 and 2 by default) with its own
// input channel from a data generator, output channel to a checker, and
// fault injection controls on the victim wires between buffers 1 and 2
// (four data rails and the acknowledge input of buffer 2). The two
// pipelines share only the reset.
//
// Per pipeline:
//   *_in_d / *_in_ack     input channel, 4-phase dual-rail push
//   *_out_d / *_out_ack   output channel, 4-phase dual-rail push
//   *_inj_d / *_inj_ack   1 inverts the matching victim wire (SET pulse)
//   *_vic_d / *_vic_ack   the victim wires as the buffers see them
// rst (active high) returns every buffer to spacer; it is also the only
// way out of the deadlock that the deadlocking buffer enters on an illegal
// code word. No clock, zero gate delay. The loops that lint tools report
// through the output words are the pipelines' own handshakes.
module qdi_fi_target
  import qdi_pkg::*;
#(
  parameter int unsigned STAGES = 4,
  parameter int unsigned BITS   = 2
) (
  input  logic               rst,

  input  dr_bit_t [BITS-1:0] dl_in_d,
  output logic               dl_in_ack,
  output dr_bit_t [BITS-1:0] dl_out_d,
  input  logic               dl_out_ack,
  input  dr_bit_t [BITS-1:0] dl_inj_d,
  input  logic               dl_inj_ack,
  output dr_bit_t [BITS-1:0] dl_vic_d,
  output logic               dl_vic_ack,

  input  dr_bit_t [BITS-1:0] il_in_d,
  output logic               il_in_ack,
  output dr_bit_t [BITS-1:0] il_out_d,
  input  logic               il_out_ack,
  input  dr_bit_t [BITS-1:0] il_inj_d,
  input  logic               il_inj_ack,
  output dr_bit_t [BITS-1:0] il_vic_d,
  output logic               il_vic_ack
);

  qdi_pipeline #(
    .STAGES (STAGES),
    .BITS   (BITS),
    .VICTIM (1),
    .STYLE  (WCHB_DEADLOCKING)
  ) u_dl (
    .rst     (rst),
    .in_d    (dl_in_d),
    .in_ack  (dl_in_ack),
    .out_d   (dl_out_d),
    .out_ack (dl_out_ack),
    .inj_d   (dl_inj_d),
    .inj_ack (dl_inj_ack),
    .vic_d   (dl_vic_d),
    .vic_ack (dl_vic_ack)
  );

  qdi_pipeline #(
    .STAGES (STAGES),
    .BITS   (BITS),
    .VICTIM (1),
    .STYLE  (WCHB_INTERLOCKING)
  ) u_il (
    .rst     (rst),
    .in_d    (il_in_d),
    .in_ack  (il_in_ack),
    .out_d   (il_out_d),
    .out_ack (il_out_ack),
    .inj_d   (il_inj_d),
    .inj_ack (il_inj_ack),
    .vic_d   (il_vic_d),
    .vic_ack (il_vic_ack)
  );

endmodule
