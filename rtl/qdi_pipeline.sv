// qdi_pipeline: linear dual-rail WCHB pipeline with fault injection points.
//
// STAGES half buffers of BITS dual-rail bits are chained: stage k's output
// word feeds stage k+1, and stage k+1's ack_out is stage k's ack_in. The
// first stage takes the data generator's words (in_d) and returns in_ack;
// the last stage delivers out_d to the checker and takes its out_ack.
// Every stage has the same STYLE (classic, deadlocking or interlocking).
//
// The victim wires sit behind buffer VICTIM (counting buffers from 1): its
// 2*BITS output rails and the acknowledge going into it from buffer
// VICTIM+1. A set_injector inverts each victim wire while the matching bit
// of inj_d / inj_ack is 1. With the defaults (4 stages, 2 bits, VICTIM = 1)
// the victims are the four rails between buffers 1 and 2 and the
// acknowledge input of buffer 2, leaving two buffers between the victims and
// the checker. vic_d and vic_ack show the victim wires as the receiving
// gates see them, injection included, for observing the protocol phase.
//
// Interface timing: 4-phase return-to-zero handshake on both channels,
// zero gate delay; the throughput is set by the source and sink alone.
// rst (active high) clears the whole pipeline to spacer. The handshake
// between neighbouring stages forms combinational loops through the output
// word (Verilator: UNOPTFLAT); they are the asynchronous control itself.
module qdi_pipeline
  import qdi_pkg::*;
#(
  parameter int unsigned STAGES = 4,
  parameter int unsigned BITS   = 2,
  parameter int unsigned VICTIM = 1,
  parameter wchb_style_e STYLE  = WCHB_INTERLOCKING
) (
  input  logic               rst,
  // input channel (from the data generator)
  input  dr_bit_t [BITS-1:0] in_d,
  output logic               in_ack,
  // output channel (to the checker)
  output dr_bit_t [BITS-1:0] out_d,
  input  logic               out_ack,
  // fault injection on the victim wires
  input  dr_bit_t [BITS-1:0] inj_d,
  input  logic               inj_ack,
  output dr_bit_t [BITS-1:0] vic_d,
  output logic               vic_ack
);

  // The victim position must lie inside the chain.
  if (STAGES < 2 || VICTIM < 1 || VICTIM >= STAGES) begin : g_bad_victim
    $error("qdi_pipeline: VICTIM must be in 1..STAGES-1");
  end

  dr_bit_t [BITS-1:0] d_in  [STAGES];  // word at each stage's input
  dr_bit_t [BITS-1:0] d_out [STAGES];  // word at each stage's output
  logic               a_out [STAGES];  // each stage's ack_out
  logic               a_in  [STAGES];  // each stage's ack_in

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    wchb_stage #(.BITS(BITS), .STYLE(STYLE)) u_buf (
      .rst     (rst),
      .in_d    (d_in[k]),
      .ack_out (a_out[k]),
      .out_d   (d_out[k]),
      .ack_in  (a_in[k])
    );

    if (k == 0) begin : g_first
      assign d_in[k] = in_d;
    end else if (k == VICTIM) begin : g_victim_d
      set_injector #(.W(2*BITS)) u_inj_d (
        .a    (d_out[k-1]),
        .flip (inj_d),
        .y    (d_in[k])
      );
    end else begin : g_link
      assign d_in[k] = d_out[k-1];
    end

    if (k == STAGES-1) begin : g_last
      assign a_in[k] = out_ack;
    end else if (k == VICTIM) begin : g_victim_a
      set_injector #(.W(1)) u_inj_a (
        .a    (a_out[k+1]),
        .flip (inj_ack),
        .y    (a_in[k])
      );
    end else begin : g_ack
      assign a_in[k] = a_out[k+1];
    end
  end

  assign in_ack  = a_out[0];
  assign out_d   = d_out[STAGES-1];
  assign vic_d   = d_in[VICTIM];
  assign vic_ack = a_in[VICTIM];

endmodule
