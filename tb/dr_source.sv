// dr_source: data generator for a dual-rail 4-phase push channel.
//
// Sends word_of(0), word_of(1), ... as dual-rail tokens. After the channel's
// acknowledge falls it waits `dly` ticks of clk and puts the next token on
// the rails; after the acknowledge rises it waits `dly` ticks again and
// returns the rails to spacer. A large `dly` makes the pipeline wait for
// tokens (token limited). `sent` counts completed handshakes, `proto_err`
// counts acknowledges that rise while the rails still carry spacer.
// clk only paces this model; the circuit under test has no clock. rst
// returns the model to its start.
module dr_source
  import qdi_pkg::*;
  import qdi_tb_pkg::*;
#(
  parameter int unsigned BITS = 2
) (
  input  logic               clk,
  input  logic               rst,
  input  int unsigned        dly,
  input  logic               ack,
  output dr_bit_t [BITS-1:0] d,
  output int unsigned        sent,
  output int unsigned        proto_err
);

  typedef enum logic [1:0] {S_IDLE, S_DLY_DATA, S_WAIT_ACK, S_DLY_NULL} state_e;
  state_e      st;
  int unsigned cnt;

  function automatic dr_bit_t [BITS-1:0] encode(input logic [31:0] w);
    dr_bit_t [BITS-1:0] r;
    for (int i = 0; i < BITS; i++) r[i] = dr_encode(w[i]);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      cnt       <= 0;
      d         <= '0;
      sent      <= 0;
      proto_err <= 0;
    end else begin
      unique case (st)
        S_IDLE: if (!ack) begin
          cnt <= dly;
          st  <= S_DLY_DATA;
        end
        S_DLY_DATA: begin
          if (ack) proto_err <= proto_err + 1;
          if (cnt == 0) begin
            d  <= encode(word_of(sent));
            st <= S_WAIT_ACK;
          end else cnt <= cnt - 1;
        end
        S_WAIT_ACK: if (ack) begin
          cnt <= dly;
          st  <= S_DLY_NULL;
        end
        S_DLY_NULL: begin
          if (cnt == 0) begin
            d    <= '0;
            sent <= sent + 1;
            st   <= S_IDLE;
          end else cnt <= cnt - 1;
        end
      endcase
    end
  end

endmodule
