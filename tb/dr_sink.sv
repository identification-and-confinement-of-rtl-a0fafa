// dr_sink: checker and sink for a dual-rail 4-phase push channel.
//
// Waits until every bit of the word carries data, checks it against
// word_of(rcv) and, after `dly` ticks of clk, raises the acknowledge; once
// all rails are back at spacer it waits `dly` ticks and lowers it. A large
// `dly` makes the pipeline wait for the acknowledge (bubble limited).
// Counted, per word at most once each:
//   code_err  a bit showed both rails high at any time
//   val_err   a complete, legal word differed from the expected one
//   glitch    a rail fell during the data phase or rose during the null
//             phase (a second transition within one protocol phase)
// rcv counts completed handshakes, last_t[k] holds the clk tick at which
// word k was accepted (for timing comparisons), idle counts ticks since the
// last handshake event. clk only paces this model. rst returns it to start.
module dr_sink
  import qdi_pkg::*;
  import qdi_tb_pkg::*;
#(
  parameter int unsigned BITS  = 2,
  parameter int unsigned NSTAMP = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  int unsigned        dly,
  input  dr_bit_t [BITS-1:0] d,
  output logic               ack,
  output int unsigned        rcv,
  output int unsigned        code_err,
  output int unsigned        val_err,
  output int unsigned        glitch,
  output int unsigned        idle,
  output int unsigned        tick,
  output int unsigned        last_t [NSTAMP]
);

  typedef enum logic [1:0] {K_WAIT_DATA, K_DLY_ACK, K_WAIT_NULL, K_DLY_ACKLO} state_e;
  state_e             st;
  int unsigned        cnt;
  dr_bit_t [BITS-1:0] prev;
  logic               code_seen, glitch_seen;

  logic complete, is_null, any_11, any_fall, any_rise;
  logic [BITS-1:0] value;
  logic [31:0]     exp_w;

  always_comb begin
    complete = 1'b1;
    is_null  = 1'b1;
    any_11   = 1'b0;
    for (int i = 0; i < BITS; i++) begin
      complete &= d[i].t | d[i].f;
      is_null  &= ~(d[i].t | d[i].f);
      any_11   |= d[i].t & d[i].f;
      value[i]  = d[i].t;
    end
    exp_w    = word_of(rcv);
    any_fall = |(prev & ~d);
    any_rise = |(~prev & d);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= K_WAIT_DATA;
      cnt         <= 0;
      ack         <= 1'b0;
      rcv         <= 0;
      code_err    <= 0;
      val_err     <= 0;
      glitch      <= 0;
      idle        <= 0;
      tick        <= 0;
      prev        <= '0;
      code_seen   <= 1'b0;
      glitch_seen <= 1'b0;
      for (int k = 0; k < NSTAMP; k++) last_t[k] <= 0;
    end else begin
      tick <= tick + 1;
      idle <= idle + 1;
      prev <= d;
      if (any_11 && !code_seen) begin
        code_err  <= code_err + 1;
        code_seen <= 1'b1;
      end
      unique case (st)
        K_WAIT_DATA: begin
          if (any_fall && !glitch_seen) begin
            glitch      <= glitch + 1;
            glitch_seen <= 1'b1;
          end
          if (complete) begin
            if (!any_11 && value != exp_w[BITS-1:0]) val_err <= val_err + 1;
            if (rcv < NSTAMP) last_t[rcv] <= tick;
            cnt  <= dly;
            idle <= 0;
            st   <= K_DLY_ACK;
          end
        end
        K_DLY_ACK: begin
          if (any_fall && !glitch_seen) begin
            glitch      <= glitch + 1;
            glitch_seen <= 1'b1;
          end
          if (cnt == 0) begin
            ack  <= 1'b1;
            idle <= 0;
            st   <= K_WAIT_NULL;
          end else cnt <= cnt - 1;
        end
        K_WAIT_NULL: begin
          if (any_rise && !glitch_seen) begin
            glitch      <= glitch + 1;
            glitch_seen <= 1'b1;
          end
          if (is_null) begin
            cnt  <= dly;
            idle <= 0;
            st   <= K_DLY_ACKLO;
          end
        end
        K_DLY_ACKLO: begin
          if (any_rise && !glitch_seen) begin
            glitch      <= glitch + 1;
            glitch_seen <= 1'b1;
          end
          if (cnt == 0) begin
            ack         <= 1'b0;
            rcv         <= rcv + 1;
            idle        <= 0;
            code_seen   <= 1'b0;
            glitch_seen <= 1'b0;
            st          <= K_WAIT_DATA;
          end else cnt <= cnt - 1;
        end
      endcase
    end
  end

endmodule
