// qdi_fi_target_tb: fault injection campaign on the two hardened pipelines.
//
// Runs the deadlocking and the interlocking pipeline of qdi_fi_target, at
// its default size, side by side under identical stimulus. For each of 11
// operating points, from bubble limited (fast generator, slow checker) to
// token limited (slow generator, fast checker), it first records a golden,
// fault-free run. Then, for each of the five victim wires (the four rails
// between buffers 1 and 2 and the acknowledge into buffer 2) and for every
// injection time across one output handshake cycle after a pre-run of
// PRE words, it resets both pipelines, replays the run, inverts the victim
// for PW ticks and classifies the outcome in each pipeline as the most
// important of: timing deviation < value fault < code fault < glitch <
// deadlock (no class: no observable effect).
//
// Checks, all derived from the buffer rules rather than from a model:
//   - golden runs are clean, complete and identical in both pipelines;
//   - every experiment's pre-run is clean (reset recovers from deadlock);
//   - interlocking: a data-rail pulse never yields a code fault, glitch or
//     deadlock; a pulse on the idle rail of a bit buffer 2 already holds
//     (the interlock is closed) has no effect beyond timing;
//   - deadlocking: a data-rail pulse never yields a code fault that the
//     pipeline survives (a code fault always ends in a deadlock);
//   - interlocking shows fewer effects bubble limited than token limited.
// Mechanisms counted and required at least once: bubble- and token-limited
// operation, interlock blocking a pulse, interlock locking in a wrong
// value, deadlocking fail stop on {1,1}, an effect from the acknowledge
// victim, recovery by reset after a deadlock.
// Prints per operating point the number of experiments with an effect other
// than a timing deviation, per pipeline.
module qdi_fi_target_tb;
  import qdi_pkg::*;
  import qdi_tb_pkg::*;

  localparam int BITS  = 2;
  localparam int PRE   = 4;    // words before the injection window
  localparam int POST  = 8;    // words after it
  localparam int NW    = PRE + POST;
  localparam int PW    = 6;    // pulse width in ticks
  localparam int NSET  = 11;   // operating points
  localparam int NVIC  = 5;    // victim wires
  localparam int P_DL = 0, P_IL = 1;

  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst;
  int unsigned src_dly, snk_dly;

  dr_bit_t [BITS-1:0] in_d [2], out_d [2], inj_d [2], vic_d [2];
  logic               in_ack [2], out_ack [2], inj_ack [2], vic_ack [2];
  int unsigned        sent [2], perr [2], rcv [2], code_err [2], val_err [2], glitch [2], idle [2], tick [2];
  int unsigned        stamps [2][16];

  always #5 clk = ~clk;

  qdi_fi_target dut (
    .rst        (rst),
    .dl_in_d    (in_d[P_DL]),  .dl_in_ack  (in_ack[P_DL]),
    .dl_out_d   (out_d[P_DL]), .dl_out_ack (out_ack[P_DL]),
    .dl_inj_d   (inj_d[P_DL]), .dl_inj_ack (inj_ack[P_DL]),
    .dl_vic_d   (vic_d[P_DL]), .dl_vic_ack (vic_ack[P_DL]),
    .il_in_d    (in_d[P_IL]),  .il_in_ack  (in_ack[P_IL]),
    .il_out_d   (out_d[P_IL]), .il_out_ack (out_ack[P_IL]),
    .il_inj_d   (inj_d[P_IL]), .il_inj_ack (inj_ack[P_IL]),
    .il_vic_d   (vic_d[P_IL]), .il_vic_ack (vic_ack[P_IL])
  );

  for (genvar p = 0; p < 2; p++) begin : g_env
    dr_source #(.BITS(BITS)) src (
      .clk (clk), .rst (rst), .dly (src_dly), .ack (in_ack[p]), .d (in_d[p]),
      .sent (sent[p]), .proto_err (perr[p])
    );
    dr_sink #(.BITS(BITS)) snk (
      .clk (clk), .rst (rst), .dly (snk_dly), .d (out_d[p]), .ack (out_ack[p]),
      .rcv (rcv[p]), .code_err (code_err[p]), .val_err (val_err[p]), .glitch (glitch[p]),
      .idle (idle[p]), .tick (tick[p]), .last_t (stamps[p])
    );
  end

  // Buffer 2 of the interlocking pipeline, to tell when its interlock is closed.
  dr_bit_t [BITS-1:0] il_b2;
  assign il_b2 = dut.u_il.d_out[1];

  // Tallies: [pipeline][operating point][class], split by victim kind.
  int unsigned tally_d [2][NSET][NUM_FC];
  int unsigned tally_a [2][NSET][NUM_FC];
  int unsigned n_exp;
  int unsigned m_bubble, m_token, m_blocked, m_lockin, m_failstop, m_ackfx, m_recover;

  function automatic int unsigned sum_cls(input int unsigned t [2][NSET][NUM_FC], input int p, input int c);
    int unsigned n = 0;
    for (int s = 0; s < NSET; s++) n += t[p][s][c];
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic restart();
    @(negedge clk);
    rst = 1'b1;
    for (int p = 0; p < 2; p++) begin
      inj_d[p] = '0;
      inj_ack[p] = 1'b0;
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
  endtask

  task automatic run_rest(input int unsigned dead);
    bit busy;
    do begin
      @(negedge clk);
      busy = 1'b0;
      for (int p = 0; p < 2; p++) if (rcv[p] < NW && idle[p] < dead) busy = 1'b1;
    end while (busy);
  endtask

  initial begin
    #3000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned golden [16];
    int unsigned t0, t1, dead;
    qdi_tb_pkg::fault_class_e fc [2];
    bit prev_dead, closed;
    int unsigned eff_il [NSET];

    rst = 1'b1; src_dly = 1; snk_dly = 1;
    for (int p = 0; p < 2; p++) begin
      inj_d[p] = '0;
      inj_ack[p] = 1'b0;
    end
    tally_d = '{default: '{default: '{default: 0}}};
    tally_a = '{default: '{default: '{default: 0}}};
    n_exp = 0;
    m_bubble = 0; m_token = 0; m_blocked = 0; m_lockin = 0;
    m_failstop = 0; m_ackfx = 0; m_recover = 0;
    prev_dead = 1'b0;

    for (int s = 0; s < NSET; s++) begin
      src_dly = 4 + 4 * s;          // s = 0: bubble limited
      snk_dly = 44 - 4 * s;         // s = 10: token limited
      dead    = 4 * (src_dly + snk_dly) + 100;
      if (src_dly < snk_dly) m_bubble++;
      if (src_dly > snk_dly) m_token++;

      // Golden run.
      restart();
      run_rest(dead);
      for (int p = 0; p < 2; p++)
        check(rcv[p] == NW && code_err[p] == 0 && val_err[p] == 0 && glitch[p] == 0 && perr[p] == 0,
              $sformatf("golden run clean, point %0d pipeline %0d", s, p));
      check(stamps[P_DL] == stamps[P_IL], $sformatf("golden timing equal, point %0d", s));
      golden = stamps[P_IL];
      t0 = golden[PRE];
      t1 = golden[PRE + 1];
      $display("point %0d: output handshake cycle %0d ticks", s, t1 - t0);

      for (int v = 0; v < NVIC; v++) begin
        for (int unsigned t = t0; t < t1; t++) begin
          restart();
          // replay up to the injection time (tick counts from reset)
          while (tick[P_IL] < t) @(negedge clk);
          check(rcv[P_DL] <= PRE + 1 && code_err[P_DL] + val_err[P_DL] + glitch[P_DL] == 0 &&
                code_err[P_IL] + val_err[P_IL] + glitch[P_IL] == 0,
                "pre-run clean");
          if (prev_dead) m_recover++;
          // is the interlock of buffer 2 closed on the victim rail's bit?
          closed = 1'b0;
          if (v < 4) closed = !vic_ack[P_IL] && (il_b2[v / 2].t ^ il_b2[v / 2].f) &&
                              ((v % 2 == 0) ? !il_b2[v / 2].f : !il_b2[v / 2].t);
          for (int p = 0; p < 2; p++) begin
            if (v < 4) begin
              if (v % 2 == 0) inj_d[p][v / 2].f = 1'b1;
              else            inj_d[p][v / 2].t = 1'b1;
            end else inj_ack[p] = 1'b1;
          end
          repeat (PW) @(negedge clk);
          for (int p = 0; p < 2; p++) begin
            inj_d[p] = '0;
            inj_ack[p] = 1'b0;
          end
          run_rest(dead);
          n_exp++;

          prev_dead = 1'b0;
          for (int p = 0; p < 2; p++) begin
            if (rcv[p] < NW) fc[p] = FC_DEADLOCK;
            else if (glitch[p] != 0 || perr[p] != 0) fc[p] = FC_GLITCH;
            else if (code_err[p] != 0) fc[p] = FC_CODE;
            else if (val_err[p] != 0) fc[p] = FC_VALUE;
            else if (stamps[p][0:NW-1] != golden[0:NW-1]) fc[p] = FC_TIMING;
            else fc[p] = FC_NONE;
            if (fc[p] == FC_DEADLOCK) prev_dead = 1'b1;
            if (v < 4) tally_d[p][s][fc[p]]++;
            else tally_a[p][s][fc[p]]++;
            if (v == 4 && fc[p] > FC_TIMING) m_ackfx++;
          end

          if (v < 4) begin
            check(fc[P_IL] inside {FC_NONE, FC_TIMING, FC_VALUE},
                  $sformatf("interlocking data pulse class %s, point %0d wire %0d t %0d",
                            fc[P_IL].name(), s, v, t - t0));
            check(fc[P_DL] != FC_CODE,
                  $sformatf("deadlocking survived a code fault, point %0d wire %0d t %0d", s, v, t - t0));
            if (closed) begin
              m_blocked++;
              check(fc[P_IL] inside {FC_NONE, FC_TIMING},
                    $sformatf("closed interlock let a pulse through, point %0d wire %0d", s, v));
            end
            if (fc[P_IL] == FC_VALUE) m_lockin++;
            if (fc[P_DL] == FC_DEADLOCK && code_err[P_DL] != 0) m_failstop++;
          end
        end
      end
    end

    // Summary table: experiments with an effect other than timing.
    $display("point src snk | deadlocking data/ack | interlocking data/ack | (V C G D) DL data | (V C G D) IL data");
    for (int s = 0; s < NSET; s++) begin
      int unsigned e [2][2];
      for (int p = 0; p < 2; p++) begin
        e[p][0] = 0; e[p][1] = 0;
        for (int c = FC_VALUE; c < NUM_FC; c++) begin
          e[p][0] += tally_d[p][s][c];
          e[p][1] += tally_a[p][s][c];
        end
      end
      eff_il[s] = e[P_IL][0];
      $display("%5d %3d %3d | %9d %9d | %9d %9d | %3d %3d %3d %3d | %3d %3d %3d %3d",
               s, 4 + 4 * s, 44 - 4 * s, e[P_DL][0], e[P_DL][1], e[P_IL][0], e[P_IL][1],
               tally_d[P_DL][s][FC_VALUE], tally_d[P_DL][s][FC_CODE], tally_d[P_DL][s][FC_GLITCH],
               tally_d[P_DL][s][FC_DEADLOCK],
               tally_d[P_IL][s][FC_VALUE], tally_d[P_IL][s][FC_CODE], tally_d[P_IL][s][FC_GLITCH],
               tally_d[P_IL][s][FC_DEADLOCK]);
    end
    $display("acknowledge victim, classes V C G D summed over all points: deadlocking %0d %0d %0d %0d, interlocking %0d %0d %0d %0d",
             sum_cls(tally_a, P_DL, FC_VALUE), sum_cls(tally_a, P_DL, FC_CODE), sum_cls(tally_a, P_DL, FC_GLITCH),
             sum_cls(tally_a, P_DL, FC_DEADLOCK), sum_cls(tally_a, P_IL, FC_VALUE), sum_cls(tally_a, P_IL, FC_CODE),
             sum_cls(tally_a, P_IL, FC_GLITCH), sum_cls(tally_a, P_IL, FC_DEADLOCK));
    $display("experiments %0d; mechanisms: bubble %0d token %0d blocked %0d lock-in %0d fail-stop %0d ack-effect %0d recover %0d",
             n_exp, m_bubble, m_token, m_blocked, m_lockin, m_failstop, m_ackfx, m_recover);

    check(eff_il[0] < eff_il[NSET-1], "interlocking: fewer effects bubble limited than token limited");
    check(m_bubble > 0,   "bubble-limited operation exercised");
    check(m_token > 0,    "token-limited operation exercised");
    check(m_blocked > 0,  "interlock blocked a pulse");
    check(m_lockin > 0,   "interlock locked in a wrong value");
    check(m_failstop > 0, "deadlocking fail stop on an illegal code");
    check(m_ackfx > 0,    "acknowledge victim had an effect");
    check(m_recover > 0,  "reset recovered after a deadlock");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
