// wchb_style_sweep_tb: fault injection sweep comparing the three WCHB styles.
//
// A classic, a deadlocking and an interlocking 4-stage, 2-bit pipeline
// (qdi_pipeline) run side by side under identical stimulus through the same
// 11 operating points (bubble limited to token limited), 5 victim wires and
// injection times as the campaign on qdi_fi_target, and every experiment is
// classified the same way (timing < value < code < glitch < deadlock). The
// classic pipeline is the reference the two hardened buffers are measured
// against. Checks, per experiment with a pulse on a data rail:
//   - the deadlocking pipeline deadlocks exactly when the classic one shows
//     a code fault: it turns code faults into stops and leaves the sensitive
//     window as it is;
//   - the interlocking pipeline never shows a code fault, glitch or deadlock;
//   - where the classic pipeline shows a code fault but buffer 2 of the
//     interlocking pipeline held the partner of the hit rail for the whole
//     pulse, the interlocking pipeline shows no effect beyond timing.
// Overall: the classic pipeline shows code faults at every operating point,
// and the interlocking pipeline shows fewer effects than the classic one.
// Prints, per operating point, the experiments with an effect beyond timing.
module wchb_style_sweep_tb;
  import qdi_pkg::*;
  import qdi_tb_pkg::*;

  localparam wchb_style_e STYLES [3] = '{WCHB_CLASSIC, WCHB_DEADLOCKING, WCHB_INTERLOCKING};
  localparam int CL = 0, DL = 1, IL = 2;
  localparam int BITS = 2;
  localparam int PRE  = 4;
  localparam int POST = 8;
  localparam int NW   = PRE + POST;
  localparam int PW   = 6;
  localparam int NSET = 11;
  localparam int NVIC = 5;

  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst;
  int unsigned src_dly, snk_dly;
  dr_bit_t [BITS-1:0] inj_d;
  logic               inj_ack;

  dr_bit_t [BITS-1:0] in_d [3], out_d [3], vic_d [3];
  logic               in_ack [3], out_ack [3], vic_ack [3];
  int unsigned        sent [3], perr [3], rcv [3], code_err [3], val_err [3], glitch [3], idle [3], tick [3];
  int unsigned        stamps [3][16];

  always #5 clk = ~clk;

  for (genvar s = 0; s < 3; s++) begin : g_p
    qdi_pipeline #(.STAGES(4), .BITS(BITS), .VICTIM(1), .STYLE(STYLES[s])) dut (
      .rst (rst), .in_d (in_d[s]), .in_ack (in_ack[s]), .out_d (out_d[s]), .out_ack (out_ack[s]),
      .inj_d (inj_d), .inj_ack (inj_ack), .vic_d (vic_d[s]), .vic_ack (vic_ack[s])
    );
    dr_source #(.BITS(BITS)) src (
      .clk (clk), .rst (rst), .dly (src_dly), .ack (in_ack[s]), .d (in_d[s]),
      .sent (sent[s]), .proto_err (perr[s])
    );
    dr_sink #(.BITS(BITS)) snk (
      .clk (clk), .rst (rst), .dly (snk_dly), .d (out_d[s]), .ack (out_ack[s]),
      .rcv (rcv[s]), .code_err (code_err[s]), .val_err (val_err[s]), .glitch (glitch[s]),
      .idle (idle[s]), .tick (tick[s]), .last_t (stamps[s])
    );
  end

  // Buffer 2 of the interlocking pipeline.
  dr_bit_t [BITS-1:0] il_b2;
  assign il_b2 = g_p[2].dut.d_out[1];

  int unsigned eff [3][NSET];
  int unsigned code_cl [NSET];
  int unsigned n_match, n_blocked;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic restart();
    @(negedge clk);
    rst = 1'b1; inj_d = '0; inj_ack = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
  endtask

  task automatic run_rest(input int unsigned dead);
    bit busy;
    do begin
      @(negedge clk);
      busy = 1'b0;
      for (int p = 0; p < 3; p++) if (rcv[p] < NW && idle[p] < dead) busy = 1'b1;
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
    int unsigned t0, t1, dead, tot_cl, tot_il;
    qdi_tb_pkg::fault_class_e fc [3];
    bit captured;

    rst = 1'b1; src_dly = 1; snk_dly = 1; inj_d = '0; inj_ack = 1'b0;
    eff = '{default: '{default: 0}};
    code_cl = '{default: 0};
    n_match = 0; n_blocked = 0;

    for (int s = 0; s < NSET; s++) begin
      src_dly = 4 + 4 * s;
      snk_dly = 44 - 4 * s;
      dead    = 4 * (src_dly + snk_dly) + 100;

      restart();
      run_rest(dead);
      for (int p = 0; p < 3; p++)
        check(rcv[p] == NW && code_err[p] + val_err[p] + glitch[p] + perr[p] == 0,
              $sformatf("golden run clean, point %0d style %0d", s, p));
      golden = stamps[CL];
      t0 = golden[PRE];
      t1 = golden[PRE + 1];

      for (int v = 0; v < NVIC; v++) begin
        for (int unsigned t = t0; t < t1; t++) begin
          restart();
          while (tick[CL] < t) @(negedge clk);
          captured = 1'b0;
          if (v < 4) begin
            captured = (v % 2 == 0) ? il_b2[v / 2].t : il_b2[v / 2].f;
            if (v % 2 == 0) inj_d[v / 2].f = 1'b1;
            else            inj_d[v / 2].t = 1'b1;
          end else inj_ack = 1'b1;
          repeat (PW) @(negedge clk);
          // the partner rail must have stayed captured for the whole pulse
          if (v < 4) captured &= (v % 2 == 0) ? il_b2[v / 2].t : il_b2[v / 2].f;
          inj_d = '0;
          inj_ack = 1'b0;
          run_rest(dead);

          for (int p = 0; p < 3; p++) begin
            if (rcv[p] < NW) fc[p] = FC_DEADLOCK;
            else if (glitch[p] != 0 || perr[p] != 0) fc[p] = FC_GLITCH;
            else if (code_err[p] != 0) fc[p] = FC_CODE;
            else if (val_err[p] != 0) fc[p] = FC_VALUE;
            else if (stamps[p][0:NW-1] != golden[0:NW-1]) fc[p] = FC_TIMING;
            else fc[p] = FC_NONE;
            if (v < 4 && fc[p] > FC_TIMING) eff[p][s]++;
          end

          if (v < 4) begin
            if (fc[CL] == FC_CODE) code_cl[s]++;
            check((fc[CL] == FC_CODE) == (fc[DL] == FC_DEADLOCK),
                  $sformatf("classic %s vs deadlocking %s, point %0d wire %0d t %0d",
                            fc[CL].name(), fc[DL].name(), s, v, t - t0));
            if ((fc[CL] == FC_CODE) == (fc[DL] == FC_DEADLOCK)) n_match++;
            check(fc[IL] inside {FC_NONE, FC_TIMING, FC_VALUE},
                  $sformatf("interlocking class %s, point %0d wire %0d", fc[IL].name(), s, v));
            if (fc[CL] == FC_CODE && captured) begin
              n_blocked++;
              check(fc[IL] inside {FC_NONE, FC_TIMING},
                    $sformatf("interlocking did not block, point %0d wire %0d", s, v));
            end
          end
        end
      end
    end

    $display("point src snk | data-rail experiments with an effect: classic deadlocking interlocking | classic code faults");
    tot_cl = 0; tot_il = 0;
    for (int s = 0; s < NSET; s++) begin
      $display("%5d %3d %3d | %7d %11d %12d | %5d", s, 4 + 4 * s, 44 - 4 * s,
               eff[CL][s], eff[DL][s], eff[IL][s], code_cl[s]);
      check(code_cl[s] > 0, $sformatf("classic shows code faults at point %0d", s));
      tot_cl += eff[CL][s];
      tot_il += eff[IL][s];
    end
    $display("code fault / deadlock matches %0d, pulses blocked by the interlock %0d", n_match, n_blocked);
    check(tot_il < tot_cl, "interlocking has fewer effects than classic");
    check(n_blocked > 0, "interlock blocked pulses the classic buffer stored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
