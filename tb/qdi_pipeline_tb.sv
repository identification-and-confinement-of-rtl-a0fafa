// qdi_pipeline_tb: 4-stage, 2-bit dual-rail pipelines in all three styles.
//
// A classic, a deadlocking and an interlocking pipeline run side by side,
// each between its own data generator (dr_source) and checker (dr_sink).
// Part 1 streams words fault-free in bubble-limited, balanced and
// token-limited timing and checks every word arrives correct and in order.
// Part 2 injects one pulse on the idle rail of bit 0 between buffers 1 and
// 2 at a chosen protocol phase and checks the outcome each buffer style
// must give:
//   token limited, buffer 2 armed and empty (pulse precedes the data):
//     classic -> code fault, deadlocking -> deadlock, interlocking -> a
//     wrong but legal value and no code fault, pipeline keeps running;
//   bubble limited, buffer 2 holding its word (pulse follows the data):
//     classic -> code fault, deadlocking -> deadlock, interlocking -> no
//     effect at all.
// A pulse on the acknowledge victim while buffer 2 is empty and idle must
// have no effect in any style.
module qdi_pipeline_tb;
  import qdi_pkg::*;
  import qdi_tb_pkg::*;

  localparam wchb_style_e STYLES [3] = '{WCHB_CLASSIC, WCHB_DEADLOCKING, WCHB_INTERLOCKING};
  localparam int CL = 0, DL = 1, IL = 2;
  localparam int BITS = 2;

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst;
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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic restart(input int unsigned sd, input int unsigned kd);
    @(negedge clk);
    rst = 1'b1; inj_d = '0; inj_ack = 1'b0; src_dly = sd; snk_dly = kd;
    repeat (3) @(negedge clk);
    rst = 1'b0;
  endtask

  // Run until every checker has `n` words or has been idle for `limit` ticks.
  task automatic run_until(input int unsigned n, input int unsigned limit);
    bit busy;
    do begin
      @(negedge clk);
      busy = 1'b0;
      for (int s = 0; s < 3; s++) if (rcv[s] < n && idle[s] < limit) busy = 1'b1;
    end while (busy);
  endtask

  // Wait until buffer 2 is armed (its acknowledge input low) with spacer at
  // its input and either spacer (waiting for data) or a complete word
  // (waiting for buffer 3) in its gates. Sampled between clock edges.
  dr_bit_t [BITS-1:0] b2_out;
  assign b2_out = g_p[0].dut.d_out[1];

  task automatic wait_phase(input bit want_full);
    bit full, empty, in_null;
    do begin
      @(negedge clk);
      full = 1'b1; empty = 1'b1; in_null = 1'b1;
      for (int i = 0; i < BITS; i++) begin
        full    &= b2_out[i].t | b2_out[i].f;
        empty   &= ~(b2_out[i].t | b2_out[i].f);
        in_null &= ~(vic_d[CL][i].t | vic_d[CL][i].f);
      end
    end while (vic_ack[CL] || !in_null || !(want_full ? full : empty));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] nxt;
    int unsigned ve [3];

    // Part 1: fault-free streaming at three operating points.
    for (int m = 0; m < 3; m++) begin
      restart(m == 0 ? 2 : (m == 1 ? 10 : 20), m == 0 ? 20 : (m == 1 ? 10 : 2));
      run_until(30, 200);
      for (int s = 0; s < 3; s++) begin
        check(rcv[s] >= 30, $sformatf("style %0d mode %0d delivered %0d words", s, m, rcv[s]));
        check(code_err[s] == 0 && val_err[s] == 0 && glitch[s] == 0 && perr[s] == 0,
              $sformatf("style %0d mode %0d clean (c%0d v%0d g%0d p%0d)", s, m,
                        code_err[s], val_err[s], glitch[s], perr[s]));
      end
      // all styles behave the same without faults
      check(stamps[CL] == stamps[DL] && stamps[CL] == stamps[IL], "identical fault-free timing");
    end

    // Part 2a: token limited, pulse before the data reaches buffer 2.
    restart(40, 2);
    run_until(4, 1000);
    wait_phase(1'b0);
    @(negedge clk);
    nxt = word_of(sent[CL]);          // next word the generator will send
    inj_d[0].t = ~nxt[0];             // idle rail of bit 0
    inj_d[0].f = nxt[0];
    repeat (3) @(negedge clk);
    inj_d = '0;
    run_until(12, 300);
    check(code_err[CL] > 0, "token limited: classic shows a code fault");
    check(rcv[DL] < 12 && idle[DL] >= 300, "token limited: deadlocking stops");
    check(code_err[IL] == 0 && val_err[IL] == 1 && rcv[IL] >= 12,
          $sformatf("token limited: interlocking wrong value only (c%0d v%0d r%0d)",
                    code_err[IL], val_err[IL], rcv[IL]));

    // Part 2b: bubble limited, pulse after buffer 2 captured its word.
    restart(2, 40);
    run_until(4, 1000);
    wait_phase(1'b1);
    @(negedge clk);
    inj_d[0].t = ~b2_out[0].t;        // the rail buffer 2 holds low
    inj_d[0].f = ~b2_out[0].f;
    repeat (3) @(negedge clk);
    inj_d = '0;
    run_until(12, 300);
    check(code_err[CL] > 0, "bubble limited: classic shows a code fault");
    check(rcv[DL] < 12 && idle[DL] >= 300, "bubble limited: deadlocking stops");
    check(code_err[IL] == 0 && val_err[IL] == 0 && glitch[IL] == 0 && rcv[IL] >= 12,
          "bubble limited: interlocking unaffected");

    // Part 2c: pulse on the acknowledge victim while buffer 2 is empty.
    restart(40, 2);
    run_until(4, 1000);
    wait_phase(1'b0);
    @(negedge clk);
    inj_ack = 1'b1;
    repeat (3) @(negedge clk);
    inj_ack = 1'b0;
    run_until(12, 300);
    for (int s = 0; s < 3; s++) begin
      ve[s]   = val_err[s] + code_err[s] + glitch[s];
      check(rcv[s] >= 12 && ve[s] == 0, $sformatf("style %0d: ack pulse while empty harmless", s));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
