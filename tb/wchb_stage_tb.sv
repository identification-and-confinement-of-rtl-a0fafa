// wchb_stage_tb: checks one 2-bit WCHB half buffer in all three styles.
//
// The testbench plays both neighbours: it drives the input word and the
// acknowledge from the next stage, and checks the output word and the
// acknowledge returned, for a classic, a deadlocking and an interlocking
// stage side by side. Covered: normal 4-phase operation with random words,
// holding data until acknowledged and spacer until released, a pulse on the
// idle rail while the stage waits for data (classic and deadlocking end in
// {1,1}, interlocking keeps the wrong but legal value), a pulse on the idle
// rail after the data was captured (interlocking blocks it), the
// deadlocking stage refusing to return to spacer from {1,1}, and pulses
// while the stage is closed, which no style may capture. Expected values are
// written out per case from the buffer rules, not computed by a model.
module wchb_stage_tb;
  import qdi_pkg::*;

  localparam wchb_style_e STYLES [3] = '{WCHB_CLASSIC, WCHB_DEADLOCKING, WCHB_INTERLOCKING};
  localparam int CL = 0, DL = 1, IL = 2;

  int checks = 0, failures = 0;

  logic          rst, ack_in;
  dr_bit_t [1:0] in_d;
  dr_bit_t [1:0] out_d   [3];
  logic          ack_out [3];

  for (genvar s = 0; s < 3; s++) begin : g_dut
    wchb_stage #(.BITS(2), .STYLE(STYLES[s])) dut (
      .rst (rst), .in_d (in_d), .ack_out (ack_out[s]), .out_d (out_d[s]), .ack_in (ack_in)
    );
  end

  // Expected output as rails {b1.t, b1.f, b0.t, b0.f}.
  task automatic expect_out(input int s, input logic [3:0] rails, input logic ack, input string what);
    checks++;
    if (out_d[s] !== rails || ack_out[s] !== ack) begin
      failures++;
      $display("FAIL style %0d %s: out=%b ack=%b exp out=%b ack=%b", s, what, out_d[s], ack_out[s], rails, ack);
    end
  endtask

  task automatic expect_all(input logic [3:0] rails, input logic ack, input string what);
    for (int s = 0; s < 3; s++) expect_out(s, rails, ack, what);
  endtask

  task automatic drive(input logic [3:0] rails, input logic ai);
    in_d = rails;
    ack_in = ai;
    #1;
  endtask

  task automatic do_reset();
    rst = 1'b1; in_d = '0; ack_in = 1'b0;
    #1 rst = 1'b0;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] w;
    logic [3:0] enc;
    do_reset();
    expect_all(4'b0000, 1'b0, "reset");

    // Normal handshakes with random words.
    for (int n = 0; n < 50; n++) begin
      w   = 2'($urandom);
      enc = {w[1], ~w[1], w[0], ~w[0]};
      drive(enc, 1'b0);
      expect_all(enc, 1'b1, "capture");
      drive(4'b0000, 1'b0);          // input returns to spacer early
      expect_all(enc, 1'b1, "hold data until ack");
      drive(4'b0000, 1'b1);
      expect_all(4'b0000, 1'b0, "null after ack");
      drive(enc, 1'b1);              // next data before release
      expect_all(4'b0000, 1'b0, "hold spacer until release");
      drive(4'b0000, 1'b1);
      drive(4'b0000, 1'b0);
      expect_all(4'b0000, 1'b0, "released");
    end

    // Pulse on the idle rail of bit 0 while waiting for data 2'b11.
    do_reset();
    drive(4'b0001, 1'b0);            // fault: b0.f rises
    expect_all(4'b0001, 1'b0, "pulse captured while armed");
    drive(4'b0000, 1'b0);            // pulse over
    expect_all(4'b0001, 1'b0, "pulse stored");
    drive(4'b1010, 1'b0);            // correct word 11 arrives
    expect_out(CL, 4'b1011, 1'b1, "classic code fault");
    expect_out(DL, 4'b1011, 1'b1, "deadlocking code fault");
    expect_out(IL, 4'b1001, 1'b1, "interlocking wrong legal value");
    drive(4'b0000, 1'b1);            // acknowledge and spacer
    expect_out(CL, 4'b0000, 1'b0, "classic recovers");
    expect_out(DL, 4'b0011, 1'b1, "deadlocking stuck");
    expect_out(IL, 4'b0000, 1'b0, "interlocking recovers");
    drive(4'b0000, 1'b0);
    drive(4'b0000, 1'b1);
    expect_out(DL, 4'b0011, 1'b1, "deadlocking stays stuck");

    // Pulse on the idle rail after the data was captured.
    do_reset();
    drive(4'b0110, 1'b0);            // word 2'b01 = {b1 false, b0 true}
    expect_all(4'b0110, 1'b1, "captured");
    drive(4'b0111, 1'b0);            // fault: b0.f rises
    expect_out(CL, 4'b0111, 1'b1, "classic takes late pulse");
    expect_out(DL, 4'b0111, 1'b1, "deadlocking takes late pulse");
    expect_out(IL, 4'b0110, 1'b1, "interlocking blocks late pulse");
    drive(4'b0000, 1'b0);
    drive(4'b0000, 1'b1);
    expect_out(CL, 4'b0000, 1'b0, "classic null");
    expect_out(DL, 4'b0011, 1'b1, "deadlocking stuck");
    expect_out(IL, 4'b0000, 1'b0, "interlocking null");

    // Pulses while closed (ack_in high, holding spacer) are not captured.
    do_reset();
    drive(4'b0000, 1'b1);
    for (int r = 0; r < 4; r++) begin
      drive(4'(1 << r), 1'b1);
      expect_all(4'b0000, 1'b0, "closed stage ignores pulse");
      drive(4'b0000, 1'b1);
    end
    drive(4'b0000, 1'b0);
    drive(4'b1001, 1'b0);
    expect_all(4'b1001, 1'b1, "normal after pulses");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
