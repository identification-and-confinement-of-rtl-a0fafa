// completion_detector_tb: checks dual-rail completion detection.
//
// Fills a 4-bit word bit by bit in random order and checks that `done`
// rises only with the last bit, then empties it in random order and checks
// that `done` falls only with the last bit. Also checks that the illegal
// code {1,1} counts as a complete bit, and the 1-bit variant.
module completion_detector_tb;
  import qdi_pkg::*;

  int checks = 0, failures = 0;

  logic             rst;
  dr_bit_t [3:0]    d;
  logic             done;
  dr_bit_t [0:0]    d1;
  logic             done1;

  completion_detector #(.BITS(4)) dut  (.rst(rst), .d(d),  .done(done));
  completion_detector #(.BITS(1)) dut1 (.rst(rst), .d(d1), .done(done1));

  task automatic expect_done(input logic e, input string what);
    #1;
    checks++;
    if (done !== e) begin
      failures++;
      $display("FAIL %s: done=%b exp=%b d=%b", what, done, e, d);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [4];
    logic [3:0] val;
    rst = 1'b1; d = '0; d1 = '0;
    #1 rst = 1'b0;
    expect_done(1'b0, "after reset");
    for (int w = 0; w < 40; w++) begin
      val = 4'($urandom);
      for (int i = 0; i < 4; i++) order[i] = i;
      order.shuffle();
      foreach (order[j]) begin
        d[order[j]] = dr_encode(val[order[j]]);
        if (w % 7 == 3 && j == 3) d[order[j]] = '{t: 1'b1, f: 1'b1};
        expect_done(j == 3, "filling");
      end
      order.shuffle();
      foreach (order[j]) begin
        d[order[j]] = '0;
        expect_done(j != 3, "emptying");
      end
    end
    // single-bit detector is the OR of the rails
    for (int v = 0; v < 4; v++) begin
      d1 = dr_bit_t'(v);
      #1;
      checks++;
      if (done1 !== (v != 0)) begin failures++; $display("FAIL 1-bit v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
