// c_element_tb: checks the N-input Muller C gate against a reference.
//
// Drives a 3-input and a 2-input gate with random input vectors and the
// reset, and compares the output with a reference state kept in the
// testbench: 1 after all inputs were 1, 0 after all were 0 or after reset,
// unchanged otherwise. Every input combination is also walked once.
module c_element_tb;

  int checks = 0, failures = 0;

  logic       rst;
  logic [2:0] a3;
  logic       q3;
  logic [1:0] a2;
  logic       q2;
  logic       ref3, ref2;

  c_element #(.N(3)) dut3 (.rst(rst), .a(a3), .q(q3));
  c_element #(.N(2)) dut2 (.rst(rst), .a(a2), .q(q2));

  task automatic step(input logic r, input logic [2:0] v3, input logic [1:0] v2);
    rst = r; a3 = v3; a2 = v2;
    #1;
    if (r) begin ref3 = 1'b0; ref2 = 1'b0; end
    else begin
      if (v3 == 3'b111) ref3 = 1'b1; else if (v3 == 3'b000) ref3 = 1'b0;
      if (v2 == 2'b11)  ref2 = 1'b1; else if (v2 == 2'b00)  ref2 = 1'b0;
    end
    checks += 2;
    if (q3 !== ref3) begin
      failures++;
      $display("FAIL c3 a=%b rst=%b q=%b exp=%b", v3, r, q3, ref3);
    end
    if (q2 !== ref2) begin
      failures++;
      $display("FAIL c2 a=%b rst=%b q=%b exp=%b", v2, r, q2, ref2);
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
    step(1'b1, 3'b000, 2'b00);
    // hysteresis: rise only on all ones, fall only on all zeros
    step(1'b0, 3'b001, 2'b01);
    step(1'b0, 3'b011, 2'b11);
    step(1'b0, 3'b111, 2'b10);
    step(1'b0, 3'b110, 2'b00);
    step(1'b0, 3'b100, 2'b01);
    step(1'b0, 3'b000, 2'b11);
    // reset overrides all-ones inputs
    step(1'b1, 3'b111, 2'b11);
    step(1'b0, 3'b101, 2'b10);
    for (int v = 0; v < 8; v++) step(1'b0, 3'(v), 2'(v));
    for (int n = 0; n < 400; n++)
      step(($urandom % 50) == 0, 3'($urandom), 2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
