// asym_c_element_tb: checks the asymmetric C gate.
//
// Walks all input combinations from every reachable output state and
// compares with the rule: set when all symmetric inputs and set_en are 1,
// clear when all symmetric inputs are 0 and rst_blk is 0, hold otherwise.
// Then shows the two uses made of it: set_en = 0 keeps the gate at 0 even
// with all inputs high (interlocking), rst_blk = 1 keeps it at 1 with all
// inputs low (deadlocking).
module asym_c_element_tb;

  int checks = 0, failures = 0;

  logic       rst, set_en, rst_blk, q, qref;
  logic [1:0] a;

  asym_c_element #(.N(2)) dut (.rst(rst), .a(a), .set_en(set_en), .rst_blk(rst_blk), .q(q));

  task automatic apply(input logic r, input logic [1:0] av, input logic se, input logic rb);
    rst = r; a = av; set_en = se; rst_blk = rb;
    #1;
    if (r) qref = 1'b0;
    else if (av == 2'b11 && se) qref = 1'b1;
    else if (av == 2'b00 && !rb) qref = 1'b0;
    checks++;
    if (q !== qref) begin
      failures++;
      $display("FAIL a=%b set_en=%b rst_blk=%b q=%b exp=%b", av, se, rb, q, qref);
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
    apply(1'b1, 2'b00, 1'b1, 1'b0);
    // exhaustive from state 0 and from state 1
    for (int v = 0; v < 16; v++) begin
      apply(1'b1, 2'b00, 1'b1, 1'b0);                 // state 0
      apply(1'b0, 2'(v), v[2], v[3]);
      apply(1'b0, 2'b11, 1'b1, 1'b0);                 // state 1
      apply(1'b0, 2'(v), v[2], v[3]);
    end
    // interlocking use: set_en low blocks the rise
    apply(1'b1, 2'b00, 1'b1, 1'b0);
    apply(1'b0, 2'b11, 1'b0, 1'b0);
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL set_en did not block"); end
    // deadlocking use: rst_blk high blocks the fall
    apply(1'b0, 2'b11, 1'b1, 1'b0);
    apply(1'b0, 2'b00, 1'b1, 1'b1);
    checks++;
    if (q !== 1'b1) begin failures++; $display("FAIL rst_blk did not block"); end
    apply(1'b0, 2'b00, 1'b1, 1'b0);
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL no clear after rst_blk"); end
    for (int n = 0; n < 300; n++)
      apply(($urandom % 40) == 0, 2'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
