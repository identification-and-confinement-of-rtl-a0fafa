// set_injector_tb: checks the victim-wire injection point.
//
// With flip = 0 every wire must pass unchanged; with a flip bit set the
// matching wire must carry the inverse of its driver for exactly as long
// as the flip is held, and no other wire may change.
module set_injector_tb;

  int checks = 0, failures = 0;

  logic [4:0] a, flip, y;

  set_injector #(.W(5)) dut (.a(a), .flip(flip), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = 5'($urandom);
      flip = '0;
      #1;
      checks++;
      if (y !== a) begin failures++; $display("FAIL pass a=%b y=%b", a, y); end
      flip = 5'(1 << (n % 5));
      #1;
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (y[i] !== (flip[i] ? ~a[i] : a[i])) begin
          failures++;
          $display("FAIL pulse wire %0d a=%b y=%b", i, a, y);
        end
      end
      flip = '0;
      #1;
      checks++;
      if (y !== a) begin failures++; $display("FAIL after pulse a=%b y=%b", a, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
