// delay_cell_tb: self-checking test of the behavioural delay element.
// Two instances with different delays get the same pulse train with pulses
// longer than the delay; every output edge must follow its input edge by
// exactly the element's delay, and the output level must match the input
// level one delay earlier.
`timescale 1ps/1ps
module delay_cell_tb;
  logic    a = 1'b0;
  logic    y1, y2;
  int      checks = 0, failures = 0;
  realtime t_in;

  delay_cell #(.DELAY_PS(3125)) u1 (.a, .y(y1));
  delay_cell #(.DELAY_PS(7000)) u2 (.a, .y(y2));

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  always @(y1) if ($realtime > 0) check("element 1 edge after 3125 ps", $realtime - t_in == 3125.0);
  always @(y2) if ($realtime > 0) check("element 2 edge after 7000 ps", $realtime - t_in == 7000.0);

  initial begin
    #20000;
    for (int i = 0; i < 20; i++) begin
      a = ~a;
      t_in = $realtime;
      #3124; check("element 1 not yet switched", y1 != a);
      #2;    check("element 1 switched", y1 == a);
      #3872; check("element 2 not yet switched", y2 != a);
      #4;    check("element 2 switched", y2 == a);
      #($urandom_range(1000, 20000));   // level held >= 8 ns in total
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
