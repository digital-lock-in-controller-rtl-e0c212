// hr_delay_line_tb: self-checking test of the tapped delay line.
// For every tap setting a pulse is sent through the line and the time of
// its rising and falling output edges is compared with sel * DELAY_PS.
// The pulse width must be preserved. A watchdog ends a hung run.
`timescale 1ps/1ps
module hr_delay_line_tb;
  localparam int unsigned TAPS = 16;
  localparam int unsigned DPS  = 3125;

  logic       din = 1'b0;
  logic [3:0] sel = '0;
  logic       dly;
  int         checks = 0, failures = 0;
  realtime    t_in_r, t_in_f, t_out_r, t_out_f;

  hr_delay_line #(.TAPS(TAPS), .DELAY_PS(DPS)) dut (.din, .sel, .dly);

  always @(posedge dly) t_out_r = $realtime;
  always @(negedge dly) t_out_f = $realtime;

  task automatic check(input string what, input realtime got, input realtime exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0t expected %0t", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    for (int s = 0; s < TAPS; s++) begin
      sel = 4'(s);
      #20000;
      din = 1'b1; t_in_r = $realtime;
      #50000;
      din = 1'b0; t_in_f = $realtime;
      #(TAPS * DPS + 10000);
      check($sformatf("rise sel=%0d", s), t_out_r - t_in_r, realtime'(s * DPS));
      check($sformatf("fall sel=%0d", s), t_out_f - t_in_f, realtime'(s * DPS));
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
