// single_pin_config_tb: self-checking test of the configuration decimator.
// The comparator input is driven with a first-order sigma-delta pattern of
// density k/1024 (an accumulator that adds k every clock; its carry is the
// bit). Any 1024 consecutive bits of that pattern hold exactly k ones, so
// after one settling window every OP word must equal min(k, 1023). The
// test also checks that trg is the inverse of the clocked bit, that the
// bit is cmp_in delayed by one clock, and that words come every 1024
// clocks. A watchdog ends a hung run.
`timescale 1ps/1ps
module single_pin_config_tb;
  localparam int unsigned DECIM = 1024;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       cmp_in = 1'b0, bit_q, trg, op_valid;
  logic [9:0] op;
  int         checks = 0, failures = 0;
  int         k = 0;
  logic [10:0] acc = '0;
  longint     cyc = 0, last_valid = -1;
  logic       prev_cmp = 1'b0;

  single_pin_config #(.DECIM(DECIM), .OP_BITS(10)) dut (.*);

  always #25000 clk = ~clk;        // 20 MHz

  // pattern generator, changes right after each rising edge
  always @(posedge clk) begin
    cyc <= cyc + 1;
    prev_cmp <= cmp_in;
    {cmp_in, acc[9:0]} <= {1'b0, acc[9:0]} + 11'(k);
  end

  // stream checks
  always @(negedge clk) if (rst_n && cyc > 2) begin
    checks++;
    if (trg !== ~bit_q || bit_q !== prev_cmp) begin
      failures++;
      $display("FAIL stream at cycle %0d", cyc);
    end
  end

  // window spacing
  always @(posedge clk) if (op_valid && cyc > 2) begin
    if (last_valid >= 0) begin
      checks++;
      if (cyc - last_valid != DECIM) begin
        failures++;
        $display("FAIL OP period %0d at %0d", cyc - last_valid, cyc);
      end
    end
    last_valid <= cyc;
  end

  task automatic run_level(input int level);
    int exp;
    k   = level;
    exp = (level > 1023) ? 1023 : level;
    repeat (2) @(posedge clk iff op_valid);   // settle one window
    @(posedge clk iff op_valid);
    checks++;
    if (int'(op) != exp) begin
      failures++;
      $display("FAIL k=%0d op=%0d expected %0d", level, op, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_level(0);
    run_level(1);
    run_level(300);
    run_level(512);
    run_level(777);
    run_level(1023);
    run_level(1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
