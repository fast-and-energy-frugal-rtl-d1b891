// dec_enable_gen_tb: self-checking test of the periodic decoder enable.
//
// With shift_en held high the enable must pulse for one cycle every L cycles,
// first in the cycle after the L-th shift edge (checked for L = 3 and L = 11 by
// measuring the distance between pulses). With random pauses in shift_en the
// pulse must follow exactly every L-th shift, checked against a counter of
// shifts kept by the testbench.
module dec_enable_gen_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shift_en = 0;
  logic en3, en11;
  logic [1:0] ph3;
  logic [3:0] ph11;
  int nshift, last_pulse, t;
  bit exp3, exp11;

  dec_enable_gen #(.L(3))  dut3  (.clk, .rst_n, .shift_en, .dec_en(en3),  .phase(ph3));
  dec_enable_gen #(.L(11)) dut11 (.clk, .rst_n, .shift_en, .dec_en(en11), .phase(ph11));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Continuous shifting: period 3, first pulse in cycle 3 (counting from 0).
    @(negedge clk); shift_en = 1; t = 0; last_pulse = -1;
    repeat (30) begin
      @(posedge clk); #1; t++;
      if (en3) begin
        if (last_pulse < 0) check(t == 3, "first pulse after 3 shifts");
        else                check(t - last_pulse == 3, "period 3");
        last_pulse = t;
      end
    end
    check(last_pulse > 0, "pulses seen");
    // Random pauses: pulse follows every L-th shift.
    @(negedge clk); shift_en = 0; rst_n = 0;
    @(negedge clk); rst_n = 1; nshift = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      shift_en = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      exp3  = shift_en && (nshift % 3 == 2);
      exp11 = shift_en && (nshift % 11 == 10);
      if (shift_en) nshift++;
      #1;
      check(en3 == exp3, "en3 after every 3rd shift");
      check(en11 == exp11, "en11 after every 11th shift");
      check(ph3 == 2'(nshift % 3), "phase3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
