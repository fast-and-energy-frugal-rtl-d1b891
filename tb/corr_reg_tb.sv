// corr_reg_tb: self-checking test of the correlation register.
//
// Shifts random bits into a 3-bit and an 11-bit register with random gaps in
// shift_en and compares the parallel contents after every clock with a
// reference built from the history of shifted bits: after each shift, bit k
// of the code must equal the bit sent (L-1-k) shifts ago, so the first bit of
// a group of L ends in code[0]. Also checks reset to zero and hold.
module corr_reg_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shift_en = 0, tdi = 0;
  logic [2:0]  code3;
  logic [10:0] code11;
  logic [10:0] hist;  // hist[0] = most recent bit shifted in

  corr_reg #(.L(3))  dut3  (.clk, .rst_n, .shift_en, .tdi, .code(code3));
  corr_reg #(.L(11)) dut11 (.clk, .rst_n, .shift_en, .tdi, .code(code11));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '0;
    repeat (2) @(posedge clk);
    #1 check(code3 == 0 && code11 == 0, "reset value");
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      shift_en = ($urandom_range(0, 3) != 0);
      tdi = $urandom_range(0, 1);
      @(posedge clk);
      if (shift_en) hist = {hist[9:0], tdi};
      #1;
      for (int k = 0; k < 3; k++)  check(code3[k]  == hist[2-k],  "code3 bit");
      for (int k = 0; k < 11; k++) check(code11[k] == hist[10-k], "code11 bit");
    end
    // LSB-first: send 3'b110 as 0,1,1 and find it assembled.
    @(negedge clk); shift_en = 1; tdi = 0;
    @(negedge clk); tdi = 1;
    @(negedge clk); tdi = 1;
    @(negedge clk); shift_en = 0;
    check(code3 == 3'b110, "LSB-first assembly");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
