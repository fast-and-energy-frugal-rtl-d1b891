// toggle_cells_tb: self-checking test of the toggle cells.
//
// Applies random flip patterns (mostly one-hot, as the decoder gives, some
// wider) and compares the held vector with a reference that inverts exactly
// the strobed bits; also counts the transitions at the outputs, which must
// equal the number of strobes applied.
module toggle_cells_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [15:0] flip = '0, vec, model;
  int strobes = 0, transitions = 0;

  toggle_cells #(.M(16)) dut (.clk, .rst_n, .flip, .vec);

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
    model = '0;
    repeat (2) @(posedge clk);
    #1 check(vec == '0, "reset value");
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      logic [15:0] vec_before;
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) flip = 16'($urandom);
      else if ($urandom_range(0, 1) == 0) flip = '0;
      else flip = 16'(1) << $urandom_range(0, 15);
      vec_before = vec;
      @(posedge clk); #1;
      model ^= flip;
      strobes += $countones(flip);
      transitions += $countones(vec ^ vec_before);
      check(vec == model, "vector");
    end
    check(strobes == transitions, "transitions equal strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
