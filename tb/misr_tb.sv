// misr_tb: self-checking test of the signature register.
//
// Feeds random response words with random capture cycles into an 8-bit MISR
// (polynomial x^8+x^4+x^3+x^2+1) and compares every cycle with a reference
// written bit by bit: new[0] = old[7] ^ d[0]; new[i] = old[i-1] ^ d[i] ^
// (old[7] if x^i is a feedback term). Then unloads the signature and checks
// that tdo presents it MSB first, and that a single flipped response bit
// changes the final signature.
module misr_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, capture = 0, unload = 0;
  logic [7:0] d = '0, sig, model;
  logic tdo;
  logic [7:0] words [64];

  misr #(.N(8), .POLY(8'h1D)) dut (.clk, .rst_n, .capture, .unload, .d, .sig, .tdo);

  always #5 clk = ~clk;

  function automatic logic [7:0] step(input logic [7:0] s, input logic [7:0] x);
    logic [7:0] n;
    n[0] = s[7] ^ x[0];
    n[1] = s[0] ^ x[1];
    n[2] = s[1] ^ x[2] ^ s[7];
    n[3] = s[2] ^ x[3] ^ s[7];
    n[4] = s[3] ^ x[4] ^ s[7];
    n[5] = s[4] ^ x[5];
    n[6] = s[5] ^ x[6];
    n[7] = s[6] ^ x[7];
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(input int flip_word, output logic [7:0] final_sig);
    rst_n = 0; @(negedge clk); rst_n = 1;
    model = '0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      capture = 1;
      d = words[i] ^ ((i == flip_word) ? 8'h10 : 8'h00);
      @(posedge clk); #1;
      model = step(model, d);
      check(sig == model, "signature step");
      @(negedge clk); capture = 0; d = 8'($urandom);   // idle cycle: hold
      @(posedge clk); #1;
      check(sig == model, "hold without capture");
    end
    final_sig = sig;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s_good, s_bad, shifted_out;
    foreach (words[i]) words[i] = 8'($urandom);
    repeat (2) @(posedge clk);
    run(-1, s_good);
    check(s_good != 0, "nonzero signature");
    @(negedge clk); unload = 1;
    for (int b = 7; b >= 0; b--) begin
      shifted_out[b] = tdo;
      @(posedge clk); #1;
      @(negedge clk);
    end
    unload = 0;
    check(shifted_out == s_good, "serial unload MSB first");
    check(sig == 0, "empty after unload");
    run(17, s_bad);
    check(s_bad != s_good, "single-bit error detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
