// pair_flip_decoder_tb: exhaustive self-checking test of the location decoder.
//
// For core sizes 8 (the 3-to-8 example), 45 and 50 (odd and non-power-of-two
// input counts, leaving spare codes) and 32, every code is applied with the
// enable low and high. Expected: all strobes low when disabled or when the
// code is not below M, otherwise only strobe number code high.
module pair_flip_decoder_tb;
  int checks = 0, failures = 0;
  logic       en;
  logic [5:0] code;
  logic [7:0]  f8;
  logic [44:0] f45;
  logic [49:0] f50;
  logic [31:0] f32;

  pair_flip_decoder #(.M(8))  d8  (.en, .code(code[2:0]), .flip(f8));
  pair_flip_decoder #(.M(45)) d45 (.en, .code(code),      .flip(f45));
  pair_flip_decoder #(.M(50)) d50 (.en, .code(code),      .flip(f50));
  pair_flip_decoder #(.M(32)) d32 (.en, .code(code[4:0]), .flip(f32));

  function automatic logic [63:0] expect_flip(input int m, input int c, input bit e);
    logic [63:0] r = '0;
    if (e && c < m) r[c] = 1'b1;
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s en=%0b code=%0d", what, en, code); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < 64; c++) begin
        en = 1'(e); code = 6'(c);
        #1;
        if (c < 8)  check(f8  == 8'(expect_flip(8, c, en)),   "M=8");
        if (c < 32) check(f32 == 32'(expect_flip(32, c, en)), "M=32");
        check(f45 == 45'(expect_flip(45, c, en)), "M=45");
        check(f50 == 50'(expect_flip(50, c, en)), "M=50");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
