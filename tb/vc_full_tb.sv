// vc_full_tb: the test wrapper at its default size (8 core inputs, 8 core
// outputs, flat 3-to-8 decoder) taken through one complete test: the
// five-vector ordered test set of ordered_set_driver is built by six flips,
// its responses are compacted, and the signature is unloaded and checked.
module vc_full_tb;
  logic clk = 0;
  logic rst_n, shift_en, tdi, capture, unload, dec_en, tdo, done;
  logic [7:0] core_in, core_out, signature;
  int checks, failures, nf, nc, nu, np, fc;
  int my_checks = 0, my_failures = 0;

  always #5 clk = ~clk;

  vc_test_top dut (
    .tck(clk), .trst_n(rst_n), .shift_en, .tdi, .capture, .unload, .core_in, .core_out,
    .dec_en, .signature, .tdo);

  ordered_set_driver u_drv (
    .clk, .rst_n, .shift_en, .tdi, .capture, .unload, .core_in, .core_out, .dec_en,
    .signature, .tdo, .done, .checks, .failures, .n_flips(nf), .n_captures(nc),
    .n_unload(nu), .n_period_ok(np), .flip_cycles(fc));

  task automatic check(input bit ok, input string what);
    my_checks++;
    if (!ok) begin my_failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + my_checks, failures + my_failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    check(nf == 6 && nc == 5 && nu == 8 && np > 0, "mechanisms exercised");
    check(fc == 19, "18 shift cycles plus the final flip");
    $display("TB_RESULT checks=%0d failures=%0d", checks + my_checks, failures + my_failures);
    $finish;
  end
endmodule
