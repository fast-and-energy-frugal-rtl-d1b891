// vc_test_top_tb: end-to-end test of the test wrapper with each decoder style.
//
// Three wrappers (flat decoder at the default parameters, tree decoder, pair
// decoder) each get the five-vector ordered test set from ordered_set_driver.
// Each must build every vector from six single-bit flips sent as 18 serial
// bits, apply the last flip 19 cycles after the first shift, compact the five
// responses into the expected signature and unload it on tdo. The mechanisms
// are counted: decoder enable pulses, pulses at the 3-cycle period, captures,
// unload cycles; one that never happened is a failure.
module vc_test_top_tb;
  import vc_pkg::*;
  localparam int NT = 3;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic rst_n [NT], shift_en [NT], tdi [NT], capture [NT], unload [NT];
  logic dec_en [NT], tdo [NT], done [NT];
  logic [7:0] core_in [NT], core_out [NT], signature [NT];
  int ch [NT], fl [NT], nf [NT], nc [NT], nu [NT], np [NT], fc [NT];

  always #5 clk = ~clk;

  vc_test_top u_flat (
    .tck(clk), .trst_n(rst_n[0]), .shift_en(shift_en[0]), .tdi(tdi[0]), .capture(capture[0]),
    .unload(unload[0]), .core_in(core_in[0]), .core_out(core_out[0]), .dec_en(dec_en[0]),
    .signature(signature[0]), .tdo(tdo[0]));
  vc_test_top #(.STYLE(DEC_TREE)) u_tree (
    .tck(clk), .trst_n(rst_n[1]), .shift_en(shift_en[1]), .tdi(tdi[1]), .capture(capture[1]),
    .unload(unload[1]), .core_in(core_in[1]), .core_out(core_out[1]), .dec_en(dec_en[1]),
    .signature(signature[1]), .tdo(tdo[1]));
  vc_test_top #(.STYLE(DEC_PAIR)) u_pair (
    .tck(clk), .trst_n(rst_n[2]), .shift_en(shift_en[2]), .tdi(tdi[2]), .capture(capture[2]),
    .unload(unload[2]), .core_in(core_in[2]), .core_out(core_out[2]), .dec_en(dec_en[2]),
    .signature(signature[2]), .tdo(tdo[2]));

  for (genvar i = 0; i < NT; i++) begin : g_drv
    ordered_set_driver u_drv (
      .clk, .rst_n(rst_n[i]), .shift_en(shift_en[i]), .tdi(tdi[i]), .capture(capture[i]),
      .unload(unload[i]), .core_in(core_in[i]), .core_out(core_out[i]), .dec_en(dec_en[i]),
      .signature(signature[i]), .tdo(tdo[i]), .done(done[i]), .checks(ch[i]), .failures(fl[i]),
      .n_flips(nf[i]), .n_captures(nc[i]), .n_unload(nu[i]), .n_period_ok(np[i]),
      .flip_cycles(fc[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NT; i++) wait (done[i]);
    for (int i = 0; i < NT; i++) begin
      checks += ch[i];
      failures += fl[i];
      check(nf[i] > 0, $sformatf("style %0d: flips happened (%0d)", i, nf[i]));
      check(np[i] > 0, $sformatf("style %0d: enable at 3-cycle period (%0d)", i, np[i]));
      check(nc[i] > 0, $sformatf("style %0d: captures happened (%0d)", i, nc[i]));
      check(nu[i] > 0, $sformatf("style %0d: unload happened (%0d)", i, nu[i]));
      $display("style %0d: flips=%0d periodic=%0d captures=%0d unload=%0d shift-to-last-flip=%0d cycles",
               i, nf[i], np[i], nc[i], nu[i], fc[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
