// decomp_unit_tb: self-checking test of the decompression unit.
//
// Runs the checking harness on six units: 8 inputs (3-bit locations, as in
// the 3-to-8 example) and 45 inputs (6-bit locations with 19 spare codes),
// each with the flat, tree and pair decoders. The gapless runs must take
// exactly W*L cycles of shifting plus one for the final flip; the runs with
// idle gaps and spare codes must still build every vector, and the core
// inputs must make exactly W transitions in every run.
module decomp_unit_tb;
  import vc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  localparam int NH = 6;
  logic done [NH];
  int ch [NH], fl [NH], w [NH], cyc [NH], tr [NH], sp [NH];
  localparam int LW [NH] = '{3, 3, 3, 6, 6, 6};
  localparam bit GAPPED [NH] = '{0, 1, 0, 0, 1, 1};

  always #5 clk = ~clk;

  decomp_harness #(.M(8),  .STYLE(DEC_FLAT), .NV(60))                         h0 (.clk, .rst_n, .start, .done(done[0]), .checks(ch[0]), .failures(fl[0]), .w_total(w[0]), .cycles(cyc[0]), .transitions(tr[0]), .spares(sp[0]));
  decomp_harness #(.M(8),  .STYLE(DEC_TREE), .NV(60), .GAPS(1))               h1 (.clk, .rst_n, .start, .done(done[1]), .checks(ch[1]), .failures(fl[1]), .w_total(w[1]), .cycles(cyc[1]), .transitions(tr[1]), .spares(sp[1]));
  decomp_harness #(.M(8),  .STYLE(DEC_PAIR), .NV(60))                         h2 (.clk, .rst_n, .start, .done(done[2]), .checks(ch[2]), .failures(fl[2]), .w_total(w[2]), .cycles(cyc[2]), .transitions(tr[2]), .spares(sp[2]));
  decomp_harness #(.M(45), .STYLE(DEC_FLAT), .NV(60), .MAXFLIP(5))            h3 (.clk, .rst_n, .start, .done(done[3]), .checks(ch[3]), .failures(fl[3]), .w_total(w[3]), .cycles(cyc[3]), .transitions(tr[3]), .spares(sp[3]));
  decomp_harness #(.M(45), .STYLE(DEC_TREE), .NV(60), .GAPS(1), .SPARE(1))    h4 (.clk, .rst_n, .start, .done(done[4]), .checks(ch[4]), .failures(fl[4]), .w_total(w[4]), .cycles(cyc[4]), .transitions(tr[4]), .spares(sp[4]));
  decomp_harness #(.M(45), .STYLE(DEC_PAIR), .NV(60), .GAPS(1), .SPARE(1))    h5 (.clk, .rst_n, .start, .done(done[5]), .checks(ch[5]), .failures(fl[5]), .w_total(w[5]), .cycles(cyc[5]), .transitions(tr[5]), .spares(sp[5]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    for (int i = 0; i < NH; i++) wait (done[i]);
    for (int i = 0; i < NH; i++) begin
      checks += ch[i];
      failures += fl[i];
      check(w[i] > 60, "test set has flips");
      check(tr[i] == w[i], $sformatf("unit %0d: core input transitions %0d equal flips %0d", i, tr[i], w[i]));
      if (!GAPPED[i])
        check(cyc[i] == w[i] * LW[i] + 1, $sformatf("unit %0d: %0d cycles for W=%0d", i, cyc[i], w[i]));
    end
    check(sp[4] > 0 && sp[5] > 0, "spare codes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
