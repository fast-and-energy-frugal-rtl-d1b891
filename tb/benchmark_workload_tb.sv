// benchmark_workload_tb: the decompressor at the sizes of eleven benchmark
// circuits (ISCAS85 and full-scan ISCAS89), each with the total flip count
// that an ordered and padded test set needs for that circuit.
//
// For every circuit a flat-decoder unit with M core inputs receives a random
// correlated test set with exactly W flips spread over its vectors (at most
// one vector per flip). Checked per circuit: every vector is built correctly
// (cycle-by-cycle reference in decomp_harness); the location width is
// L = ceil(log2 M); the run takes W*L shift cycles plus one for the last flip;
// the core inputs make exactly W transitions; the encoded volume W*L and the
// speed-up N*M / (W*L) over serially loading the N vectors of the original
// test set equal the published figures (volumes for the five largest ISCAS89
// circuits; speed-ups to within one unit in the second decimal, as the published
// values mix rounding and truncation).
// The twelfth unit is one decompressor shared by s15805, s38417 and s38584:
// their 611 + 1664 + 1464 = 3739 inputs form one vector with 12-bit
// locations, and their test sets, applied one after another, need
// 1044 + 4811 + 2019 flips.
module benchmark_workload_tb;
  import vc_pkg::*;
  localparam int NC = 12;
  //                         c3540 c5315 c6288 c7552 s953 s5378 s9234 s13207 s15805 s38417 s38584 shared
  localparam int MI  [NC] = '{  50,  178,   32,  207,  45,  214,  247,   700,   611,  1664,  1464,  3739};
  localparam int NVEC[NC] = '{ 148,  119,   28,  211,  88,  254,  371,   473,   433,   882,   680,     0};
  localparam int CUBE[NC] = '{ 171,  199,   38,  324,  94,  296,  423,   524,   511,  1014,   808,  2333};
  localparam int WF  [NC] = '{ 403,  439,  130,  851, 118,  415,  344,   971,  1044,  4811,  2019,  7874};
  localparam int TAT [NC] = '{ 306,  603,  138,  641, 559, 1637, 3329,  3409,  2533,  2773,  4483,     0}; // x100
  localparam int VOL [NC] = '{   0,    0,    0,    0,   0,    0, 2752,  9710, 10440, 52921, 22209,     0};

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  logic done [NC];
  int ch [NC], fl [NC], w [NC], cyc [NC], tr [NC], sp [NC];

  always #5 clk = ~clk;

  for (genvar i = 0; i < NC; i++) begin : g_circ
    decomp_harness #(
      .M(MI[i]), .STYLE(DEC_FLAT),
      .NV((CUBE[i] < WF[i]) ? CUBE[i] : WF[i] / 2),
      .WTOTAL(WF[i])
    ) h (
      .clk, .rst_n, .start, .done(done[i]), .checks(ch[i]), .failures(fl[i]), .w_total(w[i]),
      .cycles(cyc[i]), .transitions(tr[i]), .spares(sp[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    for (int i = 0; i < NC; i++) wait (done[i]);
    for (int i = 0; i < NC; i++) begin
      int l, bits, tat100;
      l = $clog2(MI[i]);
      bits = w[i] * l;
      tat100 = (100 * longint'(NVEC[i]) * MI[i]) / bits;   // x100, truncated as published
      checks += ch[i];
      failures += fl[i];
      check(w[i] == WF[i], $sformatf("circuit %0d: W=%0d", i, w[i]));
      check(cyc[i] == bits + 1, $sformatf("circuit %0d: %0d cycles for %0d bits", i, cyc[i], bits));
      check(tr[i] == w[i], $sformatf("circuit %0d: %0d core input transitions", i, tr[i]));
      if (TAT[i] != 0) check(tat100 - TAT[i] <= 1 && TAT[i] - tat100 <= 1, $sformatf("circuit %0d: speed-up %0d/100", i, tat100));
      if (VOL[i] != 0) check(bits == VOL[i], $sformatf("circuit %0d: %0d encoded bits", i, bits));
      $display("M=%0d L=%0d W=%0d cycles=%0d serial=%0d speed-up=%0d.%02d",
               MI[i], l, w[i], cyc[i], NVEC[i] * MI[i], tat100 / 100, tat100 % 100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
