// decomp_harness: drives one decompression unit with a random, correlated
// test set and checks it cycle by cycle. Used by the decompressor and
// workload testbenches.
//
// The harness makes NV test vectors, each differing from the previous one in
// 1..MAXFLIP random bits (the first built from the all-zero reset state),
// encodes every differing bit position as an L-bit location, least
// significant bit first, and sends the locations on tdi. With GAPS set it
// inserts random idle cycles between locations, and with SPARE set (only
// useful when M is not a power of two) it also sends unused codes, which must
// change nothing. A queue of sent locations gives the expected vector: in
// every cycle in which the unit shows dec_en, the oldest complete location is
// taken from the queue and that bit of the reference is inverted. Every cycle
// the core inputs must equal the reference; after each vector they must
// equal the intended test vector. The harness also reports the total number
// of flips W, the cycles from the first shift to the last flip, and the
// transitions seen at the core inputs.
module decomp_harness
  import vc_pkg::*;
#(
  parameter int unsigned M       = 8,
  parameter dec_style_e  STYLE   = DEC_FLAT,
  parameter int unsigned NV      = 50,
  parameter int unsigned MAXFLIP = 3,
  parameter int unsigned WTOTAL  = 0,   // if nonzero: send exactly this many flips (needs WTOTAL >= NV)
  parameter bit          GAPS    = 1'b0,
  parameter bit          SPARE   = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   w_total,
  output int   cycles,
  output int   transitions,
  output int   spares
);
  localparam int unsigned L = code_width(M);

  logic          shift_en, tdi, dec_en;
  logic [M-1:0]  vec, model, target, vec_prev;
  logic [L-1:0]  code;
  logic [((L <= 2) ? 1 : $clog2(L))-1:0] phase;
  int unsigned   sent_q [$];   // locations whose last bit has been shifted
  int unsigned   flips_done;
  bit            frozen;

  decomp_unit #(.M(M), .STYLE(STYLE)) dut (
    .clk, .rst_n, .shift_en, .tdi, .vec, .dec_en, .code, .phase
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d style=%0d %s at %0t", M, STYLE, what, $time);
    end
  endtask

  // One clock: present a bit (or idle), advance, update the reference.
  task automatic clock_step(input bit en, input bit b, input bit last_of_loc, input int unsigned loc);
    bit en_before;
    @(negedge clk);
    shift_en = en;
    tdi = b;
    en_before = dec_en;
    vec_prev = vec;
    @(posedge clk);
    #1;
    if (en_before) begin
      int unsigned l;
      check(sent_q.size() > 0, "enable with no complete location");
      if (sent_q.size() > 0) begin
        l = sent_q.pop_front();
        if (l < M) begin
          model[l] = ~model[l];
          flips_done++;
        end
      end
    end
    if (en && last_of_loc) sent_q.push_back(loc);
    if (cycles >= 0 && !frozen) cycles++;
    transitions += $countones(vec ^ vec_prev);
    check(vec == model, "core inputs equal reference");
  endtask

  task automatic send_loc(input int unsigned loc);
    for (int unsigned k = 0; k < L; k++) begin
      clock_step(1'b1, loc[k], k == L - 1, loc);
      if (cycles < 0) cycles = 1;   // count from the first shift edge
    end
    if (GAPS && $urandom_range(0, 3) == 0) begin
      repeat ($urandom_range(1, 3)) clock_step(1'b0, 1'b0, 1'b0, 0);
    end
  endtask

  initial begin
    int unsigned budget, nflip, pos, rem;
    logic [M-1:0] want;
    done = 0; checks = 0; failures = 0; w_total = 0; cycles = -1;
    transitions = 0; spares = 0; flips_done = 0; frozen = 0;
    shift_en = 0; tdi = 0; model = '0; target = '0;
    wait (start);
    budget = WTOTAL;
    for (int v = 0; v < NV; v++) begin
      // next vector: flip 1..MAXFLIP distinct positions (or the remaining budget)
      if (WTOTAL != 0) begin
        // spread the remaining budget evenly, with a little jitter
        rem = NV - v;
        nflip = budget / rem + $urandom_range(0, 1);
        if (nflip < 1) nflip = 1;
        if (nflip + (rem - 1) > budget) nflip = budget - (rem - 1);
        if (v == NV - 1) nflip = budget;
        if (nflip > M) nflip = M;
        budget -= nflip;
      end else begin
        nflip = $urandom_range(1, MAXFLIP);
      end
      want = target;
      for (int unsigned f = 0; f < nflip; f++) begin
        do pos = $urandom_range(0, M - 1); while (want[pos] != target[pos]);
        want[pos] = ~want[pos];
      end
      for (int unsigned p = 0; p < M; p++) begin
        if (want[p] != target[p]) begin
          send_loc(p);
          w_total++;
          if (SPARE && (2 ** L > M) && $urandom_range(0, 7) == 0) begin
            send_loc($urandom_range(M, 2 ** L - 1));
            spares++;
          end
        end
      end
      target = want;
    end
    // drain: the last location is applied in the cycle after its last bit
    clock_step(1'b0, 1'b0, 1'b0, 0);
    check(sent_q.size() == 0, "all locations applied");
    check(vec == target, "final test vector");
    check(flips_done == w_total, "one flip per location");
    frozen = 1;
    repeat (2) clock_step(1'b0, 1'b0, 1'b0, 0);
    check(vec == target, "vector holds when idle");
    done = 1;
  end
endmodule
