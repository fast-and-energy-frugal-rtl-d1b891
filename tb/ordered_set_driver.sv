// ordered_set_driver: applies a small ordered and padded test set to one
// 8-input test wrapper and checks the whole path from tdi to tdo.
//
// The test set is five 8-bit vectors in application order
//   00000000, 00001000, 01011000, 11111000, 11111010
// (bit 7 written first). They come from five ordered test cubes with
// don't-care bits (x), padded column by column so as to add no flips beyond
// those the specified bits force: an x takes the value of the nearest
// specified bit above it in its column, or below it if there is none above.
// The driver pads the cubes itself and checks that this gives the vectors. Consecutive vectors differ in 1, 2, 2 and 1 bits,
// so W = 6 flips, 18 bits of encoded data and 18 shift cycles, against 40
// for loading the five vectors serially. The first vector equals the reset
// state and needs no flips. The driver encodes the differing positions as
// 3-bit locations, LSB first, shifts them without gaps, and raises capture in
// the cycle after the flip that completes each vector, checking that the
// core inputs then hold that vector. The core is modelled by a fixed
// combinational function; a bitwise reference MISR gives the expected
// signature, which is then unloaded through tdo and compared. The changes at
// the core inputs are counted: there must be exactly six, against the
// transitions an 8-bit scan chain would see while the same five vectors are
// shifted in serially (computed here from a model of such a chain). It also counts
// the decoder enable pulses, their spacing, captures and unload cycles.
module ordered_set_driver (
  input  logic       clk,
  output logic       rst_n,
  output logic       shift_en,
  output logic       tdi,
  output logic       capture,
  output logic       unload,
  input  logic [7:0] core_in,
  output logic [7:0] core_out,
  input  logic       dec_en,
  input  logic [7:0] signature,
  input  logic       tdo,
  output logic       done,
  output int         checks,
  output int         failures,
  output int         n_flips,
  output int         n_captures,
  output int         n_unload,
  output int         n_period_ok,
  output int         flip_cycles
);
  localparam int NV = 5;
  localparam logic [7:0] VEC [NV] = '{8'b00000000, 8'b00001000, 8'b01011000,
                                      8'b11111000, 8'b11111010};

  // Core model: any fixed function of the inputs will do.
  function automatic logic [7:0] core_fn(input logic [7:0] x);
    return {x[6:0], x[7]} ^ {x[3:0], x[7:4]} ^ (x & 8'h3C) ^ 8'hA5;
  endfunction
  assign core_out = core_fn(core_in);

  // Reference MISR, x^8+x^4+x^3+x^2+1, written bit by bit.
  function automatic logic [7:0] misr_step(input logic [7:0] s, input logic [7:0] d);
    logic [7:0] n;
    n[0] = s[7] ^ d[0];
    n[1] = s[0] ^ d[1];
    n[2] = s[1] ^ d[2] ^ s[7];
    n[3] = s[2] ^ d[3] ^ s[7];
    n[4] = s[3] ^ d[4] ^ s[7];
    n[5] = s[4] ^ d[5];
    n[6] = s[5] ^ d[6];
    n[7] = s[6] ^ d[7];
    return n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam string CUBE [NV] = '{"x0000x0x", "0xx01x0x", "01x11xx0", "1x1xx000", "1xxx101x"};

  // Pad one column position of the ordered cubes; string index 0 is bit 7.
  function automatic logic [7:0] padded(input int k);
    logic [7:0] r;
    for (int c = 0; c < 8; c++) begin
      int j;
      byte ch = "x";
      for (j = k; j >= 0 && ch == "x"; j--) ch = CUBE[j][c];
      for (j = k + 1; j < NV && ch == "x"; j++) ch = CUBE[j][c];
      r[7-c] = (ch == "1");
    end
    return r;
  endfunction

  int cum [NV];           // flips needed to reach vector k
  bit stream [$];         // serial location bits
  logic [7:0] sig_ref;
  int next_cap, cyc, last_pulse, n_trans;

  task automatic step(input bit se, input bit b, input bit cap, input bit unl);
    bit en_before;
    logic [7:0] prev_in;
    @(negedge clk);
    shift_en = se; tdi = b; capture = cap; unload = unl;
    if (cap) begin
      check(core_in == VEC[next_cap], $sformatf("vector %0d at core inputs", next_cap));
      sig_ref = misr_step(sig_ref, core_fn(VEC[next_cap]));
      next_cap++;
      n_captures++;
    end
    if (unl) n_unload++;
    en_before = dec_en;
    prev_in = core_in;
    @(posedge clk);
    #1;
    if (rst_n) n_trans += $countones(core_in ^ prev_in);
    if (cyc >= 0) cyc++;
    if (en_before) begin
      n_flips++;
      if (last_pulse >= 0 && cyc - last_pulse == 3) n_period_ok++;
      last_pulse = cyc;
      if (n_flips == cum[NV-1]) flip_cycles = cyc;
    end
  endtask

  initial begin
    logic [7:0] shifted_out;
    bit cap_now;
    checks = 0; failures = 0; n_flips = 0; n_captures = 0; n_unload = 0;
    n_period_ok = 0; flip_cycles = 0; done = 0;
    rst_n = 0; shift_en = 0; tdi = 0; capture = 0; unload = 0;
    sig_ref = '0; next_cap = 0; cyc = -1; last_pulse = -1; n_trans = 0;
    for (int k = 0; k < NV; k++) check(padded(k) == VEC[k], $sformatf("padding of cube %0d", k));
    // encode the set: ascending positions of the differing bits
    cum[0] = 0;
    for (int k = 1; k < NV; k++) begin
      cum[k] = cum[k-1];
      for (int p = 0; p < 8; p++) begin
        if (VEC[k][p] != VEC[k-1][p]) begin
          for (int b = 0; b < 3; b++) stream.push_back(p[b]);
          cum[k]++;
        end
      end
    end
    check(cum[NV-1] == 6 && stream.size() == 18, "six flips, 18 encoded bits");
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // vector 0 is the reset state
    step(0, 0, 1, 0);
    cyc = 0;
    foreach (stream[i]) begin
      cap_now = (next_cap < NV) && (n_flips == cum[next_cap]);
      step(1, stream[i], cap_now, 0);
    end
    repeat (4) begin
      cap_now = (next_cap < NV) && (n_flips == cum[next_cap]);
      step(0, 0, cap_now, 0);
    end
    check(n_captures == NV, "every vector captured");
    check(n_flips == 6, "six decoder enable pulses");
    check(flip_cycles == 6 * 3 + 1, $sformatf("last flip after %0d cycles", flip_cycles));
    check(signature == sig_ref, "signature");
    begin
      // transitions in a plain 8-bit scan chain loading the same vectors
      logic [7:0] chain, nxt;
      int serial_trans;
      chain = '0;
      serial_trans = 0;
      for (int k = 0; k < NV; k++) begin
        for (int b = 0; b < 8; b++) begin
          nxt = {chain[6:0], VEC[k][7-b]};
          serial_trans += $countones(nxt ^ chain);
          chain = nxt;
        end
        check(chain == VEC[k], "scan chain model");
      end
      check(n_trans == 6, $sformatf("%0d transitions at the core inputs", n_trans));
      check(serial_trans > n_trans, "fewer transitions than serial loading");
      $display("core input transitions: %0d (serial scan loading: %0d)", n_trans, serial_trans);
    end
    for (int b = 7; b >= 0; b--) begin
      shifted_out[b] = tdo;
      step(0, 0, 0, 1);
    end
    check(shifted_out == sig_ref, "signature unloaded through tdo");
    done = 1;
  end
endmodule
