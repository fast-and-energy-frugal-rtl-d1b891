// vc_test_top: test wrapper for one core using bit-flip location encoding.
//
// The core's M inputs are driven by the decompression unit, which updates the
// test vector in place from a serial stream of bit-flip locations on tdi; the
// core's N_OUT outputs are compacted by a MISR whose MSB drives tdo. The core
// itself is outside: its inputs are the core_in output port and its outputs
// come back on core_out. Several cores may share one unit by concatenating
// their inputs into one M-bit core_in.
//
// Interface (all on the rising edge of tck, asynchronous active-low trst_n):
//   shift_en  tdi carries a location bit (L = ceil(log2 M) bits per location,
//             LSB first, in back-to-back groups)
//   dec_en    high in the cycle a location is applied; core_in changes at its end
//   capture   fold core_out into the signature this cycle; the tester raises
//             it once a test vector is complete and the core has settled
//   unload    shift the signature out on tdo, MSB first
// The decompressor and MISR arrangement follow the scheme; the capture and
// unload controls, which the tester derives from its own knowledge of where
// each vector ends, are this design's choice.
module vc_test_top
  import vc_pkg::*;
#(
  parameter int unsigned      M      = 8,
  parameter int unsigned      N_OUT  = 8,
  parameter dec_style_e       STYLE  = DEC_FLAT,
  parameter logic [N_OUT-1:0] POLY   = N_OUT'('h1D),
  localparam int unsigned     L      = code_width(M)
) (
  input  logic             tck,
  input  logic             trst_n,
  input  logic             shift_en,
  input  logic             tdi,
  input  logic             capture,
  input  logic             unload,
  output logic [M-1:0]     core_in,
  input  logic [N_OUT-1:0] core_out,
  output logic             dec_en,
  output logic [N_OUT-1:0] signature,
  output logic             tdo
);

  logic [L-1:0] code;
  logic [((L <= 2) ? 1 : $clog2(L))-1:0] phase;

  decomp_unit #(.M(M), .L(L), .STYLE(STYLE)) u_decomp (
    .clk      (tck),
    .rst_n    (trst_n),
    .shift_en (shift_en),
    .tdi      (tdi),
    .vec      (core_in),
    .dec_en   (dec_en),
    .code     (code),
    .phase    (phase)
  );

  misr #(.N(N_OUT), .POLY(POLY)) u_misr (
    .clk     (tck),
    .rst_n   (trst_n),
    .capture (capture),
    .unload  (unload),
    .d       (core_out),
    .sig     (signature),
    .tdo     (tdo)
  );

endmodule
