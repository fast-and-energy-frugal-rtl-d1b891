// dec1x2: 1-to-2 decoder with enable, the cell of the tree decoder.
//
// y0 is high when en is high and d is 0; y1 when en is high and d is 1.
// Purely combinational.
module dec1x2 (
  input  logic en,
  input  logic d,
  output logic y0,
  output logic y1
);

  assign y0 = en & ~d;
  assign y1 = en &  d;

endmodule
