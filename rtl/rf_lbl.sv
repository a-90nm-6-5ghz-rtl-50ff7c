// rf_lbl: local bitline of one read port, 8 cells.
//
// The 8 cells' pass transistors share the bitline. It rests high, held by a
// PMOS keeper fed back from the output; a selected cell holding 0 pulls it
// low (wired, so the line is low if any cell pulls). An inverting gain stage
// restores it to full swing as OUT. When this LBL is not being read, the
// conditional precharge lcp switches on a PMOS sustainer that anchors the
// line firmly high against leakage; in that state it is modelled as
// overriding any cell, though the decoder never selects a cell on a
// precharged LBL.
//
// Structure after the published LBL scheme; two-state modelling of the
// keeper and sustainer is this design's. Purely combinational.
module rf_lbl (
  input  logic [7:0] pd,
  input  logic       lcp,
  output logic       lbl,
  output logic       out
);

  assign lbl = lcp | ~(|pd);
  assign out = ~lbl;

endmodule
