// rf_gbl_mux: static merge of the 8 bank GBLs into one data bit.
//
// Two static mux stages: a 4:1 over GBL0-3 and a 4:1 over GBL4-7, steered
// by bank bits AD<6:5>, then a 2:1 steered by AD<7>. The mux tree follows the
// published GBL scheme; which address bits steer it is this design's choice.
// Purely combinational, uses the registered bank number of the access cycle.
module rf_gbl_mux (
  input  logic [7:0] gbl,
  input  logic [2:0] bank,
  output logic       d
);

  logic lo, hi;

  assign lo = gbl[{1'b0, bank[1:0]}];
  assign hi = gbl[{1'b1, bank[1:0]}];
  assign d  = bank[2] ? hi : lo;

endmodule
