// rf_predec_3to8: first level of the split decoder.
//
// Decodes the bank field AD<7:5> of one port's address into the one-hot bank
// enables BE<7:0>. In the published design these enables do double duty: they
// enable one of the eight second-level 5:32 decoders and, as the GBL
// conditional precharge, keep the global bitlines of the seven unselected
// banks anchored high. The enable input (all BE low when the port is idle)
// is this design's own addition.
//
// Purely combinational; it works in the decode cycle, one cycle before the
// array access.
module rf_predec_3to8 (
  input  logic       en,
  input  logic [2:0] ad_hi,
  output logic [7:0] be
);

  always_comb begin
    be = '0;
    if (en) be[ad_hi] = 1'b1;
  end

endmodule
