// rf_dec_5to32: second level of the split decoder, one per bank.
//
// When its bank enable BE is high, decodes AD<4:0> into one of the bank's 32
// word selects (RS or WS) and one of its 4 column selects. Word AD<4:0> sits
// on local bitline AD<4:3> as cell AD<2:0>, so the column select is the
// decode of AD<4:3>. With BE low every output is low.
//
// The 3:8 / 5:32 split follows the published decoder; the bit assignment of
// the column select is inferred from the bank organisation (4 LBLs of 8
// cells per bank). Purely combinational, decode cycle.
module rf_dec_5to32 (
  input  logic        be,
  input  logic [4:0]  ad_lo,
  output logic [31:0] sel,
  output logic [3:0]  colsel
);

  always_comb begin
    sel    = '0;
    colsel = '0;
    if (be) begin
      sel[ad_lo]         = 1'b1;
      colsel[ad_lo[4:3]] = 1'b1;
    end
  end

endmodule
