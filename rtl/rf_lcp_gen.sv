// rf_lcp_gen: conditional precharge generator for the 4 LBLs of one bank.
//
// Every local bitline that will not be read in the coming access has its
// PMOS sustainer switched on so that it is anchored firmly high instead of
// being held only by its weak keeper; only the LBL addressed by BE and
// AD<4:3> is left free for its cell to drive. lcp[k] = 1 means "hold LBL k
// high". The published circuit drives PMOS gates, so its physical signal is
// the active-low form of this one; the polarity here is this design's own.
//
// Purely combinational, decode cycle; it is registered alongside RS so the
// sustainers release no later than the cell is selected.
module rf_lcp_gen (
  input  logic       be,
  input  logic [1:0] ad_col,
  output logic [3:0] lcp
);

  always_comb begin
    lcp = '1;
    if (be) lcp[ad_col] = 1'b0;
  end

endmodule
