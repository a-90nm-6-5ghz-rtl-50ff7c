// rf_gbl_colmux: 4-way column mux onto the global bitline of one bank.
//
// Each of the bank's four LBL outputs reaches the bank's GBL through a
// clocked-CMOS (C2MOS) inverter enabled by its column select and its
// complement; only the selected one drives, inverting OUT back to the stored
// value. A keeper holds the GBL, and while the bank enable BE is low a PMOS
// sustainer anchors it high, so a deselected bank always presents 1. With
// the bank enabled but no column selected the GBL is taken to sit at that
// same precharged level.
//
// Structure after the published GBL scheme; the two-state resolution of
// idle cases is this design's. Purely combinational.
module rf_gbl_colmux (
  input  logic [3:0] lbl_out,
  input  logic [3:0] colsel,
  input  logic       be,
  output logic       gbl
);

  always_comb begin
    gbl = 1'b1;
    if (be) begin
      for (int k = 0; k < 4; k++) begin
        if (colsel[k]) gbl = ~lbl_out[k];
      end
    end
  end

endmodule
