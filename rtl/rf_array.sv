// rf_array: one 256 x W array (W = 32: one half of the 64-bit word).
//
// Eight rf_bank instances of 32 words each. Bank b takes RS/WS<32b+31:32b>,
// column selects and LCP <4b+3:4b> and BE<b> of each port. Per read port and
// bit, rf_gbl_mux merges the eight bank GBLs into the data bit using the
// registered bank number. The two arrays of the register file are driven by
// the same selects from the central decoders.
//
// Timing: selects and din are the registered values of the access cycle;
// dout is combinational within that cycle; writes land at the edge ending it.
module rf_array
  import rf_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  port_sel_t [1:0]     rd_sel,
  input  port_sel_t           wr_sel,
  input  logic [W-1:0]        din,
  output logic [1:0][W-1:0]   dout
);

  logic [1:0][W-1:0] gbl [NUM_BANKS];

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic [1:0][31:0] rs;
    logic [1:0][3:0]  colsel;
    logic [1:0][3:0]  lcp;
    logic [1:0]       be;
    for (genvar p = 0; p < 2; p++) begin : g_port
      assign rs[p]     = rd_sel[p].sel[b*WORDS_PER_BANK +: WORDS_PER_BANK];
      assign colsel[p] = rd_sel[p].colsel[b*LBLS_PER_BANK +: LBLS_PER_BANK];
      assign lcp[p]    = rd_sel[p].lcp[b*LBLS_PER_BANK +: LBLS_PER_BANK];
      assign be[p]     = rd_sel[p].be[b];
    end
    rf_bank #(.W(W)) u_bank (
      .clk    (clk),
      .ws     (wr_sel.sel[b*WORDS_PER_BANK +: WORDS_PER_BANK]),
      .din    (din),
      .rs     (rs),
      .colsel (colsel),
      .lcp    (lcp),
      .be     (be),
      .gbl    (gbl[b])
    );
  end

  for (genvar p = 0; p < 2; p++) begin : g_port
    for (genvar i = 0; i < W; i++) begin : g_bit
      logic [7:0] gbl_bit;
      for (genvar b = 0; b < NUM_BANKS; b++) begin : g_b
        assign gbl_bit[b] = gbl[b][p][i];
      end
      rf_gbl_mux u_mux (
        .gbl  (gbl_bit),
        .bank (rd_sel[p].bank),
        .d    (dout[p][i])
      );
    end
  end

endmodule
