// rf_split_decoder: two-level split decoder of one register file port.
//
// A 3:8 first level turns AD<7:5> into the bank enables BE<7:0>. Eight 5:32
// second-level decoders, each enabled by its BE, turn AD<4:0> into the word
// selects RS/WS<255:0> (32 per bank) and the column selects <31:0> (4 per
// bank). Eight conditional-precharge generators turn BE and AD<4:3> into
// LCP<31:0>. Only the addressed bank's second-level decoder switches, which
// is the point of the split. The structure follows the published design;
// the port enable and the active-high LCP are this design's own.
//
// Interface: en and ad in, one rf_pkg::port_sel_t out. Purely combinational:
// it runs in the decode cycle and its output is registered by rf_sel_driver.
module rf_split_decoder
  import rf_pkg::*;
(
  input  logic              en,
  input  logic [ADDR_W-1:0] ad,
  output port_sel_t         sel
);

  logic [NUM_BANKS-1:0] be;

  rf_predec_3to8 u_predec (
    .en    (en),
    .ad_hi (ad[7:5]),
    .be    (be)
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    rf_dec_5to32 u_dec (
      .be     (be[b]),
      .ad_lo  (ad[4:0]),
      .sel    (sel.sel[b*WORDS_PER_BANK +: WORDS_PER_BANK]),
      .colsel (sel.colsel[b*LBLS_PER_BANK +: LBLS_PER_BANK])
    );
    rf_lcp_gen u_lcp (
      .be     (be[b]),
      .ad_col (ad[4:3]),
      .lcp    (sel.lcp[b*LBLS_PER_BANK +: LBLS_PER_BANK])
    );
  end

  assign sel.be   = be;
  assign sel.bank = ad[7:5];

endmodule
