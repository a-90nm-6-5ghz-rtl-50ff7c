// rf_bank: one bank of one array, 32 words x W bits, both read ports.
//
// Word w (0..31) of the bank lives on local bitline w/8 as cell w%8. For every
// bit and read port there are four LBLs of eight cells (rf_lbl); the
// column mux (rf_gbl_colmux) then puts the addressed LBL onto the bank's
// global bitline for that port and bit. A write sets the cells of the word
// whose WS is high to din.
//
// Interface (all selects are the registered ones of the access cycle):
//   ws      WS of the bank's 32 words       din   write data
//   rs      RS per read port and word       be    bank enable per read port
//   colsel  column select per port and LBL  lcp   precharge per port and LBL
//   gbl     GBL per read port and bit, valid combinationally in the cycle
// Assertions state the decoder's guarantees: at most one RS per LBL, no
// cell selected on an LBL that is being precharged, at most one column
// select, and no column select without the bank enable.
module rf_bank #(
  parameter int unsigned W = 32
) (
  input  logic               clk,
  input  logic [31:0]        ws,
  input  logic [W-1:0]       din,
  input  logic [1:0][31:0]   rs,
  input  logic [1:0][3:0]    colsel,
  input  logic [1:0][3:0]    lcp,
  input  logic [1:0]         be,
  output logic [1:0][W-1:0]  gbl
);

  // pd[w][i] : pull-downs of word w, bit i, one per read port
  logic [1:0] pd [32][W];

  for (genvar w = 0; w < 32; w++) begin : g_word
    for (genvar i = 0; i < W; i++) begin : g_bit
      rf_bitcell u_cell (
        .clk (clk),
        .ws  (ws[w]),
        .din (din[i]),
        .rs  ({rs[1][w], rs[0][w]}),
        .pd  (pd[w][i])
      );
    end
  end

  for (genvar p = 0; p < 2; p++) begin : g_port
    for (genvar i = 0; i < W; i++) begin : g_bit
      logic [3:0] lbl_out;
      for (genvar c = 0; c < 4; c++) begin : g_lbl
        logic [7:0] lbl_pd;
        logic       lbl;
        for (genvar k = 0; k < 8; k++) begin : g_cell
          assign lbl_pd[k] = pd[c*8+k][i][p];
        end
        rf_lbl u_lbl (
          .pd  (lbl_pd),
          .lcp (lcp[p][c]),
          .lbl (lbl),
          .out (lbl_out[c])
        );
      end
      rf_gbl_colmux u_colmux (
        .lbl_out (lbl_out),
        .colsel  (colsel[p]),
        .be      (be[p]),
        .gbl     (gbl[p][i])
      );
    end

    for (genvar c = 0; c < 4; c++) begin : g_chk
      a_rs_onehot : assert property (@(posedge clk) $onehot0(rs[p][c*8 +: 8]));
      a_no_contention : assert property (@(posedge clk) !(lcp[p][c] && |rs[p][c*8 +: 8]));
    end
    a_colsel_onehot : assert property (@(posedge clk) $onehot0(colsel[p]));
    a_colsel_be : assert property (@(posedge clk) (colsel[p] != '0) |-> be[p]);
  end

endmodule
