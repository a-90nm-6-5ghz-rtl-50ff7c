// rf_pkg: constants and the select bundle shared by the register file.
//
// The register file holds 256 words of 64 bits in two 256x32 arrays. Each
// array is split into 8 banks of 32 words; each bank has 4 local bitlines
// (LBLs) per bit and read port, with 8 cells on each LBL. An 8-bit address
// AD<7:0> therefore splits into the bank AD<7:5>, the LBL (column) AD<4:3>
// and the cell on that LBL AD<2:0>. These numbers are the published
// organisation; the address split is inferred from it.
//
// port_sel_t is everything one port's split decoder hands to the arrays:
// bank enables BE, word selects RS/WS, column selects, conditional precharge
// requests LCP (1 = hold that LBL high) and the bank number that steers the
// global bitline muxes.
package rf_pkg;

  localparam int unsigned NUM_WORDS      = 256;
  localparam int unsigned ADDR_W         = 8;
  localparam int unsigned NUM_BANKS      = 8;
  localparam int unsigned BANK_W         = 3;
  localparam int unsigned WORDS_PER_BANK = 32;
  localparam int unsigned LBLS_PER_BANK  = 4;
  localparam int unsigned CELLS_PER_LBL  = 8;
  localparam int unsigned NUM_LBLS       = NUM_BANKS * LBLS_PER_BANK;  // 32
  localparam int unsigned NUM_RD_PORTS   = 2;

  typedef struct packed {
    logic [BANK_W-1:0]    bank;    // registered AD<7:5>, steers the GBL muxes
    logic [NUM_BANKS-1:0] be;      // BE<7:0>
    logic [NUM_WORDS-1:0] sel;     // RS<255:0> or WS<255:0>
    logic [NUM_LBLS-1:0]  colsel;  // Column Sel<31:0>
    logic [NUM_LBLS-1:0]  lcp;     // LCP<31:0>, 1 = sustainer holds LBL high
  } port_sel_t;

endpackage
