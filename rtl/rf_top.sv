// rf_top: 256-word x 64-bit register file, two read ports and one write port.
//
// Three split decoders (read port 0, read port 1, write) sit between the two
// 256x32 arrays, which hold bits 63:32 and 31:0 of every word. A port's
// address is decoded in the cycle before its access; rf_sel_driver registers
// the decoded selects at the edge that ends that cycle and drives them into
// both arrays during the access cycle.
//
// Timing: present rd_en/rd_addr (or wr_en/wr_addr/wr_data) in cycle N.
// rd_data shows the word during cycle N+1 (sample it at the edge ending
// N+1). A write presented in cycle N lands at the edge ending N+1, so a read
// presented in cycle N+1 or later sees it, and a read presented together
// with it sees the old word. A disabled read port returns all ones, the
// precharged bitline level. One read per port and one write per cycle.
//
// The organisation and the decode-ahead timing follow the published design;
// the enables, the write-data register and the reset are this design's own.
module rf_top
  import rf_pkg::*;
#(
  parameter int unsigned WORD_W = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NUM_RD_PORTS-1:0]       rd_en,
  input  logic [NUM_RD_PORTS-1:0][ADDR_W-1:0] rd_addr,
  output logic [NUM_RD_PORTS-1:0][WORD_W-1:0] rd_data,
  input  logic                          wr_en,
  input  logic [ADDR_W-1:0]             wr_addr,
  input  logic [WORD_W-1:0]             wr_data
);

  localparam int unsigned HALF_W = WORD_W / 2;

  port_sel_t [1:0] rd_dec, rd_drv;
  port_sel_t       wr_dec, wr_drv;
  logic [WORD_W-1:0] din_q;

  for (genvar p = 0; p < 2; p++) begin : g_rd
    rf_split_decoder u_dec (
      .en  (rd_en[p]),
      .ad  (rd_addr[p]),
      .sel (rd_dec[p])
    );
    rf_sel_driver u_drv (
      .clk   (clk),
      .rst_n (rst_n),
      .d     (rd_dec[p]),
      .q     (rd_drv[p])
    );
  end

  rf_split_decoder u_wr_dec (
    .en  (wr_en),
    .ad  (wr_addr),
    .sel (wr_dec)
  );
  rf_sel_driver u_wr_drv (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (wr_dec),
    .q     (wr_drv)
  );

  always_ff @(posedge clk) begin
    din_q <= wr_data;
  end

  logic [1:0][HALF_W-1:0] dout_hi, dout_lo;

  rf_array #(.W(HALF_W)) u_array_hi (
    .clk    (clk),
    .rd_sel (rd_drv),
    .wr_sel (wr_drv),
    .din    (din_q[WORD_W-1:HALF_W]),
    .dout   (dout_hi)
  );

  rf_array #(.W(HALF_W)) u_array_lo (
    .clk    (clk),
    .rd_sel (rd_drv),
    .wr_sel (wr_drv),
    .din    (din_q[HALF_W-1:0]),
    .dout   (dout_lo)
  );

  for (genvar p = 0; p < 2; p++) begin : g_out
    assign rd_data[p] = {dout_hi[p], dout_lo[p]};
  end

endmodule
