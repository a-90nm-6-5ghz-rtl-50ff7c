// rf_sel_driver: read/write select drivers of one port.
//
// Addresses are decoded one cycle ahead of the array access. This stage
// captures the split decoder's outputs (BE, RS/WS, column selects, LCP and the
// bank number) at the clock edge that ends the decode cycle and drives them
// into both arrays for the whole access cycle. In the published circuit these
// drivers run from the lower 0.9 V supply; supply voltage is not modelled.
//
// Reset (asynchronous, active low; this design's own choice) clears every
// select, which leaves all bitlines deselected and precharged.
module rf_sel_driver
  import rf_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  port_sel_t d,
  output port_sel_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // idle: nothing selected, every LBL held high
      q <= '{bank: '0, be: '0, sel: '0, colsel: '0, lcp: '1};
    end else begin
      q <= d;
    end
  end

endmodule
