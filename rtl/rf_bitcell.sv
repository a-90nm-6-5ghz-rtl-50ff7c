// rf_bitcell: 2-read, 1-write register file cell.
//
// One storage node with a single-ended write path and two single-ended read
// ports, one on each side of the storage node so that both sides see the same
// load. Write: while WS is high the cell takes Din (here at the clock edge
// that ends the access cycle, the storage node being modelled as a
// flip-flop). Read: when RS<p> is high, the port's pass transistor connects
// the cell's read buffer to LBL<p>; a cell holding 0 pulls the precharged
// LBL low, a cell holding 1 leaves it high, so the LBL carries the stored
// value. pd[p] is that pull-down.
//
// The port structure follows the published cell; the clocked storage and the
// read polarity are this design's choices.
module rf_bitcell (
  input  logic       clk,
  input  logic       ws,
  input  logic       din,
  input  logic [1:0] rs,
  output logic [1:0] pd
);

  logic q;

  always_ff @(posedge clk) begin
    if (ws) q <= din;
  end

  assign pd = rs & {2{~q}};

endmodule
