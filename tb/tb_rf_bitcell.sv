// tb_rf_bitcell: writes random bits through WS/Din, checks that a cell
// ignores Din while WS is low, and that each read port pulls its LBL low
// only when selected and holding 0.
module tb_rf_bitcell;
  logic clk = 1'b0;
  logic ws, din;
  logic [1:0] rs, pd;
  bit stored;
  int checks = 0, failures = 0;

  rf_bitcell dut (.clk(clk), .ws(ws), .din(din), .rs(rs), .pd(pd));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ws = 1'b1; din = 1'b0; rs = '0;
    @(posedge clk);
    stored = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      ws  = 1'($urandom);
      din = 1'($urandom);
      @(posedge clk);
      if (ws) stored = din;
      #1;
      for (int r = 0; r < 4; r++) begin
        rs = r[1:0];
        #1;
        for (int p = 0; p < 2; p++) begin
          checks++;
          if (pd[p] !== (rs[p] && !stored)) begin
            failures++;
            $display("FAIL n=%0d rs=%b stored=%0d pd=%b", n, rs, stored, pd);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
