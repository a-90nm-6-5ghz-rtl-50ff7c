// tb_rf_gbl_colmux: every LBL output pattern with every one-hot or empty
// column select, bank enabled and disabled. A disabled bank, or no column
// selected, gives 1; otherwise the GBL is the inverse of the chosen OUT.
module tb_rf_gbl_colmux;
  logic clk = 1'b0;
  logic [3:0] lbl_out, colsel;
  logic be, gbl;
  int checks = 0, failures = 0;

  rf_gbl_colmux dut (.lbl_out(lbl_out), .colsel(colsel), .be(be), .gbl(gbl));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int c = -1; c < 4; c++) begin
        for (int v = 0; v < 16; v++) begin
          bit expected;
          be = e[0];
          lbl_out = v[3:0];
          colsel = (c < 0) ? 4'b0 : 4'(1 << c);
          @(posedge clk);
          #1;
          expected = (e == 0 || c < 0) ? 1'b1 : !v[c];
          checks++;
          if (gbl !== expected) begin
            failures++;
            $display("FAIL be=%0d colsel=%b out=%b gbl=%b", e, colsel, lbl_out, gbl);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
