// tb_rf_gbl_mux: exhaustive check that the two static mux stages pass the
// GBL of the addressed bank.
module tb_rf_gbl_mux;
  logic clk = 1'b0;
  logic [7:0] gbl;
  logic [2:0] bank;
  logic d;
  int checks = 0, failures = 0;

  rf_gbl_mux dut (.gbl(gbl), .bank(bank), .d(d));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 8; b++) begin
      for (int v = 0; v < 256; v++) begin
        gbl = v[7:0];
        bank = b[2:0];
        @(posedge clk);
        #1;
        checks++;
        if (d !== ((v >> b) & 1)) begin
          failures++;
          $display("FAIL bank=%0d gbl=%b d=%b", b, gbl, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
