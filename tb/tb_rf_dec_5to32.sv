// tb_rf_dec_5to32: exhaustive check of the per-bank 5:32 decoder.
// For every bank enable and AD<4:0>, the word select must be one-hot at the
// address and the column select one-hot at AD<4:3>, both only when enabled.
module tb_rf_dec_5to32;
  logic clk = 1'b0;
  logic be;
  logic [4:0] ad_lo;
  logic [31:0] sel;
  logic [3:0] colsel;
  int checks = 0, failures = 0;

  rf_dec_5to32 dut (.be(be), .ad_lo(ad_lo), .sel(sel), .colsel(colsel));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 32; a++) begin
        be = e[0];
        ad_lo = a[4:0];
        @(posedge clk);
        #1;
        for (int w = 0; w < 32; w++) begin
          checks++;
          if (sel[w] !== (e == 1 && w == a)) begin
            failures++;
            $display("FAIL sel be=%0d ad=%0d w=%0d", e, a, w);
          end
        end
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (colsel[c] !== (e == 1 && c == a / 8)) begin
            failures++;
            $display("FAIL colsel be=%0d ad=%0d c=%0d", e, a, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
