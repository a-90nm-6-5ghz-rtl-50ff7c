// tb_rf_predec_3to8: exhaustive check of the 3:8 bank-enable predecoder.
// Every enable/address pair is applied; BE must be one-hot at the address
// when enabled and all zero otherwise.
module tb_rf_predec_3to8;
  logic clk = 1'b0;
  logic en;
  logic [2:0] ad_hi;
  logic [7:0] be;
  int checks = 0, failures = 0;

  rf_predec_3to8 dut (.en(en), .ad_hi(ad_hi), .be(be));

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
      for (int a = 0; a < 8; a++) begin
        en = e[0];
        ad_hi = a[2:0];
        @(posedge clk);
        #1;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (be[k] !== (e == 1 && k == a)) begin
            failures++;
            $display("FAIL en=%0d ad=%0d be=%b", e, a, be);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
