// tb_rf_lcp_gen: exhaustive check of the conditional precharge generator.
// Every LBL is held high except the one addressed in an enabled bank.
module tb_rf_lcp_gen;
  logic clk = 1'b0;
  logic be;
  logic [1:0] ad_col;
  logic [3:0] lcp;
  int checks = 0, failures = 0;

  rf_lcp_gen dut (.be(be), .ad_col(ad_col), .lcp(lcp));

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
      for (int a = 0; a < 4; a++) begin
        be = e[0];
        ad_col = a[1:0];
        @(posedge clk);
        #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (lcp[k] !== !(e == 1 && k == a)) begin
            failures++;
            $display("FAIL be=%0d ad=%0d lcp=%b", e, a, lcp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
