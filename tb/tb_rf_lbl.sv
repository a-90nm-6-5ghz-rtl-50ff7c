// tb_rf_lbl: exhaustive check of the local bitline: the line is low only
// when some cell pulls it and the sustainer is off, and OUT is its inverse.
module tb_rf_lbl;
  logic clk = 1'b0;
  logic [7:0] pd;
  logic lcp, lbl, out;
  int checks = 0, failures = 0;
  int precharged = 0;

  rf_lbl dut (.pd(pd), .lcp(lcp), .lbl(lbl), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 2; l++) begin
      for (int v = 0; v < 256; v++) begin
        bit exp_lbl;
        lcp = l[0];
        pd = v[7:0];
        @(posedge clk);
        #1;
        exp_lbl = (l == 1) || (v == 0);
        if (l == 1 && v != 0 && lbl) precharged++;
        checks += 2;
        if (lbl !== exp_lbl) begin
          failures++;
          $display("FAIL lbl lcp=%0d pd=%b lbl=%b", l, v, lbl);
        end
        if (out !== !exp_lbl) begin
          failures++;
          $display("FAIL out lcp=%0d pd=%b out=%b", l, v, out);
        end
      end
    end
    checks++;
    if (precharged == 0) begin
      failures++;
      $display("FAIL sustainer never held the line high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
