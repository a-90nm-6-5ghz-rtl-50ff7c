// tb_rf_split_decoder: exhaustive check of one port's split decoder.
// For all 256 addresses, enabled and disabled: exactly the addressed word
// select, the bank enable AD<7:5>, the LBL column select AD<7:3> (bank*4 +
// AD<4:3>), precharge on every other LBL, and the bank number.
module tb_rf_split_decoder;
  import rf_pkg::*;
  logic clk = 1'b0;
  logic en;
  logic [7:0] ad;
  port_sel_t sel;
  int checks = 0, failures = 0;

  rf_split_decoder dut (.en(en), .ad(ad), .sel(sel));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s en=%0d ad=%0d", what, en, ad);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 256; a++) begin
        en = e[0];
        ad = a[7:0];
        @(posedge clk);
        #1;
        for (int w = 0; w < 256; w++)
          check(sel.sel[w] === (e == 1 && w == a), "word select");
        for (int b = 0; b < 8; b++)
          check(sel.be[b] === (e == 1 && b == a / 32), "bank enable");
        for (int l = 0; l < 32; l++) begin
          check(sel.colsel[l] === (e == 1 && l == a / 8), "column select");
          check(sel.lcp[l] === !(e == 1 && l == a / 8), "precharge");
        end
        check(sel.bank === 3'(a / 32), "bank number");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
