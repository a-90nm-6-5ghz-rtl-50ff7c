// tb_rf_bank: one 32-word bank against a reference memory. Fills the bank,
// then for many cycles does a random write (or none) while both read ports
// read random words or are deselected. Reads see the contents from before
// the edge that ends the cycle; a deselected port's GBL reads all ones.
module tb_rf_bank;
  localparam int unsigned W = 32;
  logic clk = 1'b0;
  logic [31:0] ws;
  logic [W-1:0] din;
  logic [1:0][31:0] rs;
  logic [1:0][3:0] colsel, lcp;
  logic [1:0] be;
  logic [1:0][W-1:0] gbl;
  logic [W-1:0] model [32];
  int checks = 0, failures = 0;
  int deselected_reads = 0;

  rf_bank dut (.clk(clk), .ws(ws), .din(din), .rs(rs), .colsel(colsel),
                        .lcp(lcp), .be(be), .gbl(gbl));

  always #5 clk = ~clk;

  task automatic set_read(input int p, input bit en, input int w);
    rs[p] = en ? 32'(1 << w) : '0;
    colsel[p] = en ? 4'(1 << (w / 8)) : '0;
    lcp[p] = ~colsel[p];
    be[p] = en;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rw [2];
    bit ren [2];
    set_read(0, 0, 0);
    set_read(1, 0, 0);
    for (int w = 0; w < 32; w++) begin
      @(negedge clk);
      ws = 32'(1 << w);
      din = $urandom;
      model[w] = din;
    end
    for (int n = 0; n < 1500; n++) begin
      int ww;
      @(negedge clk);
      ww = $urandom_range(0, 31);
      ws = ($urandom_range(0, 3) != 0) ? 32'(1 << ww) : '0;
      din = $urandom;
      for (int p = 0; p < 2; p++) begin
        ren[p] = ($urandom_range(0, 7) != 0);
        rw[p] = $urandom_range(0, 31);
        set_read(p, ren[p], rw[p]);
      end
      #1;
      for (int p = 0; p < 2; p++) begin
        logic [W-1:0] expected;
        expected = ren[p] ? model[rw[p]] : '1;
        if (!ren[p]) deselected_reads++;
        checks++;
        if (gbl[p] !== expected) begin
          failures++;
          $display("FAIL n=%0d port %0d word %0d en=%0d got %h exp %h", n, p, rw[p], ren[p], gbl[p], expected);
        end
      end
      @(posedge clk);
      if (ws != 0) model[ww] = din;
    end
    checks++;
    if (deselected_reads == 0) begin
      failures++;
      $display("FAIL no deselected read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
