// tb_rf_array: one 256x32 array against a reference memory. The selects are
// built here directly from the address (word select bit a, bank enable a/32,
// LBL a/8, precharge on every other LBL, bank number a/32), not by the
// decoder. Fills the array, then random writes and two random reads per
// cycle; also checks the all-ones output of a deselected port.
module tb_rf_array;
  import rf_pkg::*;
  localparam int unsigned W = 32;
  logic clk = 1'b0;
  port_sel_t [1:0] rd_sel;
  port_sel_t wr_sel;
  logic [W-1:0] din;
  logic [1:0][W-1:0] dout;
  logic [W-1:0] model [256];
  int checks = 0, failures = 0;
  int banks_read [8];

  rf_array dut (.clk(clk), .rd_sel(rd_sel), .wr_sel(wr_sel), .din(din), .dout(dout));

  always #5 clk = ~clk;

  function automatic port_sel_t make_sel(input bit en, input int a);
    port_sel_t s;
    s = '0;
    s.lcp = '1;
    s.bank = 3'(a / 32);
    if (en) begin
      s.sel[a] = 1'b1;
      s.be[a / 32] = 1'b1;
      s.colsel[a / 8] = 1'b1;
      s.lcp[a / 8] = 1'b0;
    end
    return s;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ra [2];
    bit ren [2];
    rd_sel[0] = make_sel(0, 0);
    rd_sel[1] = make_sel(0, 0);
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      wr_sel = make_sel(1, a);
      din = $urandom;
      model[a] = din;
    end
    for (int n = 0; n < 3000; n++) begin
      int wa;
      bit wen;
      @(negedge clk);
      wa = $urandom_range(0, 255);
      wen = ($urandom_range(0, 3) != 0);
      wr_sel = make_sel(wen, wa);
      din = $urandom;
      for (int p = 0; p < 2; p++) begin
        ren[p] = ($urandom_range(0, 7) != 0);
        ra[p] = $urandom_range(0, 255);
        rd_sel[p] = make_sel(ren[p], ra[p]);
      end
      #1;
      for (int p = 0; p < 2; p++) begin
        logic [W-1:0] expected;
        expected = ren[p] ? model[ra[p]] : '1;
        if (ren[p]) banks_read[ra[p] / 32]++;
        checks++;
        if (dout[p] !== expected) begin
          failures++;
          $display("FAIL n=%0d port %0d addr %0d en=%0d got %h exp %h", n, p, ra[p], ren[p], dout[p], expected);
        end
      end
      @(posedge clk);
      if (wen) model[wa] = din;
    end
    for (int b = 0; b < 8; b++) begin
      checks++;
      if (banks_read[b] == 0) begin
        failures++;
        $display("FAIL bank %0d never read", b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
