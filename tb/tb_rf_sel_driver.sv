// tb_rf_sel_driver: the select register must show, after each clock edge,
// what its input held before that edge, and come out of reset with every
// select low and every LBL precharged.
module tb_rf_sel_driver;
  import rf_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  port_sel_t d, q, expected;
  int checks = 0, failures = 0;

  rf_sel_driver dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  function automatic port_sel_t random_sel();
    port_sel_t s;
    s.bank = 3'($urandom);
    s.be = 8'($urandom);
    for (int i = 0; i < 8; i++) s.sel[i*32 +: 32] = $urandom;
    s.colsel = $urandom;
    s.lcp = $urandom;
    return s;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = random_sel();
    rst_n = 1'b1;
    #1;
    rst_n = 1'b0;
    #1;
    checks++;
    if (q.sel !== '0 || q.be !== '0 || q.colsel !== '0 || q.lcp !== '1 || q.bank !== '0) begin
      failures++;
      $display("FAIL reset value");
    end
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      d = random_sel();
      expected = d;
      @(posedge clk);
      #1;
      d = random_sel();   // change input mid-cycle: output must hold
      #2;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("FAIL cycle %0d", n);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
