// tb_rf_top: end-to-end test of the register file at its default size
// (256 x 64, two read ports, one write port) against a reference memory.
//
// Each cycle it issues a random write and a random read on each port; the
// read data is checked during the next cycle, which is the one-cycle
// decode-ahead latency. Writes land at the end of the cycle after they are
// issued, so the reference applies a write two checks later. Addresses are
// often drawn from a small pool so that collisions happen. Counted
// mechanisms, each of which must occur at least once:
//   read on each port, write, both ports on one word, read of a word
//   written in the same access cycle (old data), read in the cycle right
//   after the write lands (new data), deselected port (all ones), every bank
//   and every LBL read, reads of two different banks at once. It also checks
//   that new addresses leave rd_data unchanged until the next clock edge,
//   i.e. the latency is exactly one cycle of decode ahead of the access.
module tb_rf_top;
  import rf_pkg::*;
  localparam int unsigned WORD_W = 64;

  logic clk = 1'b0;
  logic rst_n;
  logic [1:0] rd_en;
  logic [1:0][7:0] rd_addr;
  logic [1:0][WORD_W-1:0] rd_data;
  logic wr_en;
  logic [7:0] wr_addr;
  logic [WORD_W-1:0] wr_data;

  logic [WORD_W-1:0] model [256];
  int checks = 0, failures = 0;

  typedef struct {
    bit rd_en [2];
    int rd_addr [2];
    bit wr_en;
    int wr_addr;
    logic [WORD_W-1:0] wr_data;
  } op_t;

  op_t cur, prev1, prev2;

  int n_read [2];
  int n_write = 0, n_same_word = 0, n_old_data = 0, n_new_data = 0;
  int n_deselected = 0, n_two_banks = 0, n_held = 0;
  int bank_hits [8];
  int lbl_hits [32];

  rf_top dut (
    .clk(clk), .rst_n(rst_n), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick_addr();
    if ($urandom_range(0, 3) == 0) return 40 + 8 * $urandom_range(0, 3);
    return $urandom_range(0, 255);
  endfunction

  function automatic logic [WORD_W-1:0] rand_word();
    return {$urandom, $urandom};
  endfunction

  task automatic drive(input op_t op);
    for (int p = 0; p < 2; p++) begin
      rd_en[p] = op.rd_en[p];
      rd_addr[p] = 8'(op.rd_addr[p]);
    end
    wr_en = op.wr_en;
    wr_addr = 8'(op.wr_addr);
    wr_data = op.wr_data;
  endtask

  task automatic count(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // check the reads issued one cycle ago
  task automatic check_reads();
    for (int p = 0; p < 2; p++) begin
      logic [WORD_W-1:0] expected;
      if (prev1.rd_en[p]) begin
        int a = prev1.rd_addr[p];
        expected = model[a];
        n_read[p]++;
        bank_hits[a / 32]++;
        lbl_hits[a / 8]++;
        if (prev1.wr_en && prev1.wr_addr == a) n_old_data++;
        if (prev2.wr_en && prev2.wr_addr == a) n_new_data++;
      end else begin
        expected = '1;
        n_deselected++;
      end
      checks++;
      if (rd_data[p] !== expected) begin
        failures++;
        $display("FAIL port %0d en=%0d addr %0d got %h exp %h", p, prev1.rd_en[p],
                 prev1.rd_addr[p], rd_data[p], expected);
      end
    end
    if (prev1.rd_en[0] && prev1.rd_en[1]) begin
      if (prev1.rd_addr[0] == prev1.rd_addr[1]) n_same_word++;
      if (prev1.rd_addr[0] / 32 != prev1.rd_addr[1] / 32) n_two_banks++;
    end
  endtask

  initial begin
    op_t idle;
    idle.rd_en = '{0, 0};
    idle.rd_addr = '{0, 0};
    idle.wr_en = 0;
    idle.wr_addr = 0;
    idle.wr_data = '0;
    drive(idle);
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    count(rd_data[0] === '1 && rd_data[1] === '1, "outputs precharged in reset");
    @(negedge clk);
    rst_n = 1'b1;

    // fill every word
    for (int a = 0; a < 256; a++) begin
      automatic op_t op = idle;
      op.wr_en = 1;
      op.wr_addr = a;
      op.wr_data = rand_word();
      model[a] = op.wr_data;
      drive(op);
      @(negedge clk);
    end
    drive(idle);
    repeat (2) @(negedge clk);
    prev1 = idle;
    prev2 = idle;

    // random traffic
    for (int n = 0; n < 5000; n++) begin
      // write issued two cycles ago has landed at the last edge
      if (prev2.wr_en) begin
        model[prev2.wr_addr] = prev2.wr_data;
        n_write++;
      end
      check_reads();
      cur.wr_en = ($urandom_range(0, 2) != 0);
      cur.wr_addr = pick_addr();
      cur.wr_data = rand_word();
      for (int p = 0; p < 2; p++) begin
        cur.rd_en[p] = ($urandom_range(0, 9) != 0);
        cur.rd_addr[p] = ($urandom_range(0, 7) == 0 && p == 1) ? cur.rd_addr[0] : pick_addr();
      end
      begin
        // new addresses must not reach rd_data before the next edge
        automatic logic [1:0][WORD_W-1:0] held_data = rd_data;
        drive(cur);
        #1;
        checks++;
        if (rd_data !== held_data) begin
          failures++;
          $display("FAIL read data changed within the decode cycle");
        end else n_held++;
      end
      prev2 = prev1;
      prev1 = cur;
      @(negedge clk);
    end

    count(n_read[0] > 0, "port 0 read");
    count(n_read[1] > 0, "port 1 read");
    count(n_write > 0, "write");
    count(n_same_word > 0, "both ports on one word");
    count(n_old_data > 0, "read during write returns old data");
    count(n_new_data > 0, "read right after write returns new data");
    count(n_deselected > 0, "deselected port");
    count(n_two_banks > 0, "two banks read at once");
    count(n_held > 0, "read data held through the decode cycle");
    for (int b = 0; b < 8; b++) count(bank_hits[b] > 0, $sformatf("bank %0d read", b));
    for (int l = 0; l < 32; l++) count(lbl_hits[l] > 0, $sformatf("LBL %0d read", l));
    $display("reads %0d/%0d writes %0d same-word %0d old-data %0d new-data %0d deselected %0d two-bank %0d",
             n_read[0], n_read[1], n_write, n_same_word, n_old_data, n_new_data, n_deselected, n_two_banks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
