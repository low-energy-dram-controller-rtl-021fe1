// tb_bank_manager: random accesses against a reference list of open banks.
//
// For every access the testbench asks the bank manager for its decision,
// compares it (and the victim bank when four are open) with its own list kept
// in opening order, then applies the updates a controller would: precharge
// the victim or the conflicting bank, activate the new row. Now and then a
// precharge-all empties the table. Each of the four decisions must occur.
`timescale 1ns/1ps
module tb_bank_manager;
  import ddr3_pkg::*;
  logic clk = 0, rst_n = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  bank_t lk_bank, open_bank, close_bank, victim;
  row_t  lk_row, open_row;
  logic  open_en, close_en, close_all;
  bm_decision_e dec;
  logic [2:0] open_count;

  bank_manager dut (.clk, .rst_n, .lk_bank, .lk_row, .decision(dec), .victim_bank(victim),
    .open_en, .open_bank, .open_row, .close_en, .close_bank, .close_all, .open_count);

  typedef struct { int bank; int row; } ent_t;
  ent_t lst [$];
  int n_dec [4];

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    open_en = 0; close_en = 0; close_all = 0; lk_bank = 0; lk_row = 0;
    open_bank = 0; open_row = 0; close_bank = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int b, r, idx;
      bm_decision_e e;
      b = $urandom_range(7);
      r = $urandom_range(3);
      lk_bank = bank_t'(b); lk_row = row_t'(r);
      idx = -1;
      foreach (lst[i]) if (lst[i].bank == b) idx = i;
      if (idx >= 0) e = (lst[idx].row == r) ? BM_HIT : BM_ROW_CONF;
      else e = (lst.size() == 4) ? BM_EVICT_LRO : BM_OPEN_FREE;
      @(negedge clk);   // settle (lookup is combinational)
      chk(dec == e, "decision");
      chk(int'(open_count) == lst.size(), "open count");
      n_dec[dec]++;
      if (e == BM_EVICT_LRO) chk(int'(victim) == lst[0].bank, "victim is least recently opened");
      // precharge
      if (e == BM_EVICT_LRO || e == BM_ROW_CONF) begin
        close_en = 1;
        close_bank = (e == BM_EVICT_LRO) ? bank_t'(lst[0].bank) : bank_t'(b);
        if (e == BM_EVICT_LRO) lst.delete(0); else lst.delete(idx);
        @(negedge clk); close_en = 0;
      end
      // activate
      if (e != BM_HIT) begin
        open_en = 1; open_bank = bank_t'(b); open_row = row_t'(r);
        lst.push_back('{b, r});
        @(negedge clk); open_en = 0;
      end
      if ($urandom_range(49) == 0) begin
        close_all = 1; lst.delete();
        @(negedge clk); close_all = 0;
        chk(open_count == 0, "precharge all empties the table");
      end
    end
    for (int d = 0; d < 4; d++) chk(n_dec[d] > 0, "every decision seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
