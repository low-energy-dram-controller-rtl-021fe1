// tb_ddr3_controller: self-checking test of the DDR3 controller state machine.
//
// The testbench plays the user interface (a command queue and a write data
// queue) and connects the controller to the behavioural PHY/DRAM model, which
// checks every DDR3 timing rule on its own. A fixed list of writes and reads
// makes each bank-management case happen: first open of a bank, bank hit,
// row conflict in an open bank, and closing the least recently opened bank
// when a fifth bank is needed; a short refresh interval forces auto refreshes.
// Read data is compared with a reference memory kept by the testbench, every
// decision with the one the testbench expects from its own four-entry
// opening-order list, and the ACT -> WRITE distance of the first access with
// tRCD.
`timescale 1ns/1ps
module tb_ddr3_controller;
  import ddr3_pkg::*;

  localparam int unsigned T_REFI = 700;
  localparam int unsigned T_RCD  = 11;

  logic clk = 0, rst_n = 1, init_done = 0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  // user interface stand-in
  ui_cmd_t               cq   [$];
  logic [UI_DATA_W-1:0]  wq_d [$];
  logic [UI_MASK_W-1:0]  wq_m [$];
  logic                  cmd_empty, cmd_rd_en, wdf_empty, wdf_rd_en;
  ui_cmd_t               cmd;
  logic [UI_DATA_W-1:0]  wdf_data, rd_data;
  logic [UI_MASK_W-1:0]  wdf_mask;
  logic                  rd_valid;
  assign cmd_empty = (cq.size() == 0);
  assign cmd       = cmd_empty ? '0 : cq[0];
  assign wdf_empty = (wq_d.size() == 0);
  assign wdf_data  = wdf_empty ? '0 : wq_d[0];
  assign wdf_mask  = wdf_empty ? '0 : wq_m[0];
  always @(posedge clk) begin
    if (cmd_rd_en && !cmd_empty) void'(cq.pop_front());
    if (wdf_rd_en && !wdf_empty) begin void'(wq_d.pop_front()); void'(wq_m.pop_front()); end
  end

  dram_cmd_e            phy_cmd;
  bank_t                phy_bank;
  logic [ROW_W-1:0]     phy_addr;
  logic [UI_DATA_W-1:0] phy_wrdata, phy_rddata;
  logic [UI_MASK_W-1:0] phy_wrmask;
  logic                 phy_rddata_valid;
  logic                 stat_decode, stat_refresh;
  bm_decision_e         stat_decision;

  ddr3_controller #(.T_REFI(T_REFI)) dut (
    .clk, .rst_n, .phy_init_done(init_done),
    .cmd_empty, .cmd, .cmd_rd_en,
    .wdf_empty, .wdf_data, .wdf_mask, .wdf_rd_en,
    .rd_data, .rd_valid,
    .phy_cmd, .phy_bank, .phy_addr, .phy_wrdata, .phy_wrmask,
    .phy_rddata, .phy_rddata_valid,
    .stat_decode, .stat_decision, .stat_refresh
  );

  ddr3_phy_model phy (
    .clk, .rst_n, .phy_cmd, .phy_bank, .phy_addr, .phy_wrdata, .phy_wrmask,
    .phy_rddata, .phy_rddata_valid
  );

  // Row/Bank/Column: byte address = {row, bank, col, byte}
  function automatic logic [UI_ADDR_W-1:0] mk(int row, int bank, int col);
    return {ROW_W'(row), BANK_W'(bank), COL_W'(col), 1'b0};
  endfunction

  // reference memory and expected read data
  logic [UI_DATA_W-1:0] ref_mem [logic [UI_ADDR_W-1:0]];
  logic [UI_DATA_W-1:0] exp_rd [$];

  // expected bank-management decisions, from an opening-order list
  typedef struct { int bank; int row; } open_t;
  open_t        olist [$];
  int           last_b = -1, last_r = -1;
  int           n_dec [4];

  function automatic logic [UI_DATA_W-1:0] init_word(int b, int r, int c);
    return {8{BANK_W'(b), ROW_W'(r)}} ^ {8{COL_W'(c), 6'h2b}};
  endfunction

  open_t acc_q [$];
  task automatic model_access(int row, int bank);
    acc_q.push_back('{bank, row});
  endtask

  // expected decision for the next classified command, from the list state now
  function automatic bm_decision_e model_decide(int bank, int row);
    int idx = -1;
    foreach (olist[i]) if (olist[i].bank == bank) idx = i;
    if (idx >= 0 && olist[idx].row == row) return BM_HIT;
    else if (idx >= 0) begin
      olist.delete(idx);
      olist.push_back('{bank, row});
      return BM_ROW_CONF;
    end else if (olist.size() == 4) begin
      olist.delete(0);
      olist.push_back('{bank, row});
      return BM_EVICT_LRO;
    end
    olist.push_back('{bank, row});
    return BM_OPEN_FREE;
  endfunction

  task automatic wr(int row, int bank, int col, logic [UI_DATA_W-1:0] d, logic [UI_MASK_W-1:0] m = '0);
    logic [UI_ADDR_W-1:0] a;
    logic [UI_DATA_W-1:0] w;
    a = mk(row, bank, col & ~7);
    w = ref_mem.exists(a) ? ref_mem[a] : init_word(bank, row, col & ~7);
    for (int i = 0; i < UI_MASK_W; i++) if (!m[i]) w[i*8 +: 8] = d[i*8 +: 8];
    ref_mem[a] = w;
    cq.push_back('{op: UI_WR, addr: mk(row, bank, col)});
    wq_d.push_back(d); wq_m.push_back(m);
    model_access(row, bank);
  endtask

  task automatic rd(int row, int bank, int col);
    logic [UI_ADDR_W-1:0] a;
    a = mk(row, bank, col & ~7);
    exp_rd.push_back(ref_mem.exists(a) ? ref_mem[a] : init_word(bank, row, col & ~7));
    cq.push_back('{op: UI_RD, addr: mk(row, bank, col)});
    model_access(row, bank);
  endtask

  // the controller re-opens the last bank/row after a refresh
  always @(posedge clk) if (stat_refresh) begin
    olist.delete();
    if (last_b >= 0) olist.push_back('{last_b, last_r});
  end
  always @(posedge clk) if (phy_cmd == CMD_RD || phy_cmd == CMD_WR) begin
    last_b = int'(phy_bank); last_r = int'(phy.orow[phy_bank]);
  end

  // compare decisions
  always @(posedge clk) if (rst_n && stat_decode) begin
    bm_decision_e e;
    checks++;
    n_dec[stat_decision]++;
    if (acc_q.size() == 0) begin
      failures++; $display("FAIL unexpected decode");
    end else begin
      e = model_decide(acc_q[0].bank, acc_q[0].row);
      void'(acc_q.pop_front());
      if (stat_decision != e) begin
        failures++;
        $display("FAIL decision %s expected %s", stat_decision.name(), e.name());
      end
    end
  end

  // compare read data
  int n_rd = 0;
  always @(posedge clk) if (rst_n && rd_valid) begin
    checks++; n_rd++;
    if (exp_rd.size() == 0 || rd_data !== exp_rd[0]) begin
      failures++;
      $display("FAIL read data %h expected %h", rd_data, exp_rd.size() ? exp_rd[0] : '0);
    end
    if (exp_rd.size()) void'(exp_rd.pop_front());
  end

  // ACT -> first column command distance
  longint cyc = 0, t_first_act = -1, t_first_col = -1;
  always @(posedge clk) begin
    cyc++;
    if (phy_cmd == CMD_ACT && t_first_act < 0) t_first_act = cyc;
    if ((phy_cmd == CMD_WR || phy_cmd == CMD_RD) && t_first_col < 0) t_first_col = cyc;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int total_rd;
  initial begin
    #1 rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    // nothing may be issued before the PHY reports initialisation done
    checks++;
    if (phy.n_act + phy.n_rd + phy.n_wr + phy.n_ref != 0) begin
      failures++; $display("FAIL command before phy_init_done");
    end
    // fill commands before init_done so the controller streams them
    wr(5, 1, 0,  {4{32'h1111_0001}});          // open bank 1 (free slot)
    wr(5, 1, 8,  {4{32'h2222_0002}});          // hit
    wr(5, 1, 16, {4{32'h3333_0003}}, 16'h00ff); // hit, upper half written only
    rd(5, 1, 0);                                // hit
    rd(5, 1, 16);                               // hit
    wr(9, 1, 0,  {4{32'h4444_0004}});          // row conflict in bank 1
    rd(5, 1, 8);                                // row conflict back
    for (int b = 2; b <= 5; b++) wr(100 + b, b, 24, {4{32'h5500_0000 | b}}); // fills, then evicts LRO
    rd(5, 1, 8);                                // bank 1 was evicted: open again
    rd(102, 2, 24);                             // bank 2 evicted meanwhile?
    for (int b = 0; b < 8; b++) rd(100 + b, b, 24);
    total_rd = exp_rd.size();
    init_done = 1;
    wait (cq.size() == 0 && exp_rd.size() == 0);
    repeat (50) @(posedge clk);
    // second phase: a long idle gap forces refreshes, then reads resume
    repeat (3 * T_REFI) @(posedge clk);
    rd(107, 7, 24);
    rd(5, 1, 16);
    wr(5, 1, 16, {4{32'h6666_0006}});
    rd(5, 1, 16);
    total_rd += 3;
    wait (cq.size() == 0 && exp_rd.size() == 0);
    repeat (100) @(posedge clk);

    checks++;
    if (n_rd != total_rd) begin failures++; $display("FAIL %0d reads returned, %0d expected", n_rd, total_rd); end
    checks++;
    if (phy.violations != 0) begin failures++; $display("FAIL %0d protocol violations", phy.violations); end
    checks++;
    if (t_first_col - t_first_act != T_RCD) begin
      failures++; $display("FAIL ACT->WR distance %0d, expected tRCD=%0d", t_first_col - t_first_act, T_RCD);
    end
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (n_dec[d] == 0) begin failures++; $display("FAIL decision %0d never happened", d); end
    end
    checks++;
    if (phy.n_ref < 2 || phy.n_prea < phy.n_ref) begin
      failures++; $display("FAIL refresh: %0d REF, %0d PREA", phy.n_ref, phy.n_prea);
    end
    $display("decisions hit=%0d free=%0d evict=%0d rowconf=%0d ACT=%0d PRE=%0d PREA=%0d REF=%0d RD=%0d WR=%0d",
             n_dec[0], n_dec[1], n_dec[2], n_dec[3], phy.n_act, phy.n_pre, phy.n_prea, phy.n_ref, phy.n_rd, phy.n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
