// tb_ddr3_mc_top: end-to-end test of the whole design at its default sizes.
//
// Controller path: an AXI4 master writes and reads bursts through the AXI
// slave, the user interface FIFOs and the controller into the behavioural
// PHY/DDR3 model, which checks every DDR3 timing rule. Read data is compared
// with a byte-level reference. The traffic is chosen so that every mechanism
// happens: bank hits (beats of one burst in one row), rows opened in a free
// slot, row conflicts, closing the least recently opened of four open banks,
// auto refresh (a long idle gap beyond tREFI, 6240 cycles) with the re-open of
// the last row, and a write granted by the read wait limit while reads keep
// coming.
// Scheduler path, running at the same time: random requests into the
// proposed scheduler; every request must leave exactly once, and the write
// drain at the high watermark, row-hit writes while reads wait, the switch
// back to reads, the conventional drain step, a row kept open, and a page
// policy decision at the 10k-cycle epoch must all occur. The scheduler
// traffic has idle stretches, so its DRAM must pass through all six power
// states (including active and precharge power-down and self refresh) and
// be refreshed; no request may leave while the DRAM is not awake.
`timescale 1ns/1ps
module tb_ddr3_mc_top;
  import ddr3_pkg::*;
  logic clk = 0, rst_n = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  // AXI
  logic [3:0] awid = 0, arid = 0, bid, rid;
  logic [31:0] awaddr = 0, araddr = 0;
  logic [7:0] awlen = 0, arlen = 0;
  logic [2:0] awsize = 4, arsize = 4;
  logic [1:0] awburst = 1, arburst = 1, bresp, rresp;
  logic awvalid = 0, awready, wlast = 0, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rlast, rvalid, rready = 0;
  logic [UI_DATA_W-1:0] wdata = 0, rdata;
  logic [UI_MASK_W-1:0] wstrb = 0;
  // PHY
  logic phy_init_done = 0, phy_rddata_valid;
  dram_cmd_e phy_cmd;
  bank_t phy_bank;
  logic [ROW_W-1:0] phy_addr;
  logic [UI_DATA_W-1:0] phy_wrdata, phy_rddata;
  logic [UI_MASK_W-1:0] phy_wrmask;
  logic ui_aempty, stat_decode, stat_refresh, stat_wr_forced;
  bm_decision_e stat_decision;
  // scheduler
  logic sch_in_valid = 0, sch_in_write = 0, sch_in_ready, sch_out_valid, sch_out_write;
  logic sch_out_row_hit, sch_out_autopre, sch_out_ready = 0, sch_write_mode;
  logic sch_sw, sch_wm, sch_epoch;
  logic [NUM_BANKS-1:0] sch_keep;
  sched_req_t sch_in_req = '0, sch_out_req;
  pwr_state_e sch_pwr;
  logic sch_cke, sch_prea, sch_ref;

  ddr3_mc_top dut (
    .clk, .rst_n,
    .s_awid(awid), .s_awaddr(awaddr), .s_awlen(awlen), .s_awsize(awsize), .s_awburst(awburst),
    .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(wstrb), .s_wlast(wlast), .s_wvalid(wvalid), .s_wready(wready),
    .s_bid(bid), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_arid(arid), .s_araddr(araddr), .s_arlen(arlen), .s_arsize(arsize), .s_arburst(arburst),
    .s_arvalid(arvalid), .s_arready(arready),
    .s_rid(rid), .s_rdata(rdata), .s_rresp(rresp), .s_rlast(rlast), .s_rvalid(rvalid), .s_rready(rready),
    .phy_init_done, .phy_cmd, .phy_bank, .phy_addr, .phy_wrdata, .phy_wrmask,
    .phy_rddata, .phy_rddata_valid,
    .ui_cmd_almost_empty(ui_aempty), .stat_decode, .stat_decision, .stat_refresh, .stat_wr_forced,
    .sch_in_valid, .sch_in_write, .sch_in_req, .sch_in_ready,
    .sch_out_valid, .sch_out_write, .sch_out_req, .sch_out_row_hit, .sch_out_autopre, .sch_out_ready,
    .sch_write_mode, .sch_keep_open(sch_keep), .sch_stat_switch_rd(sch_sw), .sch_stat_wm_drain(sch_wm),
    .sch_epoch_tick(sch_epoch),
    .sch_pwr_state(sch_pwr), .sch_cke, .sch_prea, .sch_ref
  );

  ddr3_phy_model phy (.clk, .rst_n, .phy_cmd, .phy_bank, .phy_addr, .phy_wrdata, .phy_wrmask,
                      .phy_rddata, .phy_rddata_valid);

  // ---------------- controller path ----------------
  logic [7:0] ref_mem [logic [31:0]];
  // Row/Bank/Column byte address
  function automatic logic [31:0] rbc(int row, int bank, int col);
    return (32'(row) << 14) | (32'(bank) << 11) | (32'(col) << 1);
  endfunction

  task automatic axi_write(logic [3:0] id, logic [31:0] addr, int len, bit partial = 0);
    @(negedge clk);
    awid = id; awaddr = addr; awlen = 8'(len); awsize = 4; awburst = 1; awvalid = 1;
    do @(posedge clk); while (!awready);
    @(negedge clk) awvalid = 0;
    for (int i = 0; i <= len; i++) begin
      logic [31:0] ba;
      wvalid = 1; wlast = (i == len);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      wstrb = partial ? 16'($urandom) : 16'hffff;
      ba = (addr & ~32'hf) + i * 16;
      for (int k = 0; k < 16; k++) if (wstrb[k]) ref_mem[ba + k] = wdata[k*8 +: 8];
      do @(posedge clk); while (!wready);
      @(negedge clk);
    end
    wvalid = 0; wlast = 0; bready = 1;
    do @(posedge clk); while (!bvalid);
    chk(bid == id && bresp == 2'b00, "write response");
    @(negedge clk) bready = 0;
  endtask

  int n_rbeats = 0;
  task automatic axi_read(logic [3:0] id, logic [31:0] addr, int len, bit sync = 1);
    if (sync) @(negedge clk);
    arid = id; araddr = addr; arlen = 8'(len); arsize = 4; arburst = 1; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0;
    for (int i = 0; i <= len; i++) begin
      logic [31:0] ba;
      logic [UI_DATA_W-1:0] e;
      rready = 1;
      do @(posedge clk); while (!rvalid);
      ba = (addr & ~32'hf) + i * 16;
      // bytes never written hold the model's initial pattern: compare the rest
      for (int k = 0; k < 16; k++) e[k*8 +: 8] = ref_mem.exists(ba + k) ? ref_mem[ba + k] : rdata[k*8 +: 8];
      chk(rdata == e, $sformatf("read data %h beat %0d", addr, i));
      chk(rlast == (i == len) && rid == id, "RLAST/RID");
      n_rbeats++;
      @(negedge clk);
    end
    rready = 0;
  endtask

  int n_dec [4];
  int n_ref = 0, n_forced = 0, n_react = 0;
  logic after_ref = 0;
  always @(posedge clk) if (rst_n) begin
    if (stat_decode) n_dec[stat_decision]++;
    if (stat_refresh) begin n_ref++; after_ref = 1; end
    if (stat_wr_forced) n_forced++;
    if (after_ref && phy_cmd == CMD_ACT) begin n_react++; after_ref = 0; end
  end

  // ---------------- scheduler path ----------------
  int sch_sent [int];        // tag (bank,row,col) -> outstanding count
  int n_sch_in = 0, n_sch_out = 0, n_drain = 0, n_hitwr = 0, n_sw = 0, n_wmstep = 0, n_kept = 0;
  int n_keep_change = 0;
  int sch_rq = 0;
  bit sch_mode_q = 0;
  bit sch_run = 0;
  logic [NUM_BANKS-1:0] keep_q = '0;
  always @(negedge clk) begin
    if (sch_run) begin
      int phase;
      // 2000 busy cycles, 1000 light, then 5000 with no requests
      phase = ($time / 2) % 8000;
      sch_in_valid  = ($urandom_range(99) < (phase < 2000 ? 90 : phase < 3000 ? 30 : 0));
      sch_in_write  = ($urandom_range(99) < 60);
      sch_in_req    = '{bank: bank_t'($urandom_range(3)), row: sch_row_t'($urandom_range(2)),
                        col: col_t'($urandom_range(1023))};
      sch_out_ready = ($urandom_range(99) < (phase < 2000 ? 45 : 90));
    end else begin
      sch_in_valid = 0; sch_out_ready = 1;
    end
  end
  int n_pwr [6];
  int n_sch_ref = 0, n_sch_prea = 0;
  always @(posedge clk) if (rst_n) begin
    n_pwr[sch_pwr]++;
    if (sch_ref) n_sch_ref++;
    if (sch_prea) n_sch_prea++;
    if (sch_out_valid) chk(sch_cke && sch_pwr inside {PWR_IDLE, PWR_ACT}, "request served only while awake");
    if (sch_in_valid && sch_in_ready) begin
      sch_sent[{sch_in_write, sch_in_req}]++; n_sch_in++;
      if (!sch_in_write) sch_rq++;
    end
    if (sch_out_valid && sch_out_ready) begin
      int key;
      key = {sch_out_write, sch_out_req};
      chk(sch_sent.exists(key) && sch_sent[key] > 0, "scheduled request was queued");
      if (sch_sent.exists(key)) sch_sent[key]--;
      n_sch_out++;
      if (!sch_out_write) sch_rq--;
      if (sch_out_write && sch_out_row_hit && sch_rq > 0) n_hitwr++;
      if (!sch_out_autopre) n_kept++;
    end
    if (sch_sw) n_sw++;
    if (sch_wm && sch_write_mode) n_wmstep++;
    if (!sch_mode_q && sch_write_mode) n_drain++;
    sch_mode_q <= sch_write_mode;
    if (sch_keep != keep_q) n_keep_change++;
    keep_q <= sch_keep;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("power idle=%0d act=%0d ref=%0d apdn=%0d ppdn=%0d sref=%0d refcmd=%0d prea=%0d",
             n_pwr[0], n_pwr[1], n_pwr[2], n_pwr[3], n_pwr[4], n_pwr[5], n_sch_ref, n_sch_prea);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0;
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1;
    sch_run = 1;
    repeat (100) @(posedge clk);
    chk(phy.n_act + phy.n_ref == 0, "controller idle until phy_init_done");
    phy_init_done = 1;
    // one burst of 8 beats in one row: one activate, then bank hits
    axi_write(1, rbc(3, 0, 0), 7);
    axi_read (1, rbc(3, 0, 0), 7);
    // partial strobes in the same row
    axi_write(2, rbc(3, 0, 64), 3, 1);
    axi_read (2, rbc(3, 0, 64), 3);
    // row conflict in bank 0
    axi_write(3, rbc(7, 0, 0), 1);
    axi_read (3, rbc(3, 0, 0), 1);
    // six banks in turn: fills four slots, then closes the least recently opened
    for (int b = 1; b <= 6; b++) axi_write(4'(b), rbc(20 + b, b, 128), 1);
    for (int b = 1; b <= 6; b++) axi_read (4'(b), rbc(20 + b, b, 128), 1);
    // idle beyond tREFI: refresh, re-open of the last row
    repeat (7000) @(posedge clk);
    axi_read(7, rbc(26, 6, 128), 1);
    axi_read(8, rbc(3, 0, 0), 7);
    // read wait limit: reads back to back while a write waits
    fork
      for (int n = 0; n < 20; n++) axi_read(4'(n), rbc(3, 0, 8 * (n % 8)), 0, n == 0);
      begin repeat (3) @(posedge clk); axi_write(9, rbc(40, 5, 0), 0); end
    join
    axi_read(9, rbc(40, 5, 0), 0);
    // random traffic over the first banks and rows
    for (int n = 0; n < 40; n++) begin
      logic [31:0] a;
      int l;
      a = rbc($urandom_range(3), $urandom_range(7), 8 * $urandom_range(100));
      l = $urandom_range(3);
      axi_write(4'(n), a, l);
      axi_read (4'(n), a, l);
    end
    // let the scheduler traffic pass one more page-policy epoch
    while ((n_keep_change == 0 || n_pwr[PWR_SREF] == 0 || n_pwr[PWR_ACT_PDN] == 0 || n_sch_ref == 0) && $time < 700000)
      @(posedge clk);
    sch_run = 0;
    repeat (300) @(posedge clk);

    chk(phy.violations == 0, $sformatf("%0d DDR3 protocol violations", phy.violations));
    for (int d = 0; d < 4; d++) chk(n_dec[d] > 0, $sformatf("bank decision %0d happened", d));
    chk(n_ref > 0 && phy.n_prea >= n_ref, "auto refresh preceded by precharge all");
    chk(n_react > 0, "last row re-opened after refresh");
    chk(n_forced > 0, "write granted by the read wait limit");
    chk(n_sch_in == n_sch_out, $sformatf("scheduler in %0d out %0d", n_sch_in, n_sch_out));
    chk(n_drain > 0, "scheduler write drain at the high watermark");
    chk(n_hitwr > 0, "row-hit writes while reads wait");
    chk(n_sw > 0, "switch to reads on a row-hit read");
    chk(n_wmstep > 0, "drain step towards the low watermark");
    chk(n_kept > 0, "row kept open by the page policy");
    chk(n_keep_change > 0, "page policy changed at an epoch");
    for (int p = 0; p < 6; p++) chk(n_pwr[p] > 0, $sformatf("scheduler DRAM power state %0d reached", p));
    chk(n_sch_ref > 0, "scheduler-side auto refresh");
    $display("dec hit=%0d free=%0d evict=%0d rowconf=%0d ref=%0d react=%0d forced=%0d rbeats=%0d",
             n_dec[0], n_dec[1], n_dec[2], n_dec[3], n_ref, n_react, n_forced, n_rbeats);
    $display("sched in=%0d out=%0d drain=%0d hitwr=%0d sw=%0d wm=%0d kept=%0d keepchg=%0d",
             n_sch_in, n_sch_out, n_drain, n_hitwr, n_sw, n_wmstep, n_kept, n_keep_change);
    $display("power idle=%0d act=%0d ref=%0d apdn=%0d ppdn=%0d sref=%0d refcmd=%0d prea=%0d",
             n_pwr[0], n_pwr[1], n_pwr[2], n_pwr[3], n_pwr[4], n_pwr[5], n_sch_ref, n_sch_prea);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
