// tb_traffic_power: synthetic traffic through the scheduler and power-down
// path of the full design, at its default sizes.
//
// The traffic follows the generator settings the design was evaluated with:
// 80 % reads, 64-byte requests, 64, 256 or 512 sequential bytes in one row
// before a new random row, 1, 4 or 8 banks in use, and a random gap between
// requests from tCCD (4 cycles) up to tPDE, 50 x tPDE or 100 x tPDE
// (tPDE = tRAS + tRP + tCK = 40 cycles). For each of the 27 settings the
// time spent in each DRAM power state is printed. Each 64-byte request
// covers 8 columns of the row; rows are drawn from the whole 1 GB
// address space (16384 rows per bank).
// Checks: every request of a setting leaves the scheduler exactly once;
// with sparse traffic (50 x and 100 x tPDE) the DRAM spends more than half
// of its time in precharge power-down or self refresh, and more than with
// dense traffic (tPDE) at the same locality and bank use; self refresh is
// reached with both sparse densities.
// The power states come from the scheduler's own view of open banks; the
// scheduler side has no DRAM command timing, so the time a bank spends
// active during one access is not counted as ACT.
`timescale 1ns/1ps
module tb_traffic_power;
  import ddr3_pkg::*;
  localparam int T_CCD = 4, T_PDE = 40, NREQ = 48;
  logic clk = 0, rst_n = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  // the AXI/PHY side stays idle
  logic [UI_DATA_W-1:0] rdata, phy_wrdata;
  logic [3:0] bid, rid;
  logic [1:0] bresp, rresp;
  logic awready, wready, bvalid, arready, rlast, rvalid;
  dram_cmd_e phy_cmd;
  bank_t phy_bank;
  logic [ROW_W-1:0] phy_addr;
  logic [UI_MASK_W-1:0] phy_wrmask;
  logic ui_aempty, stat_decode, stat_refresh, stat_wr_forced;
  bm_decision_e stat_decision;
  // scheduler side
  logic sch_in_valid = 0, sch_in_write = 0, sch_in_ready, sch_out_valid, sch_out_write;
  logic sch_out_row_hit, sch_out_autopre, sch_write_mode, sch_sw, sch_wm, sch_epoch;
  logic [NUM_BANKS-1:0] sch_keep;
  sched_req_t sch_in_req = '0, sch_out_req;
  pwr_state_e sch_pwr;
  logic sch_cke, sch_prea, sch_ref;

  ddr3_mc_top dut (
    .clk, .rst_n,
    .s_awid('0), .s_awaddr('0), .s_awlen('0), .s_awsize(3'd4), .s_awburst(2'd1),
    .s_awvalid(1'b0), .s_awready(awready),
    .s_wdata('0), .s_wstrb('0), .s_wlast(1'b0), .s_wvalid(1'b0), .s_wready(wready),
    .s_bid(bid), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(1'b1),
    .s_arid('0), .s_araddr('0), .s_arlen('0), .s_arsize(3'd4), .s_arburst(2'd1),
    .s_arvalid(1'b0), .s_arready(arready),
    .s_rid(rid), .s_rdata(rdata), .s_rresp(rresp), .s_rlast(rlast), .s_rvalid(rvalid), .s_rready(1'b1),
    .phy_init_done(1'b0), .phy_cmd, .phy_bank, .phy_addr, .phy_wrdata, .phy_wrmask,
    .phy_rddata('0), .phy_rddata_valid(1'b0),
    .ui_cmd_almost_empty(ui_aempty), .stat_decode, .stat_decision, .stat_refresh, .stat_wr_forced,
    .sch_in_valid, .sch_in_write, .sch_in_req, .sch_in_ready,
    .sch_out_valid, .sch_out_write, .sch_out_req, .sch_out_row_hit, .sch_out_autopre,
    .sch_out_ready(1'b1),
    .sch_write_mode, .sch_keep_open(sch_keep), .sch_stat_switch_rd(sch_sw), .sch_stat_wm_drain(sch_wm),
    .sch_epoch_tick(sch_epoch),
    .sch_pwr_state(sch_pwr), .sch_cke, .sch_prea, .sch_ref
  );

  initial begin
    repeat (8000000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_in = 0, n_out = 0;
  longint t_pwr [6];
  always @(posedge clk) if (rst_n) begin
    t_pwr[sch_pwr]++;
    if (sch_in_valid && sch_in_ready) n_in++;
    if (sch_out_valid) n_out++;
  end

  task automatic send(bit wr, bank_t b, sch_row_t r, col_t c);
    @(negedge clk);
    sch_in_valid = 1; sch_in_write = wr; sch_in_req = '{bank: b, row: r, col: c};
    do @(posedge clk); while (!sch_in_ready);
    @(negedge clk) sch_in_valid = 0;
  endtask

  real frac_sleep [3][3][3];   // [density][seq][banks]
  int  sref_seen [3];
  initial begin
    int seq_b [3] = '{64, 256, 512};
    int banks [3] = '{1, 4, 8};
    int mult  [3] = '{1, 50, 100};
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    $display("ITTmax  seq  banks |   IDLE    ACT    REF ACT_PDN PRE_PDN   SREF  (%% of time)");
    for (int d = 0; d < 3; d++)
      for (int s = 0; s < 3; s++)
        for (int k = 0; k < 3; k++) begin
          longint t0 [6];
          longint tot;
          int in0, out0, per_row;
          bank_t b; sch_row_t r; col_t c;
          t0 = t_pwr; in0 = n_in; out0 = n_out;
          per_row = seq_b[s] / 64;
          for (int n = 0; n < NREQ; n++) begin
            if (n % per_row == 0) begin
              b = bank_t'($urandom_range(banks[k] - 1));
              r = sch_row_t'($urandom);
              c = col_t'(8 * $urandom_range(127 - per_row + 1) & 10'h3f8);
            end
            send($urandom_range(99) >= 80, b, r, c);
            c = c + 8;
            repeat ($urandom_range(T_CCD, T_PDE * mult[d]) - 1) @(posedge clk);
          end
          while (n_out - out0 < NREQ && sch_in_ready) @(posedge clk);
          repeat (T_PDE * mult[d] / 2) @(posedge clk);
          chk(n_in - in0 == NREQ && n_out - out0 == NREQ,
              $sformatf("setting %0d/%0d/%0d: in %0d out %0d", d, s, k, n_in - in0, n_out - out0));
          tot = 0;
          for (int p = 0; p < 6; p++) tot += t_pwr[p] - t0[p];
          frac_sleep[d][s][k] = real'((t_pwr[PWR_PRE_PDN] - t0[PWR_PRE_PDN]) + (t_pwr[PWR_SREF] - t0[PWR_SREF])) / real'(tot);
          if (t_pwr[PWR_SREF] != t0[PWR_SREF]) sref_seen[d]++;
          $display("%6d %4d %6d | %6.1f %6.1f %6.1f %7.1f %7.1f %6.1f", T_PDE * mult[d], seq_b[s], banks[k],
                   100.0 * (t_pwr[0] - t0[0]) / tot, 100.0 * (t_pwr[1] - t0[1]) / tot,
                   100.0 * (t_pwr[2] - t0[2]) / tot, 100.0 * (t_pwr[3] - t0[3]) / tot,
                   100.0 * (t_pwr[4] - t0[4]) / tot, 100.0 * (t_pwr[5] - t0[5]) / tot);
        end
    for (int d = 1; d < 3; d++) begin
      chk(sref_seen[d] > 0, $sformatf("self refresh reached with gaps up to %0d x tPDE", mult[d]));
      for (int s = 0; s < 3; s++)
        for (int k = 0; k < 3; k++) begin
          chk(frac_sleep[d][s][k] > 0.5, $sformatf("sparse traffic %0d/%0d/%0d mostly asleep (%.2f)", d, s, k, frac_sleep[d][s][k]));
          chk(frac_sleep[d][s][k] > frac_sleep[0][s][k], $sformatf("sparse sleeps more than dense %0d/%0d", s, k));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
