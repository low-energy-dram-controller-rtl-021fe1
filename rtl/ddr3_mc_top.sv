// ddr3_mc_top: low-energy DDR3 memory controller, top level.
//
// Two parts stand side by side and share only clock and reset:
//
// 1. The DDR3 controller for an FPGA system (AXI4 bus to PHY):
//      AXI4 slave  ->  user interface (Address/Command FIFO, Write Data FIFO)
//      ->  controller (address mapping, bank management of up to four open
//      banks, refresh, DDR3 timing)  ->  PHY command/data ports.
//    The PHY itself (vendor I/O, calibration, initialisation) is outside; its
//    controller-side signals are the phy_* ports, and phy_init_done holds the
//    controller idle until the PHY has initialised the memory.
//
// 2. The proposed request scheduler: separate read and write queues with the
//    row-locality write drain policy (write_drain_sched) and the delayed
//    adaptive closed-page policy (page_policy), which learns per bank from
//    the reads and activates the scheduler issues. It has its own request
//    input (sch_in_*) and scheduled output (sch_out_*). Its DRAM is refreshed
//    and put into power-down or self refresh by power_down_manager with a
//    refresh timer of its own; requests leave the scheduler only while that
//    manager allows commands.
//
// Everything runs on clk; the Write Data FIFO is asynchronous by design but
// both of its clocks are clk here. Timing, mapping and queue parameters keep
// their module defaults (DDR3-1600, 1 Gb x16, Row/Bank/Column mapping, 32/64
// entry queues).
module ddr3_mc_top
  import ddr3_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // AXI4 slave
  input  logic [3:0]           s_awid,
  input  logic [31:0]          s_awaddr,
  input  logic [7:0]           s_awlen,
  input  logic [2:0]           s_awsize,
  input  logic [1:0]           s_awburst,
  input  logic                 s_awvalid,
  output logic                 s_awready,
  input  logic [UI_DATA_W-1:0] s_wdata,
  input  logic [UI_MASK_W-1:0] s_wstrb,
  input  logic                 s_wlast,
  input  logic                 s_wvalid,
  output logic                 s_wready,
  output logic [3:0]           s_bid,
  output logic [1:0]           s_bresp,
  output logic                 s_bvalid,
  input  logic                 s_bready,
  input  logic [3:0]           s_arid,
  input  logic [31:0]          s_araddr,
  input  logic [7:0]           s_arlen,
  input  logic [2:0]           s_arsize,
  input  logic [1:0]           s_arburst,
  input  logic                 s_arvalid,
  output logic                 s_arready,
  output logic [3:0]           s_rid,
  output logic [UI_DATA_W-1:0] s_rdata,
  output logic [1:0]           s_rresp,
  output logic                 s_rlast,
  output logic                 s_rvalid,
  input  logic                 s_rready,
  // PHY
  input  logic                 phy_init_done,
  output dram_cmd_e            phy_cmd,
  output bank_t                phy_bank,
  output logic [ROW_W-1:0]     phy_addr,
  output logic [UI_DATA_W-1:0] phy_wrdata,
  output logic [UI_MASK_W-1:0] phy_wrmask,
  input  logic [UI_DATA_W-1:0] phy_rddata,
  input  logic                 phy_rddata_valid,
  // controller status
  output logic                 ui_cmd_almost_empty,
  output logic                 stat_decode,
  output bm_decision_e         stat_decision,
  output logic                 stat_refresh,
  output logic                 stat_wr_forced,
  // proposed request scheduler
  input  logic                 sch_in_valid,
  input  logic                 sch_in_write,
  input  sched_req_t           sch_in_req,
  output logic                 sch_in_ready,
  output logic                 sch_out_valid,
  output logic                 sch_out_write,
  output sched_req_t           sch_out_req,
  output logic                 sch_out_row_hit,
  output logic                 sch_out_autopre,
  input  logic                 sch_out_ready,
  output logic                 sch_write_mode,
  output logic [NUM_BANKS-1:0] sch_keep_open,
  output logic                 sch_stat_switch_rd,
  output logic                 sch_stat_wm_drain,
  output logic                 sch_epoch_tick,
  // power-down and refresh of the scheduler's DRAM
  output pwr_state_e           sch_pwr_state,
  output logic                 sch_cke,
  output logic                 sch_prea,        // PRECHARGE ALL
  output logic                 sch_ref          // AUTO REFRESH
);
  // ---------------- AXI4 slave -> user interface ----------------
  logic                 app_cmd_en, app_cmd_full, app_wdf_en, app_wdf_full, app_rd_valid;
  ui_cmd_t              app_cmd;
  logic [UI_DATA_W-1:0] app_wdf_data, app_rd_data;
  logic [UI_MASK_W-1:0] app_wdf_mask;
  logic                 stat_rd_grant, stat_wr_grant;

  axi_slave u_axi (
    .aclk(clk), .aresetn(rst_n),
    .s_awid, .s_awaddr, .s_awlen, .s_awsize, .s_awburst, .s_awvalid, .s_awready,
    .s_wdata, .s_wstrb, .s_wlast, .s_wvalid, .s_wready,
    .s_bid, .s_bresp, .s_bvalid, .s_bready,
    .s_arid, .s_araddr, .s_arlen, .s_arsize, .s_arburst, .s_arvalid, .s_arready,
    .s_rid, .s_rdata, .s_rresp, .s_rlast, .s_rvalid, .s_rready,
    .app_cmd_en, .app_cmd, .app_cmd_full,
    .app_wdf_en, .app_wdf_data, .app_wdf_mask, .app_wdf_full,
    .app_rd_data, .app_rd_valid,
    .stat_rd_grant, .stat_wr_grant, .stat_wr_forced
  );

  // ---------------- user interface -> controller ----------------
  logic                 cmd_empty, cmd_rd_en, wdf_empty, wdf_rd_en, ctl_rd_valid;
  ui_cmd_t              cmd;
  logic [UI_DATA_W-1:0] wdf_data, ctl_rd_data;
  logic [UI_MASK_W-1:0] wdf_mask;

  user_interface u_ui (
    .clk, .rst_n, .wdf_wr_clk(clk), .wdf_wr_rst_n(rst_n),
    .app_cmd_en, .app_cmd, .app_cmd_full,
    .app_wdf_en, .app_wdf_data, .app_wdf_mask, .app_wdf_full,
    .app_rd_data, .app_rd_valid,
    .cmd_empty, .cmd_almost_empty(ui_cmd_almost_empty), .cmd, .cmd_rd_en,
    .wdf_empty, .wdf_data, .wdf_mask, .wdf_rd_en,
    .ctl_rd_data, .ctl_rd_valid
  );

  ddr3_controller u_ctl (
    .clk, .rst_n, .phy_init_done,
    .cmd_empty, .cmd, .cmd_rd_en,
    .wdf_empty, .wdf_data, .wdf_mask, .wdf_rd_en,
    .rd_data(ctl_rd_data), .rd_valid(ctl_rd_valid),
    .phy_cmd, .phy_bank, .phy_addr, .phy_wrdata, .phy_wrmask,
    .phy_rddata, .phy_rddata_valid,
    .stat_decode, .stat_decision, .stat_refresh
  );

  // ---------------- proposed request scheduler ----------------
  // Requests leave the scheduler only while the power-down manager allows
  // commands (DRAM awake, no refresh due, exit time over).
  logic                 pdn_allow, sched_valid, sref_req, sref_ack;
  logic [NUM_BANKS-1:0] sched_open;

  write_drain_sched u_sched (
    .clk, .rst_n,
    .in_valid(sch_in_valid), .in_write(sch_in_write), .in_req(sch_in_req), .in_ready(sch_in_ready),
    .out_valid(sched_valid), .out_write(sch_out_write), .out_req(sch_out_req),
    .out_row_hit(sch_out_row_hit), .out_autopre(sch_out_autopre), .out_ready(sch_out_ready && pdn_allow),
    .keep_open(sch_keep_open), .write_mode(sch_write_mode),
    .stat_switch_rd(sch_stat_switch_rd), .stat_wm_drain(sch_stat_wm_drain),
    .close_all(sch_prea), .open_banks(sched_open)
  );
  assign sch_out_valid = sched_valid && pdn_allow;

  refresh_timer u_sch_ref (
    .clk, .rst_n, .enable(1'b1), .ref_ack(sref_ack), .ref_req(sref_req), .ref_urgent()
  );

  power_down_manager u_pdn (
    .clk, .rst_n,
    .req_pending(sched_valid || sch_in_valid), .any_open(|sched_open),
    .ref_req(sref_req), .ref_ack(sref_ack), .close_all(sch_prea), .ref_issue(sch_ref),
    .cmd_allow(pdn_allow), .cke(sch_cke), .state(sch_pwr_state)
  );

  wire sch_fire = sch_out_valid && sch_out_ready;
  page_policy u_page (
    .clk, .rst_n,
    .rd_evt(sch_fire && !sch_out_write), .rd_bank(sch_out_req.bank),
    .act_evt(sch_fire && !sch_out_row_hit), .act_bank(sch_out_req.bank),
    .keep_open(sch_keep_open), .epoch_tick(sch_epoch_tick)
  );

endmodule
