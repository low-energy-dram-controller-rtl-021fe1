// power_down_manager: staggered power-down and refresh control for the
// request scheduler.
//
// It decides when the DRAM may sleep and how it is refreshed, and reports
// the power state the DRAM is in: IDLE, ACT, REF, ACT_PDN, PRE_PDN or SREF.
//  - Awake (IDLE when no bank is open, ACT otherwise): commands may issue
//    (cmd_allow). After T_PDE cycles with no pending request the clock enable
//    is dropped: precharge power-down if all banks are closed, active
//    power-down if one is open.
//  - Refresh while awake: cmd_allow falls; if a bank is open, close_all
//    pulses (PRECHARGE ALL) and the refresh follows T_RP cycles later;
//    ref_issue then pulses (AUTO REFRESH), ref_ack pays the owed refresh back,
//    and the state is REF for T_RFC cycles. If nothing is pending when the
//    refresh ends, precharge power-down is entered at once.
//  - Active power-down is left for a request or a due refresh; precharge
//    power-down is left for a request. Leaving takes T_XP cycles with
//    cmd_allow low.
//  - A refresh that falls due in precharge power-down with nothing pending
//    puts the device into self refresh, which refreshes itself: every owed
//    refresh is acknowledged there. A request ends self refresh after T_XS
//    cycles.
// Power-down modes chosen by whether banks are open, and the entry delay
// tPDE = tRAS + tRP + tCK (40 cycles at DDR3-1600), follow the document. So
// does the state list. The step to self refresh when a refresh is due in
// precharge power-down, the power-down right after a refresh, and the exit
// times tXP = 5 and tXS = tRFC + 10 ns = 96 cycles are this design's choices.
// All outputs are registered except cmd_allow, close_all, ref_issue and
// ref_ack, which are decoded from the registered state in the same cycle.
module power_down_manager
  import ddr3_pkg::*;
#(
  parameter int unsigned T_PDE = 40,
  parameter int unsigned T_XP  = 5,
  parameter int unsigned T_XS  = 96,
  parameter int unsigned T_RP  = 11,
  parameter int unsigned T_RFC = 88
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_pending,   // a request is queued or arriving
  input  logic       any_open,      // a bank is left open
  input  logic       ref_req,       // a refresh is owed
  output logic       ref_ack,       // one owed refresh done
  output logic       close_all,     // PRECHARGE ALL this cycle
  output logic       ref_issue,     // AUTO REFRESH this cycle
  output logic       cmd_allow,     // requests may be served this cycle
  output logic       cke,
  output pwr_state_e state
);
  localparam int unsigned WW = $clog2(T_XS + T_RFC + T_RP + 1);
  localparam int unsigned IW = $clog2(T_PDE + 1);

  pwr_state_e   st;
  logic [WW-1:0] wait_cnt;   // exit, precharge or refresh time still running
  logic [IW-1:0] idle_cnt;   // cycles awake with nothing pending

  wire awake = (st == PWR_IDLE) || (st == PWR_ACT);

  always_comb begin
    close_all = 1'b0;
    ref_issue = 1'b0;
    ref_ack   = 1'b0;
    if (awake && wait_cnt == '0 && ref_req) begin
      if (any_open) close_all = 1'b1;
      else begin ref_issue = 1'b1; ref_ack = 1'b1; end
    end
    if (st == PWR_PRE_PDN && !req_pending && ref_req) ref_ack = 1'b1;
    if (st == PWR_SREF && ref_req) ref_ack = 1'b1;
  end
  assign cmd_allow = awake && wait_cnt == '0 && !ref_req;
  assign cke       = awake || (st == PWR_REF);
  assign state     = st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= PWR_IDLE;
      wait_cnt <= '0;
      idle_cnt <= '0;
    end else begin
      if (wait_cnt != '0) wait_cnt <= wait_cnt - 1'b1;
      unique case (st)
        PWR_IDLE, PWR_ACT: begin
          st <= any_open ? PWR_ACT : PWR_IDLE;
          if (req_pending || wait_cnt != '0 || ref_req) idle_cnt <= '0;
          else if (idle_cnt != IW'(T_PDE)) idle_cnt <= idle_cnt + 1'b1;
          if (wait_cnt == '0) begin
            if (close_all) begin
              st       <= PWR_IDLE;
              wait_cnt <= WW'(T_RP - 1);
            end else if (ref_issue) begin
              st       <= PWR_REF;
              wait_cnt <= WW'(T_RFC - 1);
            end else if (!req_pending && idle_cnt == IW'(T_PDE - 1)) begin
              st       <= any_open ? PWR_ACT_PDN : PWR_PRE_PDN;
              idle_cnt <= '0;
            end
          end
        end
        PWR_REF:
          if (wait_cnt == '0) st <= (req_pending || ref_req) ? PWR_IDLE : PWR_PRE_PDN;
        PWR_ACT_PDN:
          if (req_pending || ref_req) begin
            st       <= PWR_ACT;
            wait_cnt <= WW'(T_XP - 1);
          end
        PWR_PRE_PDN:
          if (req_pending) begin
            st       <= PWR_IDLE;
            wait_cnt <= WW'(T_XP - 1);
          end else if (ref_req) st <= PWR_SREF;
        PWR_SREF:
          if (req_pending) begin
            st       <= PWR_IDLE;
            wait_cnt <= WW'(T_XS - 1);
          end
        default: st <= PWR_IDLE;
      endcase
    end
  end

  // the clock enable is only dropped with nothing left to do
  a_pdn_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (awake && wait_cnt == '0 && !close_all && !ref_issue && req_pending) |=> cke);
endmodule
