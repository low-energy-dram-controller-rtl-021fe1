// tb_power_down_manager: power states, clock enable and refresh handling.
//
// Requests come in phases: busy stretches, short gaps and long idle periods.
// Open banks change only while the DRAM is awake, and refreshes fall due
// every 500 cycles into an owed-refresh counter that ref_ack pays back. A
// reference model written from the rules (power-down after tPDE idle cycles,
// active or precharge power-down by open banks, precharge all before
// refresh, self refresh when a refresh falls due in precharge power-down,
// exit times tXP and tXS) is compared with every output in every cycle.
// Separately, each exit latency from a request to cmd_allow is measured and
// must equal tXP or tXS. Each of the six power states, and each transition
// into power-down, self refresh and refresh, must happen at least once.
`timescale 1ns/1ps
module tb_power_down_manager;
  import ddr3_pkg::*;
  localparam int PDE = 40, XP = 5, XS = 96, RP = 11, RFC = 88;
  logic clk = 0, rst_n = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_pending = 0, any_open = 0, ref_req;
  logic ref_ack, close_all, ref_issue, cmd_allow, cke;
  pwr_state_e state;
  power_down_manager dut (.clk, .rst_n, .req_pending, .any_open, .ref_req, .ref_ack,
                          .close_all, .ref_issue, .cmd_allow, .cke, .state);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // owed refreshes, one more every 500 cycles
  int owed = 0, cyc = 0;
  assign ref_req = (owed != 0);
  always @(posedge clk) if (rst_n) begin
    cyc++;
    owed <= owed + (cyc % 500 == 0) - ref_ack;
  end

  // reference model
  pwr_state_e m_st = PWR_IDLE;
  int m_wait = 0, m_idle = 0;
  bit m_close, m_issue, m_ack, m_allow, m_cke, m_awake;
  always_comb begin
    m_awake = (m_st == PWR_IDLE || m_st == PWR_ACT);
    m_close = m_awake && m_wait == 0 && ref_req && any_open;
    m_issue = m_awake && m_wait == 0 && ref_req && !any_open;
    m_ack   = m_issue || (m_st == PWR_PRE_PDN && !req_pending && ref_req) || (m_st == PWR_SREF && ref_req);
    m_allow = m_awake && m_wait == 0 && !ref_req;
    m_cke   = m_awake || m_st == PWR_REF;
  end

  int n_state [6];
  int n_pdn = 0, n_sref = 0, n_refcmd = 0, n_prea = 0, n_xp = 0, n_xs = 0;
  always @(posedge clk) if (rst_n) begin
    chk(state == m_st, $sformatf("state %s expected %s", state.name(), m_st.name()));
    chk(cke == m_cke && cmd_allow == m_allow, "cke / cmd_allow");
    chk(close_all == m_close && ref_issue == m_issue && ref_ack == m_ack, "refresh outputs");
    n_state[m_st]++;
    if (m_close) n_prea++;
    if (m_issue) n_refcmd++;
    // next state of the model
    if (m_wait > 0) m_wait <= m_wait - 1;
    case (m_st)
      PWR_IDLE, PWR_ACT: begin
        m_st <= any_open ? PWR_ACT : PWR_IDLE;
        if (req_pending || m_wait > 0 || ref_req) m_idle <= 0;
        else if (m_idle < PDE) m_idle <= m_idle + 1;
        if (m_wait == 0) begin
          if (m_close) begin m_st <= PWR_IDLE; m_wait <= RP - 1; end
          else if (m_issue) begin m_st <= PWR_REF; m_wait <= RFC - 1; end
          else if (!req_pending && m_idle == PDE - 1) begin
            m_st <= any_open ? PWR_ACT_PDN : PWR_PRE_PDN; m_idle <= 0; n_pdn++;
          end
        end
      end
      PWR_REF: if (m_wait == 0) begin
        m_st <= (req_pending || ref_req) ? PWR_IDLE : PWR_PRE_PDN;
        if (!(req_pending || ref_req)) n_pdn++;
      end
      PWR_ACT_PDN: if (req_pending || ref_req) begin m_st <= PWR_ACT; m_wait <= XP - 1; end
      PWR_PRE_PDN: if (req_pending) begin m_st <= PWR_IDLE; m_wait <= XP - 1; end
                   else if (ref_req) begin m_st <= PWR_SREF; n_sref++; end
      PWR_SREF: if (req_pending) begin m_st <= PWR_IDLE; m_wait <= XS - 1; end
      default: ;
    endcase
  end

  // exit latency: request seen in power-down or self refresh -> cmd_allow
  always @(posedge clk) if (rst_n && req_pending && !cke && (state == PWR_PRE_PDN || state == PWR_SREF || state == PWR_ACT_PDN)) begin
    automatic int t0 = cyc;
    automatic bit sref = (state == PWR_SREF);
    fork begin
      @(posedge clk);
      while (!cmd_allow && !ref_req) @(posedge clk);
      if (cmd_allow) begin
        chk(cyc - t0 == (sref ? XS : XP), $sformatf("exit time %0d", cyc - t0));
        if (sref) n_xs++; else n_xp++;
      end
    end join_none
  end

  // PRECHARGE ALL seen at a rising edge closes the banks of the stimulus
  bit closed_q = 0;
  always @(posedge clk) closed_q <= close_all;

  // stimulus, changed at the falling edge
  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int ph = 0; ph < 300; ph++) begin
      int len, kind;
      kind = $urandom_range(2);
      len  = kind == 0 ? $urandom_range(50, 300) : kind == 1 ? $urandom_range(5, 60) : $urandom_range(100, 900);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        req_pending = (kind == 0) ? ($urandom_range(3) != 0) : 1'b0;
        if ((state == PWR_IDLE || state == PWR_ACT) && cmd_allow && $urandom_range(15) == 0)
          any_open = $urandom_range(1);
        if (closed_q) any_open = 0;
      end
    end
    @(negedge clk) req_pending = 0;
    repeat (10) @(posedge clk);
    for (int s = 0; s < 6; s++) chk(n_state[s] > 0, $sformatf("state %0d visited", s));
    chk(n_pdn > 0 && n_sref > 0 && n_refcmd > 0 && n_prea > 0, "power-down, self refresh, refresh, precharge all");
    chk(n_xp > 0 && n_xs > 0, "both exit times measured");
    $display("states idle=%0d act=%0d ref=%0d apdn=%0d ppdn=%0d sref=%0d  pdn=%0d sref=%0d ref=%0d prea=%0d xp=%0d xs=%0d",
             n_state[0], n_state[1], n_state[2], n_state[3], n_state[4], n_state[5],
             n_pdn, n_sref, n_refcmd, n_prea, n_xp, n_xs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
