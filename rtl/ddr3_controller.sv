// ddr3_controller: the DDR3 command engine between the user interface and the PHY.
//
// It stays in INIT until the PHY raises phy_init_done (the PHY owns power-up
// initialisation and calibration). It then takes user commands from the
// Address/Command FIFO strictly in order. Each command is mapped to
// row/bank/column (addr_map) and classified by the bank manager, which keeps
// up to four banks open:
//   hit          -> READ/WRITE
//   free slot    -> ACTIVATE, READ/WRITE
//   four open    -> PRECHARGE least recently opened bank, ACTIVATE, READ/WRITE
//   row conflict -> PRECHARGE that bank, ACTIVATE, READ/WRITE
// When the refresh timer asks for a refresh and the controller is between
// commands, it issues PRECHARGE ALL, then AUTO REFRESH, and after tRFC
// re-activates the bank/row of the last access. Rows stay open otherwise
// (open page with at most four open banks).
//
// All of the above follows the document. The state encoding, the exact state
// sequence and the timing bookkeeping are this design's own: per-bank
// down-counters guard ACTIVATE (tRC, tRP, tRFC), READ/WRITE (tRCD) and
// PRECHARGE (tRAS, tRTP, write recovery); shared counters guard tRRD, the
// four-activate window tFAW, tCCD and the read/write turnarounds. A command is
// allowed in the cycle its counter reads zero. One DRAM command is issued per
// clock; the clock is taken to be the DRAM clock (1:1), so the timing
// parameters are in DRAM clock cycles. Defaults are those of a DDR3-1600
// (11-11-11) 1 Gb x16 device.
//
// PHY interface: phy_cmd/phy_bank/phy_addr are valid for the cycle they are
// driven; phy_addr carries the row for ACTIVATE and the burst-aligned column
// for READ/WRITE. Write data and byte mask (mask bit high = byte not written)
// travel with the WRITE command and the PHY applies the write latency. Read
// data comes back from the PHY with phy_rddata_valid and leaves on rd_data
// one clock later with rd_valid, in request order.
module ddr3_controller
  import ddr3_pkg::*;
#(
  parameter addr_map_e   MAP     = MAP_ROW_BANK_COL,
  parameter int unsigned T_RCD   = 11,
  parameter int unsigned T_RP    = 11,
  parameter int unsigned T_RAS   = 28,
  parameter int unsigned T_RC    = 39,
  parameter int unsigned T_CL    = 11,
  parameter int unsigned T_CWL   = 8,
  parameter int unsigned T_BURST = 4,
  parameter int unsigned T_CCD   = 4,
  parameter int unsigned T_WR    = 12,
  parameter int unsigned T_WTR   = 6,
  parameter int unsigned T_RTP   = 6,
  parameter int unsigned T_RRD   = 6,
  parameter int unsigned T_FAW   = 32,
  parameter int unsigned T_RFC   = 88,
  parameter int unsigned T_REFI  = 6240
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 phy_init_done,
  // user interface: Address/Command FIFO
  input  logic                 cmd_empty,
  input  ui_cmd_t              cmd,
  output logic                 cmd_rd_en,
  // user interface: Write Data FIFO
  input  logic                 wdf_empty,
  input  logic [UI_DATA_W-1:0] wdf_data,
  input  logic [UI_MASK_W-1:0] wdf_mask,
  output logic                 wdf_rd_en,
  // user interface: read data
  output logic [UI_DATA_W-1:0] rd_data,
  output logic                 rd_valid,
  // PHY
  output dram_cmd_e            phy_cmd,
  output bank_t                phy_bank,
  output logic [ROW_W-1:0]     phy_addr,
  output logic [UI_DATA_W-1:0] phy_wrdata,
  output logic [UI_MASK_W-1:0] phy_wrmask,
  input  logic [UI_DATA_W-1:0] phy_rddata,
  input  logic                 phy_rddata_valid,
  // status, one-cycle strobe per classified command
  output logic                 stat_decode,
  output bm_decision_e         stat_decision,
  output logic                 stat_refresh
);
  localparam int unsigned CW = 8;   // timing counter width
  typedef logic [CW-1:0] cnt_t;

  function automatic cnt_t ld(cnt_t cur, int unsigned t);
    cnt_t v;
    v = (t == 0) ? cnt_t'(0) : cnt_t'(t - 1);
    return (cur > v) ? cur : v;
  endfunction

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_DECODE, S_PRE, S_ACT, S_COL,
    S_REF_PREA, S_REF, S_REF_WAIT, S_REACT
  } state_e;

  state_e state;

  // current command
  ui_op_e op_q;
  row_t   row_q;
  bank_t  bank_q;
  col_t   col_q;
  bank_t  pre_bank_q;
  // last accessed bank/row, re-opened after a refresh
  logic   last_vld;
  row_t   last_row;
  bank_t  last_bank;

  row_t  m_row;
  bank_t m_bank;
  col_t  m_col;
  addr_map #(.MAP(MAP)) u_map (.addr(cmd.addr), .row(m_row), .bank(m_bank), .col(m_col));

  // bank manager
  bm_decision_e bm_dec;
  bank_t        bm_victim;
  logic         bm_open_en, bm_close_en, bm_close_all;
  bank_t        bm_open_bank, bm_close_bank;
  row_t         bm_open_row;
  logic [2:0]   bm_open_count;
  bank_manager #(.OPEN_MAX(4)) u_bm (
    .clk, .rst_n,
    .lk_bank(bank_q), .lk_row(row_q),
    .decision(bm_dec), .victim_bank(bm_victim),
    .open_en(bm_open_en), .open_bank(bm_open_bank), .open_row(bm_open_row),
    .close_en(bm_close_en), .close_bank(bm_close_bank), .close_all(bm_close_all),
    .open_count(bm_open_count)
  );

  // refresh timer
  logic ref_req, ref_ack, ref_urgent;
  refresh_timer #(.T_REFI(T_REFI)) u_ref (
    .clk, .rst_n, .enable(state != S_INIT), .ref_ack, .ref_req, .ref_urgent
  );

  // timing counters
  cnt_t act_cnt [NUM_BANKS];
  cnt_t col_cnt [NUM_BANKS];
  cnt_t pre_cnt [NUM_BANKS];
  cnt_t rrd_cnt, rd_cnt, wr_cnt;
  cnt_t faw_cnt [4];
  logic [1:0] faw_ptr;

  logic all_pre_ok, all_act_ok;
  always_comb begin
    all_pre_ok = 1'b1;
    all_act_ok = 1'b1;
    for (int b = 0; b < NUM_BANKS; b++) begin
      if (pre_cnt[b] != '0) all_pre_ok = 1'b0;
      if (act_cnt[b] != '0) all_act_ok = 1'b0;
    end
  end

  function automatic logic act_ok(bank_t b);
    return act_cnt[b] == '0 && rrd_cnt == '0 && faw_cnt[faw_ptr] == '0;
  endfunction

  // command decision for this cycle
  dram_cmd_e issue;
  bank_t     issue_bank;
  row_t      issue_addr;
  state_e    nx_state;
  always_comb begin
    issue        = CMD_NOP;
    issue_bank   = bank_q;
    issue_addr   = '0;
    nx_state     = state;
    cmd_rd_en    = 1'b0;
    wdf_rd_en    = 1'b0;
    ref_ack      = 1'b0;
    unique case (state)
      S_INIT:  if (phy_init_done) nx_state = S_IDLE;
      S_IDLE: begin
        if (ref_req)         nx_state = S_REF_PREA;
        else if (!cmd_empty) begin
          cmd_rd_en = 1'b1;
          nx_state  = S_DECODE;
        end
      end
      S_DECODE: begin
        unique case (bm_dec)
          BM_HIT:       nx_state = S_COL;
          BM_OPEN_FREE: nx_state = S_ACT;
          default:      nx_state = S_PRE;
        endcase
      end
      S_PRE: begin
        issue_bank = pre_bank_q;
        if (pre_cnt[pre_bank_q] == '0) begin
          issue    = CMD_PRE;
          nx_state = S_ACT;
        end
      end
      S_ACT: begin
        issue_addr = row_q;
        if (act_ok(bank_q)) begin
          issue    = CMD_ACT;
          nx_state = S_COL;
        end
      end
      S_COL: begin
        issue_addr = ROW_W'({col_q[COL_W-1:3], 3'b000});
        if (col_cnt[bank_q] == '0) begin
          if (op_q == UI_RD && rd_cnt == '0) begin
            issue    = CMD_RD;
            nx_state = S_IDLE;
          end else if (op_q == UI_WR && wr_cnt == '0 && !wdf_empty) begin
            issue     = CMD_WR;
            wdf_rd_en = 1'b1;
            nx_state  = S_IDLE;
          end
        end
      end
      S_REF_PREA: begin
        issue_addr = ROW_W'(1 << 10);   // A10 high: all banks
        if (all_pre_ok) begin
          issue    = CMD_PREA;
          nx_state = S_REF;
        end
      end
      S_REF: begin
        if (all_act_ok) begin
          issue    = CMD_REF;
          ref_ack  = 1'b1;
          nx_state = S_REF_WAIT;
        end
      end
      S_REF_WAIT: if (all_act_ok) nx_state = last_vld ? S_REACT : S_IDLE;
      S_REACT: begin
        issue_bank = last_bank;
        issue_addr = last_row;
        if (act_ok(last_bank)) begin
          issue    = CMD_ACT;
          nx_state = S_IDLE;
        end
      end
      default: nx_state = S_INIT;
    endcase
  end

  // bank manager updates follow the issued command
  always_comb begin
    bm_open_en    = (issue == CMD_ACT);
    bm_open_bank  = issue_bank;
    bm_open_row   = issue_addr;
    bm_close_en   = (issue == CMD_PRE);
    bm_close_bank = issue_bank;
    bm_close_all  = (issue == CMD_PREA);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      op_q       <= UI_RD;
      row_q      <= '0;
      bank_q     <= '0;
      col_q      <= '0;
      pre_bank_q <= '0;
      last_vld   <= 1'b0;
      last_row   <= '0;
      last_bank  <= '0;
      rrd_cnt    <= '0;
      rd_cnt     <= '0;
      wr_cnt     <= '0;
      faw_ptr    <= '0;
      for (int b = 0; b < NUM_BANKS; b++) begin
        act_cnt[b] <= '0; col_cnt[b] <= '0; pre_cnt[b] <= '0;
      end
      for (int i = 0; i < 4; i++) faw_cnt[i] <= '0;
    end else begin
      state <= nx_state;
      if (cmd_rd_en) begin
        op_q   <= cmd.op;
        row_q  <= m_row;
        bank_q <= m_bank;
        col_q  <= m_col;
      end
      if (state == S_DECODE)
        pre_bank_q <= (bm_dec == BM_EVICT_LRO) ? bm_victim : bank_q;
      if (issue == CMD_RD || issue == CMD_WR) begin
        last_vld  <= 1'b1;
        last_row  <= row_q;
        last_bank <= bank_q;
      end

      // count down
      for (int b = 0; b < NUM_BANKS; b++) begin
        act_cnt[b] <= (act_cnt[b] != '0) ? act_cnt[b] - 1'b1 : '0;
        col_cnt[b] <= (col_cnt[b] != '0) ? col_cnt[b] - 1'b1 : '0;
        pre_cnt[b] <= (pre_cnt[b] != '0) ? pre_cnt[b] - 1'b1 : '0;
      end
      for (int i = 0; i < 4; i++) faw_cnt[i] <= (faw_cnt[i] != '0) ? faw_cnt[i] - 1'b1 : '0;
      rrd_cnt <= (rrd_cnt != '0) ? rrd_cnt - 1'b1 : '0;
      rd_cnt  <= (rd_cnt  != '0) ? rd_cnt  - 1'b1 : '0;
      wr_cnt  <= (wr_cnt  != '0) ? wr_cnt  - 1'b1 : '0;

      // reload on issue (overrides the count-down for the affected counters)
      unique case (issue)
        CMD_ACT: begin
          col_cnt[issue_bank] <= ld(col_cnt[issue_bank], T_RCD);
          pre_cnt[issue_bank] <= ld(pre_cnt[issue_bank], T_RAS);
          act_cnt[issue_bank] <= ld(act_cnt[issue_bank], T_RC);
          rrd_cnt             <= ld(rrd_cnt, T_RRD);
          faw_cnt[faw_ptr]    <= ld('0, T_FAW);
          faw_ptr             <= faw_ptr + 1'b1;
        end
        CMD_PRE:
          act_cnt[issue_bank] <= ld(act_cnt[issue_bank], T_RP);
        CMD_PREA:
          for (int b = 0; b < NUM_BANKS; b++) act_cnt[b] <= ld(act_cnt[b], T_RP);
        CMD_REF:
          for (int b = 0; b < NUM_BANKS; b++) act_cnt[b] <= ld(act_cnt[b], T_RFC);
        CMD_RD: begin
          pre_cnt[issue_bank] <= ld(pre_cnt[issue_bank], T_RTP);
          rd_cnt              <= ld(rd_cnt, T_CCD);
          wr_cnt              <= ld(wr_cnt, T_CL + T_CCD + 2 - T_CWL);
        end
        CMD_WR: begin
          pre_cnt[issue_bank] <= ld(pre_cnt[issue_bank], T_CWL + T_BURST + T_WR);
          wr_cnt              <= ld(wr_cnt, T_CCD);
          rd_cnt              <= ld(rd_cnt, T_CWL + T_BURST + T_WTR);
        end
        default: ;
      endcase
    end
  end

  // PHY outputs
  assign phy_cmd    = issue;
  assign phy_bank   = issue_bank;
  assign phy_addr   = issue_addr;
  assign phy_wrdata = wdf_data;
  assign phy_wrmask = wdf_mask;

  // read return path
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      rd_valid <= phy_rddata_valid;
      if (phy_rddata_valid) rd_data <= phy_rddata;
    end
  end

  assign stat_decode   = (state == S_DECODE);
  assign stat_decision = bm_dec;
  assign stat_refresh  = (issue == CMD_REF);

  // A column command may only go to a bank the bank manager holds open.
  a_col_open: assert property (@(posedge clk) disable iff (!rst_n)
    (issue == CMD_RD || issue == CMD_WR) |-> (bm_dec == BM_HIT));

endmodule
