// ddr3_phy_model: behavioural model of the PHY plus one x16 DDR3 device, for
// testbenches only (not synthesizable).
//
// It takes the controller's one-command-per-clock PHY interface, keeps the
// memory contents of the addressed 128-bit bursts in an associative array,
// and returns read data RD_LAT clocks after a READ with phy_rddata_valid.
// A location never written reads as init_word(bank,row,col). It checks the
// DDR3 protocol on its own, from cycle stamps of past commands, and counts
// every violation: bank state (ACT to an open bank, column access to a closed
// bank, REFRESH with a bank open) and the minimum distances tRCD, tRP, tRAS,
// tRC, tRRD, tFAW, tCCD, tRTP, write recovery, tWTR, read-to-write and tRFC.
module ddr3_phy_model
  import ddr3_pkg::*;
#(
  parameter int unsigned T_RCD = 11, T_RP = 11, T_RAS = 28, T_RC = 39,
  parameter int unsigned T_CL = 11, T_CWL = 8, T_BURST = 4, T_CCD = 4,
  parameter int unsigned T_WR = 12, T_WTR = 6, T_RTP = 6, T_RRD = 6,
  parameter int unsigned T_FAW = 32, T_RFC = 88,
  parameter int unsigned RD_LAT = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  dram_cmd_e            phy_cmd,
  input  bank_t                phy_bank,
  input  logic [ROW_W-1:0]     phy_addr,
  input  logic [UI_DATA_W-1:0] phy_wrdata,
  input  logic [UI_MASK_W-1:0] phy_wrmask,
  output logic [UI_DATA_W-1:0] phy_rddata,
  output logic                 phy_rddata_valid
);
  longint now;
  int violations;
  int n_act, n_rd, n_wr, n_pre, n_prea, n_ref;

  logic [UI_DATA_W-1:0] mem [logic [ROW_W+BANK_W+COL_W-1:0]];
  logic  open  [NUM_BANKS];
  row_t  orow  [NUM_BANKS];
  longint t_act [NUM_BANKS], t_pre [NUM_BANKS], t_rd [NUM_BANKS], t_wr [NUM_BANKS];
  longint t_act_any, t_rd_any, t_wr_any, t_pre_any, t_ref;
  longint faw [4];
  int     faw_i;

  // read return pipeline
  logic [UI_DATA_W-1:0] rpipe_d [RD_LAT];
  logic                 rpipe_v [RD_LAT];

  function automatic logic [UI_DATA_W-1:0] init_word(bank_t b, row_t r, col_t c);
    return {8{b, r}} ^ {8{c, 6'h2b}};
  endfunction

  task automatic chk(bit ok, string what);
    if (!ok) begin
      violations++;
      $display("PHY-MODEL VIOLATION at cycle %0d: %s", now, what);
    end
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      now = 0;
      violations = 0;
      n_act = 0; n_rd = 0; n_wr = 0; n_pre = 0; n_prea = 0; n_ref = 0;
      for (int b = 0; b < NUM_BANKS; b++) begin
        open[b] = 1'b0; orow[b] = '0;
        t_act[b] = -1000; t_pre[b] = -1000; t_rd[b] = -1000; t_wr[b] = -1000;
      end
      t_act_any = -1000; t_rd_any = -1000; t_wr_any = -1000; t_pre_any = -1000; t_ref = -1000;
      for (int i = 0; i < 4; i++) faw[i] = -1000;
      faw_i = 0;
      for (int i = 0; i < RD_LAT; i++) begin rpipe_v[i] <= 1'b0; rpipe_d[i] <= '0; end
      phy_rddata_valid <= 1'b0;
      phy_rddata <= '0;
    end else begin
      logic [UI_DATA_W-1:0] rdw;
      logic                 rdv;
      rdv = 1'b0; rdw = '0;
      case (phy_cmd)
        CMD_ACT: begin
          n_act++;
          chk(!open[phy_bank], "ACT to open bank");
          chk(now - t_pre[phy_bank] >= T_RP, "tRP");
          chk(now - t_act[phy_bank] >= T_RC, "tRC");
          chk(now - t_act_any >= T_RRD, "tRRD");
          chk(now - faw[faw_i] >= T_FAW, "tFAW");
          chk(now - t_ref >= T_RFC, "tRFC");
          open[phy_bank] = 1'b1; orow[phy_bank] = phy_addr;
          t_act[phy_bank] = now; t_act_any = now;
          faw[faw_i] = now; faw_i = (faw_i + 1) % 4;
        end
        CMD_RD, CMD_WR: begin
          logic [ROW_W+BANK_W+COL_W-1:0] key;
          col_t c;
          c = phy_addr[COL_W-1:0];
          chk(open[phy_bank], "column command to closed bank");
          chk(now - t_act[phy_bank] >= T_RCD, "tRCD");
          chk(c[2:0] == 3'b000, "column not burst aligned");
          key = {phy_bank, orow[phy_bank], c};
          if (phy_cmd == CMD_RD) begin
            n_rd++;
            chk(now - t_rd_any >= T_CCD, "tCCD read");
            chk(now - t_wr_any >= T_CWL + T_BURST + T_WTR, "tWTR");
            rdv = 1'b1;
            rdw = mem.exists(key) ? mem[key] : init_word(phy_bank, orow[phy_bank], c);
            t_rd[phy_bank] = now; t_rd_any = now;
          end else begin
            logic [UI_DATA_W-1:0] w;
            n_wr++;
            chk(now - t_wr_any >= T_CCD, "tCCD write");
            chk(now - t_rd_any >= T_CL + T_CCD + 2 - T_CWL, "read to write");
            w = mem.exists(key) ? mem[key] : init_word(phy_bank, orow[phy_bank], c);
            for (int i = 0; i < UI_MASK_W; i++)
              if (!phy_wrmask[i]) w[i*8 +: 8] = phy_wrdata[i*8 +: 8];
            mem[key] = w;
            t_wr[phy_bank] = now; t_wr_any = now;
          end
        end
        CMD_PRE, CMD_PREA: begin
          for (int b = 0; b < NUM_BANKS; b++) begin
            if ((phy_cmd == CMD_PREA || bank_t'(b) == phy_bank) && open[b]) begin
              chk(now - t_act[b] >= T_RAS, "tRAS");
              chk(now - t_rd[b] >= T_RTP, "tRTP");
              chk(now - t_wr[b] >= T_CWL + T_BURST + T_WR, "write recovery");
              open[b] = 1'b0;
            end
            if (phy_cmd == CMD_PREA || bank_t'(b) == phy_bank) t_pre[b] = now;
          end
          if (phy_cmd == CMD_PREA) begin
            n_prea++;
            chk(phy_addr[10], "PREA without A10");
          end else n_pre++;
          t_pre_any = now;
        end
        CMD_REF: begin
          n_ref++;
          for (int b = 0; b < NUM_BANKS; b++) chk(!open[b], "REF with bank open");
          chk(now - t_pre_any >= T_RP, "tRP before REF");
          chk(now - t_ref >= T_RFC, "tRFC between REF");
          t_ref = now;
        end
        default: ;
      endcase
      rpipe_v[0] <= rdv;
      rpipe_d[0] <= rdw;
      for (int i = 1; i < RD_LAT; i++) begin
        rpipe_v[i] <= rpipe_v[i-1];
        rpipe_d[i] <= rpipe_d[i-1];
      end
      phy_rddata_valid <= rpipe_v[RD_LAT-1];
      phy_rddata       <= rpipe_d[RD_LAT-1];
      now++;
    end
  end

endmodule
