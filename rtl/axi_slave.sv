// axi_slave: AXI4 slave port of the memory controller.
//
// It turns AXI4 read and write bursts into user interface commands, one
// command per beat (one beat = one 128-bit DRAM burst). One transaction is
// handled at a time. Arbitration between the read and write address channels
// gives reads priority: a write burst is taken when no read address is
// pending, or when RD_WAIT_LIMIT (16) read bursts have been granted while the
// write was waiting. This read-priority scheme and the limit of 16 follow the
// document; the rest is this design's choice:
//  - Beat addresses follow AXI4 INCR and FIXED bursts with the beat size from
//    AxSIZE; a WRAP burst is handled like INCR. The user interface address is
//    the beat address aligned down to 16 bytes.
//  - Writes: each accepted W beat pushes a write command and its data into the
//    two user interface FIFOs in the same cycle (WSTRB low -> byte masked);
//    the OKAY response is sent once the last beat has been queued.
//  - Reads: read commands are issued only while the return buffer
//    (RBUF_DEPTH words) has room for all data in flight, so read data from the
//    user interface, which cannot be stalled, is never lost; R beats are
//    served from that buffer with RLAST on the last one.
// Responses are always OKAY.
module axi_slave
  import ddr3_pkg::*;
#(
  parameter int unsigned ID_W          = 4,
  parameter int unsigned ADDR_W        = 32,
  parameter int unsigned RD_WAIT_LIMIT = 16,
  parameter int unsigned RBUF_DEPTH    = 16
) (
  input  logic                 aclk,
  input  logic                 aresetn,
  // write address
  input  logic [ID_W-1:0]      s_awid,
  input  logic [ADDR_W-1:0]    s_awaddr,
  input  logic [7:0]           s_awlen,
  input  logic [2:0]           s_awsize,
  input  logic [1:0]           s_awburst,
  input  logic                 s_awvalid,
  output logic                 s_awready,
  // write data
  input  logic [UI_DATA_W-1:0] s_wdata,
  input  logic [UI_MASK_W-1:0] s_wstrb,
  input  logic                 s_wlast,
  input  logic                 s_wvalid,
  output logic                 s_wready,
  // write response
  output logic [ID_W-1:0]      s_bid,
  output logic [1:0]           s_bresp,
  output logic                 s_bvalid,
  input  logic                 s_bready,
  // read address
  input  logic [ID_W-1:0]      s_arid,
  input  logic [ADDR_W-1:0]    s_araddr,
  input  logic [7:0]           s_arlen,
  input  logic [2:0]           s_arsize,
  input  logic [1:0]           s_arburst,
  input  logic                 s_arvalid,
  output logic                 s_arready,
  // read data
  output logic [ID_W-1:0]      s_rid,
  output logic [UI_DATA_W-1:0] s_rdata,
  output logic [1:0]           s_rresp,
  output logic                 s_rlast,
  output logic                 s_rvalid,
  input  logic                 s_rready,
  // user interface
  output logic                 app_cmd_en,
  output ui_cmd_t              app_cmd,
  input  logic                 app_cmd_full,
  output logic                 app_wdf_en,
  output logic [UI_DATA_W-1:0] app_wdf_data,
  output logic [UI_MASK_W-1:0] app_wdf_mask,
  input  logic                 app_wdf_full,
  input  logic [UI_DATA_W-1:0] app_rd_data,
  input  logic                 app_rd_valid,
  // status: one-cycle strobes
  output logic                 stat_rd_grant,
  output logic                 stat_wr_grant,
  output logic                 stat_wr_forced   // write granted by the wait limit
);
  localparam logic [1:0] BURST_FIXED = 2'b00;
  localparam int unsigned RBW = $clog2(RBUF_DEPTH);
  localparam int unsigned LW  = $clog2(RD_WAIT_LIMIT+1);

  typedef enum logic [1:0] {A_IDLE, A_RD, A_WR, A_B} astate_e;
  astate_e st;

  logic [ID_W-1:0]   id_q;
  logic [ADDR_W-1:0] addr_q;
  logic [7:0]        len_q;
  logic [ADDR_W-1:0] step_q;
  logic [8:0]        issued;     // read commands issued in this burst
  logic [8:0]        sent;       // R beats sent in this burst
  logic [RBW:0]      inflight;   // read commands whose data has not come back
  logic [LW-1:0]     rd_wait;

  // arbitration
  logic grant_wr, grant_rd;
  always_comb begin
    grant_wr = (st == A_IDLE) && s_awvalid && (!s_arvalid || rd_wait >= LW'(RD_WAIT_LIMIT));
    grant_rd = (st == A_IDLE) && s_arvalid && !grant_wr;
  end
  assign s_awready      = grant_wr;
  assign s_arready      = grant_rd;
  assign stat_rd_grant  = grant_rd;
  assign stat_wr_grant  = grant_wr;
  assign stat_wr_forced = grant_wr && s_arvalid;

  // read return buffer
  logic              rb_empty, rb_full, rb_aempty, rb_pop;
  logic [RBW:0]      rb_count;
  logic [UI_DATA_W-1:0] rb_data;
  cmd_fifo #(.WIDTH(UI_DATA_W), .DEPTH(RBUF_DEPTH), .AEMPTY_LEVEL(0)) u_rbuf (
    .clk(aclk), .rst_n(aresetn),
    .wr_en(app_rd_valid), .wr_data(app_rd_data), .full(rb_full),
    .rd_en(rb_pop), .rd_data(rb_data), .empty(rb_empty),
    .almost_empty(rb_aempty), .count(rb_count)
  );

  // command generation
  wire rd_issue = (st == A_RD) && (issued <= {1'b0, len_q}) && !app_cmd_full &&
                  ((inflight + rb_count) < (RBW+1)'(RBUF_DEPTH));
  wire wr_beat  = (st == A_WR) && s_wvalid && !app_cmd_full && !app_wdf_full;

  assign s_wready     = wr_beat;
  assign app_cmd_en   = rd_issue || wr_beat;
  assign app_cmd.op   = wr_beat ? UI_WR : UI_RD;
  assign app_cmd.addr = {addr_q[UI_ADDR_W-1:4], 4'b0000};
  assign app_wdf_en   = wr_beat;
  assign app_wdf_data = s_wdata;
  assign app_wdf_mask = ~s_wstrb;

  // read data channel
  assign s_rvalid = (st == A_RD) && !rb_empty;
  assign s_rdata  = rb_data;
  assign s_rid    = id_q;
  assign s_rresp  = 2'b00;
  assign s_rlast  = (sent[7:0] == len_q);
  assign rb_pop   = s_rvalid && s_rready;

  // write response
  assign s_bvalid = (st == A_B);
  assign s_bid    = id_q;
  assign s_bresp  = 2'b00;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      st       <= A_IDLE;
      id_q     <= '0;
      addr_q   <= '0;
      len_q    <= '0;
      step_q   <= '0;
      issued   <= '0;
      sent     <= '0;
      inflight <= '0;
      rd_wait  <= '0;
    end else begin
      inflight <= inflight + (RBW+1)'(rd_issue) - (RBW+1)'(app_rd_valid);
      unique case (st)
        A_IDLE: begin
          issued <= '0;
          sent   <= '0;
          if (grant_wr) begin
            st      <= A_WR;
            id_q    <= s_awid;
            addr_q  <= s_awaddr;
            len_q   <= s_awlen;
            step_q  <= (s_awburst == BURST_FIXED) ? '0 : ADDR_W'(1) << s_awsize;
            rd_wait <= '0;
          end else if (grant_rd) begin
            st      <= A_RD;
            id_q    <= s_arid;
            addr_q  <= s_araddr;
            len_q   <= s_arlen;
            step_q  <= (s_arburst == BURST_FIXED) ? '0 : ADDR_W'(1) << s_arsize;
            if (s_awvalid && rd_wait < LW'(RD_WAIT_LIMIT)) rd_wait <= rd_wait + 1'b1;
          end
        end
        A_RD: begin
          if (rd_issue) begin
            issued <= issued + 1'b1;
            addr_q <= addr_q + step_q;
          end
          if (rb_pop) begin
            sent <= sent + 1'b1;
            if (s_rlast) st <= A_IDLE;
          end
        end
        A_WR: begin
          if (wr_beat) begin
            addr_q <= addr_q + step_q;
            if (s_wlast) st <= A_B;
          end
        end
        A_B: if (s_bready) st <= A_IDLE;
        default: st <= A_IDLE;
      endcase
    end
  end

  // The return buffer is sized so it can never overflow.
  a_rbuf_no_overflow: assert property (@(posedge aclk) disable iff (!aresetn)
    app_rd_valid |-> !rb_full);

endmodule
