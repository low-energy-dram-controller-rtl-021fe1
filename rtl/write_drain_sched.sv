// write_drain_sched: request scheduler with the row-locality write drain.
//
// Reads and writes wait in separate age-ordered queues (32 read and 64 write
// entries, the sizes of the evaluated configuration). The scheduler keeps the
// open row of every bank, as it results from its own decisions, and calls a
// queued request a "row hit" when its bank is open on its row. One request
// leaves per handshake on the out_* port, with an auto-precharge flag.
//
// Direction (read mode / write mode), following the proposed policy:
//  - Read mode: row-hit reads first, then the oldest read. When the write
//    queue reaches the high watermark, writes take over only once no row-hit
//    read is left. With no read queued, writes are served (row hits first)
//    without changing mode.
//  - Write mode: row-hit writes are issued back to back even while reads
//    wait. With no row-hit write left, the scheduler returns to reads if a
//    row-hit read exists; otherwise it drains the oldest write until the queue
//    is down to the low watermark, then returns to reads.
// Page decision (delayed adaptive closed page): after a request the row is
// closed (auto precharge) unless at least KEEP_THRESH other queued requests
// target the same row (adaptive closed page), or the bank's keep_open input
// from page_policy is high, in which case the precharge is postponed because
// the read history shows locality in that bank.
// close_all (PRECHARGE ALL before a refresh) marks every bank closed;
// open_banks tells the power-down manager which banks are still open.
//
// The document gives the policy; the watermark values (85 % and 50 % of the
// write queue), KEEP_THRESH = 1, continuing the conventional drain to the low
// watermark when no row hit exists on either side, and serving writes when no
// read is queued are this design's choices. Combinational search over both
// queues picks the request in the same cycle it is offered.
module write_drain_sched
  import ddr3_pkg::*;
#(
  parameter int unsigned RQ_DEPTH    = 32,
  parameter int unsigned WQ_DEPTH    = 64,
  parameter int unsigned HIGH_WM     = 54,
  parameter int unsigned LOW_WM      = 32,
  parameter int unsigned KEEP_THRESH = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // incoming requests
  input  logic                 in_valid,
  input  logic                 in_write,
  input  sched_req_t           in_req,
  output logic                 in_ready,
  // scheduled requests
  output logic                 out_valid,
  output logic                 out_write,
  output sched_req_t           out_req,
  output logic                 out_row_hit,   // bank already open on this row
  output logic                 out_autopre,   // close the row after this access
  input  logic                 out_ready,
  // page policy
  input  logic [NUM_BANKS-1:0] keep_open,
  // status
  output logic                 write_mode,
  output logic                 stat_switch_rd,  // write -> read switch on a row-hit read
  output logic                 stat_wm_drain,   // write issued by the watermark drain
  // row state shared with the power-down manager
  input  logic                 close_all,       // all banks precharged (before refresh)
  output logic [NUM_BANKS-1:0] open_banks       // banks this scheduler left open
);
  localparam int unsigned RW = $clog2(RQ_DEPTH);
  localparam int unsigned WW = $clog2(WQ_DEPTH);

  // queues
  sched_req_t rq [RQ_DEPTH];
  sched_req_t wq [WQ_DEPTH];
  logic [RQ_DEPTH-1:0] rq_vld;
  logic [WQ_DEPTH-1:0] wq_vld;
  logic [RW:0] rq_cnt;
  logic [WW:0] wq_cnt;
  logic rq_full, wq_full;
  logic rq_rm, wq_rm;
  logic [RW-1:0] rq_rm_idx;
  logic [WW-1:0] wq_rm_idx;

  assign in_ready = in_write ? !wq_full : !rq_full;

  req_queue #(.DEPTH(RQ_DEPTH)) u_rq (
    .clk, .rst_n, .push(in_valid && !in_write), .push_req(in_req),
    .rm(rq_rm), .rm_idx(rq_rm_idx), .q(rq), .vld(rq_vld), .count(rq_cnt), .full(rq_full));
  req_queue #(.DEPTH(WQ_DEPTH)) u_wq (
    .clk, .rst_n, .push(in_valid && in_write), .push_req(in_req),
    .rm(wq_rm), .rm_idx(wq_rm_idx), .q(wq), .vld(wq_vld), .count(wq_cnt), .full(wq_full));

  // open rows
  logic [NUM_BANKS-1:0] bank_open;
  sch_row_t             open_row [NUM_BANKS];

  function automatic logic is_hit(sched_req_t r);
    return bank_open[r.bank] && open_row[r.bank] == r.row;
  endfunction

  // oldest row hit in each queue
  logic          rq_hit, wq_hit;
  logic [RW-1:0] rq_hit_idx;
  logic [WW-1:0] wq_hit_idx;
  always_comb begin
    rq_hit = 1'b0; rq_hit_idx = '0;
    for (int i = RQ_DEPTH-1; i >= 0; i--)
      if (rq_vld[i] && is_hit(rq[i])) begin rq_hit = 1'b1; rq_hit_idx = RW'(i); end
    wq_hit = 1'b0; wq_hit_idx = '0;
    for (int i = WQ_DEPTH-1; i >= 0; i--)
      if (wq_vld[i] && is_hit(wq[i])) begin wq_hit = 1'b1; wq_hit_idx = WW'(i); end
  end

  wire rq_any = rq_vld[0];
  wire wq_any = wq_vld[0];
  wire drain_start = (wq_cnt >= (WW+1)'(HIGH_WM));

  // choose the request and the next mode
  logic          pick_w, pick_valid, nx_mode;
  logic [RW-1:0] pick_r_idx;
  logic [WW-1:0] pick_w_idx;
  logic          sw_rd, wm_drain;
  always_comb begin
    pick_valid = 1'b0;
    pick_w     = 1'b0;
    pick_r_idx = '0;
    pick_w_idx = '0;
    nx_mode    = write_mode;
    sw_rd      = 1'b0;
    wm_drain   = 1'b0;
    if (write_mode) begin
      if (wq_hit) begin
        pick_valid = 1'b1; pick_w = 1'b1; pick_w_idx = wq_hit_idx;
      end else if (rq_hit) begin
        nx_mode = 1'b0; sw_rd = 1'b1;
        pick_valid = 1'b1; pick_r_idx = rq_hit_idx;
      end else if (wq_cnt > (WW+1)'(LOW_WM)) begin
        pick_valid = 1'b1; pick_w = 1'b1; wm_drain = 1'b1;
      end else begin
        nx_mode = 1'b0;
        if (rq_any)      pick_valid = 1'b1;
        else if (wq_any) begin pick_valid = 1'b1; pick_w = 1'b1; end
      end
    end else begin
      if (rq_hit) begin
        pick_valid = 1'b1; pick_r_idx = rq_hit_idx;
      end else if (drain_start) begin
        nx_mode = 1'b1;
        pick_valid = 1'b1; pick_w = 1'b1; pick_w_idx = wq_hit ? wq_hit_idx : '0;
        wm_drain = !wq_hit;
      end else if (rq_any) begin
        pick_valid = 1'b1;
      end else if (wq_any) begin
        pick_valid = 1'b1; pick_w = 1'b1; pick_w_idx = wq_hit ? wq_hit_idx : '0;
      end
    end
  end

  // page decision: other queued requests to the same row
  sched_req_t sel;
  logic [7:0] same_row;
  always_comb begin
    sel = pick_w ? wq[pick_w_idx] : rq[pick_r_idx];
    same_row = '0;
    for (int i = 0; i < RQ_DEPTH; i++)
      if (rq_vld[i] && rq[i].bank == sel.bank && rq[i].row == sel.row &&
          !(!pick_w && RW'(i) == pick_r_idx)) same_row = same_row + 1'b1;
    for (int i = 0; i < WQ_DEPTH; i++)
      if (wq_vld[i] && wq[i].bank == sel.bank && wq[i].row == sel.row &&
          !(pick_w && WW'(i) == pick_w_idx)) same_row = same_row + 1'b1;
  end

  assign out_valid   = pick_valid;
  assign out_write   = pick_w;
  assign out_req     = sel;
  assign out_row_hit = is_hit(sel);
  assign out_autopre = !(keep_open[sel.bank] || same_row >= 8'(KEEP_THRESH));

  wire fire = pick_valid && out_ready;
  assign rq_rm     = fire && !pick_w;
  assign rq_rm_idx = pick_r_idx;
  assign wq_rm     = fire && pick_w;
  assign wq_rm_idx = pick_w_idx;

  assign stat_switch_rd = fire && sw_rd;
  assign stat_wm_drain  = fire && wm_drain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      write_mode <= 1'b0;
      bank_open  <= '0;
      for (int b = 0; b < NUM_BANKS; b++) open_row[b] <= '0;
    end else begin
      if (fire) begin
        write_mode <= nx_mode;
        bank_open[sel.bank] <= !out_autopre;
        open_row[sel.bank]  <= sel.row;
      end
      if (close_all) bank_open <= '0;
    end
  end
  assign open_banks = bank_open;

endmodule
