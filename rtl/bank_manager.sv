// bank_manager: keeps the table of open bank/rows and classifies accesses.
//
// Up to OPEN_MAX (four) bank/rows are held open. The table is kept in opening
// order: entry 0 is the least recently opened (LRO) bank, new entries go to the
// end. For a looked-up (bank,row) the combinational output says:
//   BM_HIT       the bank is open on that row: read or write directly;
//   BM_ROW_CONF  the bank is open on another row: precharge it, activate;
//   BM_EVICT_LRO the bank is closed and four are open: precharge the LRO
//                bank (victim_bank), activate the new one;
//   BM_OPEN_FREE the bank is closed and a slot is free: activate only.
// The controller reports what it did with one-cycle strobes: open (bank,row)
// after an ACTIVATE, close_bank after a single-bank PRECHARGE and close_all
// after PRECHARGE ALL. A bank reopened on a new row moves to the end of the
// order, being the most recently opened. This follows the bank management text
// and its flow chart; the ordered-table realisation is this design's own.
module bank_manager
  import ddr3_pkg::*;
#(
  parameter int unsigned OPEN_MAX = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  // lookup
  input  bank_t         lk_bank,
  input  row_t          lk_row,
  output bm_decision_e  decision,
  output bank_t         victim_bank,
  // updates
  input  logic          open_en,
  input  bank_t         open_bank,
  input  row_t          open_row,
  input  logic          close_en,
  input  bank_t         close_bank,
  input  logic          close_all,
  // status
  output logic [$clog2(OPEN_MAX+1)-1:0] open_count
);
  localparam int unsigned CW = $clog2(OPEN_MAX+1);

  typedef struct packed {
    bank_t bank;
    row_t  row;
  } entry_t;

  entry_t          tbl [OPEN_MAX];
  logic [CW-1:0]   cnt;

  // lookup
  logic bank_hit, row_hit;
  always_comb begin
    bank_hit = 1'b0;
    row_hit  = 1'b0;
    for (int i = 0; i < OPEN_MAX; i++) begin
      if (CW'(i) < cnt && tbl[i].bank == lk_bank) begin
        bank_hit = 1'b1;
        row_hit  = (tbl[i].row == lk_row);
      end
    end
    if (bank_hit)                   decision = row_hit ? BM_HIT : BM_ROW_CONF;
    else if (cnt == CW'(OPEN_MAX))  decision = BM_EVICT_LRO;
    else                            decision = BM_OPEN_FREE;
  end
  assign victim_bank = tbl[0].bank;
  assign open_count  = cnt;

  // Table update: first remove the bank being closed or reopened, compacting
  // the order, then append the newly opened bank/row.
  entry_t        nx_tbl [OPEN_MAX];
  logic [CW-1:0] nx_cnt;
  always_comb begin
    entry_t        tmp [OPEN_MAX];
    logic [CW-1:0] k;
    bank_t         rm_bank;
    logic          rm;
    rm      = close_en || open_en;
    rm_bank = close_en ? close_bank : open_bank;
    k = '0;
    for (int i = 0; i < OPEN_MAX; i++) tmp[i] = '0;
    for (int i = 0; i < OPEN_MAX; i++) begin
      if (CW'(i) < cnt && !(rm && tbl[i].bank == rm_bank)) begin
        tmp[k[$clog2(OPEN_MAX)-1:0]] = tbl[i];
        k = k + 1'b1;
      end
    end
    if (open_en && k < CW'(OPEN_MAX)) begin
      tmp[k[$clog2(OPEN_MAX)-1:0]] = '{bank: open_bank, row: open_row};
      k = k + 1'b1;
    end
    if (close_all) k = '0;
    nx_tbl = tmp;
    nx_cnt = k;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < OPEN_MAX; i++) tbl[i] <= '0;
    end else begin
      cnt <= nx_cnt;
      tbl <= nx_tbl;
    end
  end

endmodule
