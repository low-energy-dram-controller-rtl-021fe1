// ddr3_pkg: types and constants shared by the DDR3 memory controller.
//
// The memory behind the controller is one x16 DDR3 device (13 row address
// bits, 3 bank address bits, 16 data bits, as on the PHY pin list) used with
// burst length 8, so one column command moves 8 x 16 = 128 bits. The column
// width (10 bits, 1K columns) and the command encoding are this design's
// choices. The controller talks to the PHY with one command per clock.
package ddr3_pkg;

  localparam int unsigned ROW_W     = 13;              // DDR_Addr[12:0]
  localparam int unsigned BANK_W    = 3;               // DDR_BA[2:0]
  localparam int unsigned COL_W     = 10;              // 1K columns per row
  localparam int unsigned DQ_W      = 16;              // Data[15:0]
  localparam int unsigned BURST_LEN = 8;               // BL8
  localparam int unsigned UI_DATA_W = DQ_W * BURST_LEN; // 128 bits per column access
  localparam int unsigned UI_MASK_W = UI_DATA_W / 8;    // one mask bit per byte
  localparam int unsigned NUM_BANKS = 1 << BANK_W;
  // Byte address of the whole device: row + bank + column + byte-in-word bit.
  localparam int unsigned UI_ADDR_W = ROW_W + BANK_W + COL_W + 1;

  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [BANK_W-1:0] bank_t;
  typedef logic [COL_W-1:0]  col_t;

  // Commands the controller issues to the PHY (Table of controller commands).
  typedef enum logic [2:0] {
    CMD_NOP  = 3'd0,
    CMD_ACT  = 3'd1,
    CMD_RD   = 3'd2,
    CMD_WR   = 3'd3,
    CMD_PRE  = 3'd4,  // precharge one bank (A10 low)
    CMD_PREA = 3'd5,  // precharge all banks (A10 high)
    CMD_REF  = 3'd6   // auto refresh
  } dram_cmd_e;

  // User commands: the user can only read or write.
  typedef enum logic {
    UI_RD = 1'b0,
    UI_WR = 1'b1
  } ui_op_e;

  typedef struct packed {
    ui_op_e               op;
    logic [UI_ADDR_W-1:0] addr;
  } ui_cmd_t;

  // Address mapping schemes offered by the controller.
  typedef enum logic {
    MAP_ROW_BANK_COL = 1'b0,
    MAP_BANK_ROW_COL = 1'b1
  } addr_map_e;

  // Decision of the bank manager for one access.
  typedef enum logic [1:0] {
    BM_HIT       = 2'd0,  // bank open with the right row
    BM_OPEN_FREE = 2'd1,  // bank closed, fewer than four open: activate only
    BM_EVICT_LRO = 2'd2,  // bank closed, four open: close least recently opened, activate
    BM_ROW_CONF  = 2'd3   // bank open with another row: precharge it, activate
  } bm_decision_e;

  // Power states of the DRAM as seen by the power-down manager
  typedef enum logic [2:0] {
    PWR_IDLE    = 3'd0,  // all banks precharged, clock enabled
    PWR_ACT     = 3'd1,  // at least one bank open, clock enabled
    PWR_REF     = 3'd2,  // auto refresh in progress
    PWR_ACT_PDN = 3'd3,  // active power-down (CKE low, a bank open)
    PWR_PRE_PDN = 3'd4,  // precharge power-down (CKE low, all banks closed)
    PWR_SREF    = 3'd5   // self refresh
  } pwr_state_e;

  // A request in the read or write queue of the request scheduler. Its
  // memory is a 1 GB rank of eight x8 1 Gb devices: 8 banks of 16384 rows
  // of 1024 columns, 64 bits per column.
  localparam int unsigned SCH_ROW_W = 14;
  typedef logic [SCH_ROW_W-1:0] sch_row_t;
  typedef struct packed {
    bank_t    bank;
    sch_row_t row;
    col_t     col;
  } sched_req_t;

endpackage
