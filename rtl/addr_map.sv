// addr_map: splits a user byte address into DRAM row, bank and column.
//
// Two schemes, selected by the MAP parameter, as the document offers:
//  - Row/Bank/Column: the bank bits sit just above the column bits, so
//    consecutive rows' worth of data spread across banks (bank parallelism).
//  - Bank/Row/Column: the bank bits are the top bits, so a contiguous region
//    stays in one bank and the other banks can stay idle (row parallelism).
// Bit 0 selects a byte within a 16-bit DRAM word and is dropped. The column
// returned is the word address inside the row; the controller aligns it to
// the 8-word burst. Purely combinational.
module addr_map
  import ddr3_pkg::*;
#(
  parameter addr_map_e MAP = MAP_ROW_BANK_COL
) (
  input  logic [UI_ADDR_W-1:0] addr,
  output row_t                 row,
  output bank_t                bank,
  output col_t                 col
);
  localparam int unsigned C_LO = 1;
  localparam int unsigned C_HI = C_LO + COL_W - 1;

  always_comb begin
    col = addr[C_HI:C_LO];
    if (MAP == MAP_ROW_BANK_COL) begin
      bank = addr[C_HI+1 +: BANK_W];
      row  = addr[C_HI+1+BANK_W +: ROW_W];
    end else begin
      row  = addr[C_HI+1 +: ROW_W];
      bank = addr[C_HI+1+ROW_W +: BANK_W];
    end
  end

endmodule
