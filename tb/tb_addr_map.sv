// tb_addr_map: both mapping schemes on random addresses and on the address
// of every bank, against field positions worked out by hand:
//   Row/Bank/Column: col = a[10:1], bank = a[13:11], row = a[26:14]
//   Bank/Row/Column: col = a[10:1], row = a[23:11], bank = a[26:24]
`timescale 1ns/1ps
module tb_addr_map;
  import ddr3_pkg::*;
  int checks = 0, failures = 0;
  logic [UI_ADDR_W-1:0] a;
  row_t r0, r1; bank_t b0, b1; col_t c0, c1;
  addr_map #(.MAP(MAP_ROW_BANK_COL)) u_rbc (.addr(a), .row(r0), .bank(b0), .col(c0));
  addr_map #(.MAP(MAP_BANK_ROW_COL)) u_brc (.addr(a), .row(r1), .bank(b1), .col(c1));

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s addr=%h", s, a); end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = UI_ADDR_W'($urandom);
      if (i < 8) a = UI_ADDR_W'(i) << 11;          // each bank in Row/Bank/Column
      #1;
      chk(c0 == a[10:1] && b0 == a[13:11] && r0 == a[26:14], "row/bank/col");
      chk(c1 == a[10:1] && r1 == a[23:11] && b1 == a[26:24], "bank/row/col");
      if (i < 8) chk(b0 == bank_t'(i) && r0 == 0, "consecutive 2 KB blocks go to consecutive banks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
