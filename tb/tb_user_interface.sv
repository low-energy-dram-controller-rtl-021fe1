// tb_user_interface: the two user interface FIFOs and the read data path.
//
// The bus side writes commands on clk and write data on a separate, faster
// clock (wdf_wr_clk); the controller side pops them at random. Commands and
// write data must come out complete and in order, almost-empty must follow
// the command count, and read data handed in by the controller must appear
// unchanged with read valid.
`timescale 1ns/1ps
module tb_user_interface;
  import ddr3_pkg::*;
  logic clk = 0, wclk = 0, rst_n = 1;
  always #2 clk = ~clk;
  always #1.5 wclk = ~wclk;
  int checks = 0, failures = 0;

  logic app_cmd_en = 0, app_cmd_full, app_wdf_en = 0, app_wdf_full, app_rd_valid;
  ui_cmd_t app_cmd = '0, cmd;
  logic [UI_DATA_W-1:0] app_wdf_data = '0, app_rd_data, wdf_data, ctl_rd_data = '0;
  logic [UI_MASK_W-1:0] app_wdf_mask = '0, wdf_mask;
  logic cmd_empty, cmd_almost_empty, cmd_rd_en = 0, wdf_empty, wdf_rd_en = 0, ctl_rd_valid = 0;

  user_interface dut (.clk, .rst_n, .wdf_wr_clk(wclk), .wdf_wr_rst_n(rst_n),
    .app_cmd_en, .app_cmd, .app_cmd_full, .app_wdf_en, .app_wdf_data, .app_wdf_mask, .app_wdf_full,
    .app_rd_data, .app_rd_valid, .cmd_empty, .cmd_almost_empty, .cmd, .cmd_rd_en,
    .wdf_empty, .wdf_data, .wdf_mask, .wdf_rd_en, .ctl_rd_data, .ctl_rd_valid);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  localparam int N = 300;
  function automatic ui_cmd_t cmd_of(int i);
    return '{op: ui_op_e'(i % 3 == 0), addr: UI_ADDR_W'(i * 32'h0001_2340 + 16)};
  endfunction
  function automatic logic [UI_DATA_W+UI_MASK_W-1:0] wd_of(int i);
    return {UI_MASK_W'(i * 7), {4{32'(i) ^ 32'hdead_beef}}};
  endfunction

  int nc = 0, nd = 0, rc = 0, rd = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
  end
  // command producer (clk)
  logic c_go = 0;
  always @(posedge clk) c_go <= app_cmd_en && !app_cmd_full;
  always @(negedge clk) if (rst_n) begin
    if (c_go) nc++;
    app_cmd_en = (nc < N) && ($urandom_range(1) == 1);
    app_cmd    = cmd_of(nc);
  end
  // write data producer (wclk): sampled at the posedge, advanced after it
  logic wd_go = 0;
  always @(posedge wclk) wd_go <= app_wdf_en && !app_wdf_full;
  always @(negedge wclk) if (rst_n) begin
    if (wd_go) nd++;
    app_wdf_en = (nd < N) && ($urandom_range(2) != 0);
    {app_wdf_mask, app_wdf_data} = wd_of(nd);
  end
  // consumer (clk)
  always @(posedge clk) if (rst_n) begin
    if (cmd_rd_en && !cmd_empty) begin
      chk(cmd == cmd_of(rc), "command order and content"); rc++;
    end
    if (wdf_rd_en && !wdf_empty) begin
      chk({wdf_mask, wdf_data} == wd_of(rd), "write data order and content"); rd++;
    end
  end
  always @(negedge clk) begin
    cmd_rd_en = ($urandom_range(2) == 0);
    wdf_rd_en = ($urandom_range(2) == 0);
    ctl_rd_valid = ($urandom_range(1) == 0);
    ctl_rd_data  = {4{$urandom}};
  end
  always @(posedge clk) if (rst_n) begin
    chk(app_rd_valid == ctl_rd_valid && (!ctl_rd_valid || app_rd_data == ctl_rd_data), "read data path");
    chk(cmd_almost_empty == (int'(dut.u_cmd_fifo.count) <= 1), "almost empty");
  end
  initial begin
    wait (rc == N && rd == N);
    repeat (5) @(posedge clk);
    chk(cmd_empty && wdf_empty, "both empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
