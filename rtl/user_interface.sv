// user_interface: the bridge between the memory bus side and the controller.
//
// It holds the two FIFOs the document names. Commands (read or write plus a
// byte address) go into the synchronous Address/Command FIFO; for a write the
// 128-bit burst data and its byte mask go into the Write Data FIFO, which is
// asynchronous so the write data may be produced on another clock
// (wdf_wr_clk). The controller pops both (first-word fall-through) and sees
// empty and almost-empty for the command FIFO. Read data returned by the
// controller is presented on app_rd_data qualified by app_rd_valid, in the
// order the reads were queued. Depths are this design's choice (16 each).
module user_interface
  import ddr3_pkg::*;
#(
  parameter int unsigned CMD_DEPTH = 16,
  parameter int unsigned WDF_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wdf_wr_clk,
  input  logic                 wdf_wr_rst_n,
  // bus side
  input  logic                 app_cmd_en,
  input  ui_cmd_t              app_cmd,
  output logic                 app_cmd_full,
  input  logic                 app_wdf_en,
  input  logic [UI_DATA_W-1:0] app_wdf_data,
  input  logic [UI_MASK_W-1:0] app_wdf_mask,
  output logic                 app_wdf_full,
  output logic [UI_DATA_W-1:0] app_rd_data,
  output logic                 app_rd_valid,
  // controller side
  output logic                 cmd_empty,
  output logic                 cmd_almost_empty,
  output ui_cmd_t              cmd,
  input  logic                 cmd_rd_en,
  output logic                 wdf_empty,
  output logic [UI_DATA_W-1:0] wdf_data,
  output logic [UI_MASK_W-1:0] wdf_mask,
  input  logic                 wdf_rd_en,
  input  logic [UI_DATA_W-1:0] ctl_rd_data,
  input  logic                 ctl_rd_valid
);
  localparam int unsigned CMD_W = $bits(ui_cmd_t);
  localparam int unsigned WDF_W = UI_DATA_W + UI_MASK_W;

  logic [CMD_W-1:0] cmd_bits;
  logic [$clog2(CMD_DEPTH):0] cmd_count;

  cmd_fifo #(.WIDTH(CMD_W), .DEPTH(CMD_DEPTH), .AEMPTY_LEVEL(1)) u_cmd_fifo (
    .clk, .rst_n,
    .wr_en(app_cmd_en), .wr_data(app_cmd), .full(app_cmd_full),
    .rd_en(cmd_rd_en), .rd_data(cmd_bits), .empty(cmd_empty),
    .almost_empty(cmd_almost_empty), .count(cmd_count)
  );
  assign cmd = ui_cmd_t'(cmd_bits);

  logic [WDF_W-1:0] wdf_bits;
  wdata_fifo #(.WIDTH(WDF_W), .DEPTH(WDF_DEPTH)) u_wdf (
    .wr_clk(wdf_wr_clk), .wr_rst_n(wdf_wr_rst_n),
    .wr_en(app_wdf_en), .wr_data({app_wdf_mask, app_wdf_data}), .full(app_wdf_full),
    .rd_clk(clk), .rd_rst_n(rst_n),
    .rd_en(wdf_rd_en), .rd_data(wdf_bits), .empty(wdf_empty)
  );
  assign {wdf_mask, wdf_data} = wdf_bits;

  assign app_rd_data  = ctl_rd_data;
  assign app_rd_valid = ctl_rd_valid;

endmodule
