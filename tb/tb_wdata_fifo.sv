// tb_wdata_fifo: the asynchronous FIFO with unrelated write (period 6) and
// read (period 10, then 3) clocks. Every word written must come out once, in
// order; a burst of writes while the reader is stopped must raise full after
// exactly DEPTH words and no word may be lost or duplicated.
`timescale 1ns/1ps
module tb_wdata_fifo;
  localparam int W = 144, D = 16;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  always #3 wclk = ~wclk;
  real rhalf = 5.0;
  always #(rhalf) rclk = ~rclk;
  int checks = 0, failures = 0;

  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  wdata_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data, .full,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data, .empty);

  function automatic logic [W-1:0] word(int i);
    return {W/32{32'(i * 32'h9e37_79b9 + 7)}} ^ W'(i);
  endfunction

  int nw = 0, nr = 0, written_before_full = 0;
  bit reader_on = 0;
  localparam int N = 400;

  // writer
  initial begin
    #1 begin wrst_n = 0; rrst_n = 0; end
    repeat (4) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (4) @(posedge wclk);
    // stopped reader: fill to full
    while (!full) begin
      wr_en = 1; wr_data = word(nw);
      @(posedge wclk); nw++; @(negedge wclk);
    end
    wr_en = 0;
    written_before_full = nw;
    checks++;
    if (written_before_full != D) begin failures++; $display("FAIL full after %0d words", nw); end
    reader_on = 1;
    while (nw < N) begin
      wr_en = ($urandom_range(3) != 0) && !full;
      wr_data = word(nw);
      @(posedge wclk);
      if (wr_en) nw++;
      @(negedge wclk);
      if (nw == N/2) rhalf = 2.0;
    end
    wr_en = 0;
  end

  // reader
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      checks++;
      if (rd_data !== word(nr)) begin failures++; $display("FAIL word %0d", nr); end
      nr++;
    end
    @(negedge rclk) rd_en = reader_on && ($urandom_range(3) != 0);
  end

  initial begin
    wait (nr == N);
    repeat (10) @(posedge rclk);
    checks++;
    if (!empty) begin failures++; $display("FAIL not empty at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50000;
    failures++; $display("FAIL watchdog nr=%0d nw=%0d", nr, nw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
