// tb_axi_slave: AXI4 bursts in, user interface commands out.
//
// A small AXI4 master drives write and read bursts (INCR and FIXED, 1 to 16
// beats of 16 bytes, random write strobes). A user interface stand-in
// accepts commands and write data with random back-pressure, keeps a memory
// and returns read data in order after random delays. The testbench checks
// every command address against the beat address it works out itself, read
// data against its own byte-level reference, RLAST/RID/BID, and the
// arbitration: with a read and a write both always pending, the write is
// granted after exactly 16 read bursts (the read wait limit).
`timescale 1ns/1ps
module tb_axi_slave;
  import ddr3_pkg::*;
  logic clk = 0, rst_n = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] awid = 0, arid = 0, bid, rid;
  logic [31:0] awaddr = 0, araddr = 0;
  logic [7:0] awlen = 0, arlen = 0;
  logic [2:0] awsize = 4, arsize = 4;
  logic [1:0] awburst = 1, arburst = 1, bresp, rresp;
  logic awvalid = 0, awready, wlast = 0, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rlast, rvalid, rready = 0;
  logic [UI_DATA_W-1:0] wdata = 0, rdata;
  logic [UI_MASK_W-1:0] wstrb = 0;
  logic app_cmd_en, app_cmd_full, app_wdf_en, app_wdf_full, app_rd_valid;
  ui_cmd_t app_cmd;
  logic [UI_DATA_W-1:0] app_wdf_data, app_rd_data;
  logic [UI_MASK_W-1:0] app_wdf_mask;
  logic st_rd, st_wr, st_forced;

  axi_slave dut (.aclk(clk), .aresetn(rst_n),
    .s_awid(awid), .s_awaddr(awaddr), .s_awlen(awlen), .s_awsize(awsize), .s_awburst(awburst),
    .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(wstrb), .s_wlast(wlast), .s_wvalid(wvalid), .s_wready(wready),
    .s_bid(bid), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_arid(arid), .s_araddr(araddr), .s_arlen(arlen), .s_arsize(arsize), .s_arburst(arburst),
    .s_arvalid(arvalid), .s_arready(arready),
    .s_rid(rid), .s_rdata(rdata), .s_rresp(rresp), .s_rlast(rlast), .s_rvalid(rvalid), .s_rready(rready),
    .app_cmd_en, .app_cmd, .app_cmd_full, .app_wdf_en, .app_wdf_data, .app_wdf_mask, .app_wdf_full,
    .app_rd_data, .app_rd_valid, .stat_rd_grant(st_rd), .stat_wr_grant(st_wr), .stat_wr_forced(st_forced));

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  // ---------------- user interface stand-in ----------------
  logic [UI_DATA_W-1:0] ui_mem [logic [UI_ADDR_W-1:0]];
  logic [UI_DATA_W-1:0] rd_pend [$];
  int                   rd_delay [$];
  logic [UI_ADDR_W-1:0] exp_wr_addr [$], exp_rd_addr [$];
  always @(negedge clk) begin
    app_cmd_full = ($urandom_range(4) == 0);
    app_wdf_full = ($urandom_range(4) == 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (app_cmd_en && !app_cmd_full) begin
      logic [UI_DATA_W-1:0] w;
      if (app_cmd.op == UI_WR) begin
        chk(exp_wr_addr.size() > 0 && app_cmd.addr == exp_wr_addr[0], "write command address");
        if (exp_wr_addr.size()) void'(exp_wr_addr.pop_front());
      end else begin
        chk(exp_rd_addr.size() > 0 && app_cmd.addr == exp_rd_addr[0], "read command address");
        if (exp_rd_addr.size()) void'(exp_rd_addr.pop_front());
      end
      if (app_cmd.op == UI_WR) begin
        chk(app_wdf_en, "write data with write command");
        w = ui_mem.exists(app_cmd.addr) ? ui_mem[app_cmd.addr] : '0;
        for (int i = 0; i < UI_MASK_W; i++) if (!app_wdf_mask[i]) w[i*8 +: 8] = app_wdf_data[i*8 +: 8];
        ui_mem[app_cmd.addr] = w;
      end else begin
        rd_pend.push_back(ui_mem.exists(app_cmd.addr) ? ui_mem[app_cmd.addr] : '0);
        rd_delay.push_back($urandom_range(20, 2));
      end
    end
  end
  // in-order read return after a delay
  int wait_cnt = 0;
  always @(negedge clk) begin
    app_rd_valid = 0;
    if (rd_pend.size() > 0) begin
      if (wait_cnt >= rd_delay[0]) begin
        app_rd_valid = 1; app_rd_data = rd_pend[0];
      end else wait_cnt++;
    end
  end
  always @(posedge clk) if (app_rd_valid) begin
    void'(rd_pend.pop_front()); void'(rd_delay.pop_front()); wait_cnt = 0;
  end

  // ---------------- reference and master ----------------
  logic [7:0] ref_mem [logic [31:0]];   // byte reference

  function automatic logic [31:0] beat_addr(logic [31:0] a, int i, logic [2:0] sz, logic [1:0] bu);
    return (bu == 2'b00) ? a : a + i * (1 << sz);
  endfunction

  task automatic axi_write(logic [3:0] id, logic [31:0] addr, int len, logic [1:0] burst);
    @(negedge clk);
    awid = id; awaddr = addr; awlen = 8'(len); awsize = 4; awburst = burst; awvalid = 1;
    for (int i = 0; i <= len; i++) begin
      exp_wr_addr.push_back(UI_ADDR_W'({beat_addr(addr, i, 4, burst)} & ~32'hf));
    end
    do @(posedge clk); while (!awready);
    @(negedge clk) awvalid = 0;
    for (int i = 0; i <= len; i++) begin
      logic [31:0] ba;
      wvalid = 1; wlast = (i == len);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      wstrb = (i % 3 == 2) ? 16'($urandom) : 16'hffff;
      ba = beat_addr(addr, i, 4, burst) & ~32'hf;
      for (int k = 0; k < 16; k++) if (wstrb[k]) ref_mem[ba + k] = wdata[k*8 +: 8];
      do @(posedge clk); while (!wready);
      @(negedge clk);
    end
    wvalid = 0; wlast = 0;
    bready = 1;
    do @(posedge clk); while (!bvalid);
    chk(bid == id && bresp == 2'b00, "write response");
    @(negedge clk) bready = 0;
  endtask

  task automatic axi_read(logic [3:0] id, logic [31:0] addr, int len, logic [1:0] burst, bit sync = 1);
    if (sync) @(negedge clk);
    arid = id; araddr = addr; arlen = 8'(len); arsize = 4; arburst = burst; arvalid = 1;
    for (int i = 0; i <= len; i++) begin
      exp_rd_addr.push_back(UI_ADDR_W'({beat_addr(addr, i, 4, burst)} & ~32'hf));
    end
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0;
    for (int i = 0; i <= len; i++) begin
      logic [31:0] ba;
      logic [UI_DATA_W-1:0] e;
      rready = ($urandom_range(3) != 0);
      @(posedge clk);
      while (!(rvalid && rready)) begin @(negedge clk); rready = ($urandom_range(3) != 0); @(posedge clk); end
      ba = beat_addr(addr, i, 4, burst) & ~32'hf;
      for (int k = 0; k < 16; k++) e[k*8 +: 8] = ref_mem.exists(ba + k) ? ref_mem[ba + k] : 8'h00;
      chk(rdata == e, $sformatf("read data beat %0d", i));
      chk(rlast == (i == len) && rid == id && rresp == 2'b00, "RLAST/RID/RRESP");
      @(negedge clk);
    end
    rready = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int rd_grants_before_wr = -1;
  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // single transactions
    axi_write(1, 32'h0000_1000, 7, 2'b01);
    axi_read (2, 32'h0000_1000, 7, 2'b01);
    axi_write(3, 32'h0002_0040, 0, 2'b01);
    axi_write(4, 32'h0002_0040, 3, 2'b00);      // FIXED: same address four times
    axi_read (5, 32'h0002_0040, 0, 2'b01);
    for (int n = 0; n < 10; n++) begin
      logic [31:0] a;
      int l;
      a = {$urandom_range(255), 4'h0} << 4;
      l = $urandom_range(15);
      axi_write(4'(n), a, l, 2'b01);
      axi_read (4'(n + 1), a, l, 2'b01);
    end
    // arbitration: reads back to back while one write waits
    fork
      begin
        for (int n = 0; n < 20; n++) axi_read(4'(n), 32'h0000_1000 + n * 16, 0, 2'b01, n == 0);
      end
      begin
        int g;
        g = 0;
        repeat (3) @(posedge clk);
        @(negedge clk);
        fork
          axi_write(9, 32'h0000_8000, 0, 2'b01);
          begin
            while (1) begin
              @(posedge clk);
              if (st_rd) g++;
              if (st_wr) break;
            end
            rd_grants_before_wr = g;
          end
        join
      end
    join
    chk(rd_grants_before_wr == 16, $sformatf("write granted after %0d reads (limit 16)", rd_grants_before_wr));
    axi_read(1, 32'h0000_8000, 0, 2'b01);
    chk(exp_wr_addr.size() == 0 && exp_rd_addr.size() == 0, "all commands seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
