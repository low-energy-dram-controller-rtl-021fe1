// tb_cmd_fifo: random push/pop traffic against a queue reference model.
// Checks the head word, empty, full, almost-empty and count every cycle, and
// that a full FIFO holds exactly DEPTH words.
`timescale 1ns/1ps
module tb_cmd_fifo;
  localparam int W = 28, D = 16;
  logic clk = 0, rst_n = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en, rd_en, full, empty, aempty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  logic [W-1:0] model [$];

  cmd_fifo #(.WIDTH(W), .DEPTH(D), .AEMPTY_LEVEL(1)) dut (
    .clk, .rst_n, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty,
    .almost_empty(aempty), .count);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t model=%0d count=%0d empty=%0d", what, $time, model.size(), count, empty); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int seen_full = 0;
  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1200; cyc++) begin
      // phases: fill, drain, mixed
      int pw;
      pw = (cyc < 300) ? 80 : (cyc < 600) ? 20 : 50;
      wr_en   = ($urandom_range(99) < pw);
      rd_en   = ($urandom_range(99) < 100 - pw);
      wr_data = W'($urandom);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(aempty == (model.size() <= 1), "almost_empty");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      if (full) seen_full++;
      begin
        int pre;
        pre = model.size();
        @(posedge clk);
        if (rd_en && pre > 0) void'(model.pop_front());
        if (wr_en && pre < D) model.push_back(wr_data);
      end
      @(negedge clk);
    end
    check(seen_full > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
