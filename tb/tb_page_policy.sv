// tb_page_policy: the read history counters and the 10k-cycle epoch.
//
// In the first epoch bank 0 sees more reads than activates and bank 1 more
// activates than reads; bank 2 sees equal numbers, a history of
// exactly zero, which must not keep rows open. At the epoch boundary,
// exactly EPOCH cycles after reset, bank 0 must switch to keep-open, banks 1
// and 2 must stay closed-page. In the second epoch the pattern of banks 0 and
// 1 is reversed and the decisions must follow at the next boundary.
`timescale 1ns/1ps
module tb_page_policy;
  import ddr3_pkg::*;
  localparam int E = 10000;
  logic clk = 0, rst_n = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic rd_evt = 0, act_evt = 0, epoch_tick;
  bank_t rd_bank = 0, act_bank = 0;
  logic [NUM_BANKS-1:0] keep_open;
  page_policy dut (.clk, .rst_n, .rd_evt, .rd_bank, .act_evt, .act_bank, .keep_open, .epoch_tick);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t keep=%b", s, $time, keep_open); end
  endtask

  initial begin
    repeat (3 * E) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0;
  always @(posedge clk) if (rst_n) cyc++;

  task automatic run_epoch(int hot, int cold);
    // 3 reads and 1 activate per 8 cycles for 'hot', reverse for 'cold',
    // and, per 16 cycles, two reads and two activates for bank 2, whose
    // history is then exactly zero at the boundary (a whole number of
    // 16-cycle rounds fits before it)
    for (int i = 0; i < E - 32; i++) begin
      @(negedge clk);
      rd_evt = 0; act_evt = 0;
      case (i % 8)
        0, 1, 2: begin rd_evt = 1; rd_bank = bank_t'(hot); end
        3:       begin act_evt = 1; act_bank = bank_t'(hot); end
        4, 5, 6: begin act_evt = 1; act_bank = bank_t'(cold); end
        7:       begin rd_evt = 1; rd_bank = bank_t'(cold); act_evt = 1; act_bank = 2; end
        default: ;
      endcase
      if (i % 16 == 15) begin rd_evt = 1; rd_bank = 2; act_evt = 0; end
      if (i % 16 == 13) begin rd_evt = 1; rd_bank = 2; act_evt = 0; end
      if (i % 16 == 14) begin act_evt = 1; act_bank = 2; rd_evt = 0; end
    end
    @(negedge clk); rd_evt = 0; act_evt = 0;
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(keep_open == '0, "closed page after reset");
    run_epoch(0, 1);
    wait (epoch_tick);
    chk(cyc == E - 1, $sformatf("epoch boundary at cycle %0d", cyc));
    @(posedge clk); @(negedge clk);
    chk(keep_open[0] && !keep_open[1] && !keep_open[2], "first epoch decisions");
    run_epoch(1, 0);
    wait (epoch_tick);
    @(posedge clk); @(negedge clk);
    chk(!keep_open[0] && keep_open[1] && !keep_open[2], "second epoch decisions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
