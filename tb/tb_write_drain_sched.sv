// tb_write_drain_sched: the row-locality write drain scheduler against a
// cycle-level reference model of the policy written in the testbench.
//
// Random reads and writes over four banks and four rows are offered faster
// than they are taken in the first phase, so the write queue climbs to the
// high watermark, and slower in the second phase, so the queues drain. Every
// scheduled request (direction, address, row-hit flag, auto-precharge flag)
// is compared with the model's choice, and the run must show each mechanism:
// a write drain started at the high watermark, row-hit writes issued while
// reads wait, a switch back to reads on a row-hit read, a conventional drain
// step towards the low watermark, and rows kept open by the page decision.
`timescale 1ns/1ps
module tb_write_drain_sched;
  import ddr3_pkg::*;
  localparam int RQD = 32, WQD = 64, HI = 54, LO = 32;
  logic clk = 0, rst_n = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_write = 0, in_ready, out_valid, out_write, out_row_hit, out_autopre;
  logic out_ready = 0, write_mode, stat_switch_rd, stat_wm_drain;
  sched_req_t in_req = '0, out_req;
  logic [NUM_BANKS-1:0] keep_open = '0;

  write_drain_sched dut (.clk, .rst_n, .in_valid, .in_write, .in_req, .in_ready,
    .out_valid, .out_write, .out_req, .out_row_hit, .out_autopre, .out_ready,
    .keep_open, .write_mode, .stat_switch_rd, .stat_wm_drain,
    .close_all(1'b0), .open_banks());

  // ---------------- reference model ----------------
  sched_req_t rq [$], wq [$];
  bit   mode = 0;
  bit   opn [NUM_BANKS];
  sch_row_t orow [NUM_BANKS];

  function automatic bit hit(sched_req_t r);
    return opn[r.bank] && orow[r.bank] == r.row;
  endfunction
  function automatic int first_hit(ref sched_req_t q [$]);
    foreach (q[i]) if (hit(q[i])) return i;
    return -1;
  endfunction

  // expected choice
  bit e_valid, e_w, e_nx, e_sw, e_wm;
  int e_idx;
  task automatic decide();
    int rh, wh;
    rh = first_hit(rq); wh = first_hit(wq);
    e_valid = 0; e_w = 0; e_idx = 0; e_nx = mode; e_sw = 0; e_wm = 0;
    if (mode) begin
      if (wh >= 0)              begin e_valid = 1; e_w = 1; e_idx = wh; end
      else if (rh >= 0)         begin e_valid = 1; e_idx = rh; e_nx = 0; e_sw = 1; end
      else if (wq.size() > LO)  begin e_valid = 1; e_w = 1; e_wm = 1; end
      else begin
        e_nx = 0;
        if (rq.size() > 0)      e_valid = 1;
        else if (wq.size() > 0) begin e_valid = 1; e_w = 1; end
      end
    end else begin
      if (rh >= 0)              begin e_valid = 1; e_idx = rh; end
      else if (wq.size() >= HI) begin
        e_valid = 1; e_w = 1; e_nx = 1;
        if (wh >= 0) e_idx = wh; else e_wm = 1;
      end
      else if (rq.size() > 0)   e_valid = 1;
      else if (wq.size() > 0)   begin e_valid = 1; e_w = 1; if (wh >= 0) e_idx = wh; end
    end
  endtask

  int n_drain_start = 0, n_hit_wr_with_reads = 0, n_switch_rd = 0, n_wm_step = 0, n_kept = 0, n_out = 0;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 12000; cyc++) begin
      sched_req_t sel;
      int same;
      bit e_ap, fire, pushed;
      // drive inputs
      in_valid  = ($urandom_range(99) < ((cyc % 3000) < 1500 ? 90 : 25));
      in_write  = ($urandom_range(99) < 60);
      in_req    = '{bank: bank_t'($urandom_range(3)), row: sch_row_t'($urandom_range(3)),
                    col: col_t'($urandom_range(1023))};
      out_ready = ($urandom_range(99) < ((cyc % 3000) < 1500 ? 45 : 90));
      if (cyc % 700 == 0) keep_open = NUM_BANKS'($urandom);
      #0;
      decide();
      chk(out_valid == e_valid, "out_valid");
      chk(in_ready == (in_write ? wq.size() < WQD : rq.size() < RQD), "in_ready");
      if (e_valid) begin
        sel = e_w ? wq[e_idx] : rq[e_idx];
        same = 0;
        foreach (rq[i]) if (rq[i].bank == sel.bank && rq[i].row == sel.row && !(!e_w && i == e_idx)) same++;
        foreach (wq[i]) if (wq[i].bank == sel.bank && wq[i].row == sel.row && !(e_w && i == e_idx)) same++;
        e_ap = !(keep_open[sel.bank] || same >= 1);
        chk(out_write == e_w && out_req == sel, "scheduled request");
        chk(out_row_hit == hit(sel), "row hit flag");
        chk(out_autopre == e_ap, "auto precharge flag");
      end
      fire = e_valid && out_ready;
      chk(stat_switch_rd == (fire && e_sw) && stat_wm_drain == (fire && e_wm), "status strobes");
      pushed = in_valid && (in_write ? wq.size() < WQD : rq.size() < RQD);
      @(posedge clk);
      // apply to the model
      if (fire) begin
        n_out++;
        if (!mode && e_nx) n_drain_start++;
        if (e_w && hit(sel) && rq.size() > 0) n_hit_wr_with_reads++;
        if (e_sw) n_switch_rd++;
        if (mode && e_wm) n_wm_step++;
        if (!e_ap) n_kept++;
        if (e_w) wq.delete(e_idx); else rq.delete(e_idx);
        mode = e_nx;
        opn[sel.bank] = !e_ap;
        orow[sel.bank] = sel.row;
      end
      if (pushed) begin
        if (in_write) wq.push_back(in_req); else rq.push_back(in_req);
      end
      @(negedge clk);
      chk(write_mode == mode, "write mode");
    end
    chk(n_drain_start > 0, "write drain started at the high watermark");
    chk(n_hit_wr_with_reads > 0, "row-hit writes issued while reads wait");
    chk(n_switch_rd > 0, "switch to reads on a row-hit read");
    chk(n_wm_step > 0, "conventional drain step towards the low watermark");
    chk(n_kept > 0, "row kept open by the page decision");
    $display("issued=%0d drains=%0d hitwr=%0d sw_rd=%0d wm=%0d kept=%0d",
             n_out, n_drain_start, n_hit_wr_with_reads, n_switch_rd, n_wm_step, n_kept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
