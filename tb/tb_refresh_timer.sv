// tb_refresh_timer: refresh requests every tREFI cycles.
//
// With a short T_REFI the testbench checks that the first request comes
// exactly T_REFI cycles after enable, that acknowledged requests come back
// every T_REFI cycles, that unacknowledged ones accumulate up to eight (then
// ref_urgent) and that eight acknowledgements pay them all back.
`timescale 1ns/1ps
module tb_refresh_timer;
  localparam int T = 50;
  logic clk = 0, rst_n = 1, enable = 0, ref_ack = 0, ref_req, ref_urgent;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  refresh_timer #(.T_REFI(T)) dut (.clk, .rst_n, .enable, .ref_ack, .ref_req, .ref_urgent);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int c;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (10) @(negedge clk);
    chk(!ref_req, "no request while disabled");
    enable = 1;
    // first request after T cycles
    c = 0;
    while (!ref_req) begin @(negedge clk); c++; end
    chk(c == T, $sformatf("first interval %0d", c));
    // acknowledge and measure the next interval
    for (int k = 0; k < 3; k++) begin
      ref_ack = 1; @(negedge clk); ref_ack = 0;
      chk(!ref_req, "request cleared by ack");
      c = 1;
      while (!ref_req) begin @(negedge clk); c++; end
      chk(c == T, $sformatf("interval %0d", c));
    end
    // let eight accumulate
    repeat (8 * T + 5) @(negedge clk);
    chk(ref_urgent, "urgent after eight owed");
    for (int k = 0; k < 8; k++) begin
      chk(ref_req, "still owed");
      ref_ack = 1; @(negedge clk); ref_ack = 0;
    end
    chk(!ref_req && !ref_urgent, "all paid back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
