// refresh_timer: asks the controller for an auto refresh every tREFI cycles.
//
// A down-counter reloads with T_REFI-1 each time it reaches zero and then adds
// one to a count of owed refreshes. ref_req is high while any refresh is owed;
// a one-cycle ref_ack (the controller issued REFRESH) pays one back. Up to
// MAX_POSTPONE refreshes can be owed, as DDR3 allows that many to be
// postponed; beyond that the count saturates. The periodic auto refresh is
// the document's; the owed-refresh counter is this design's choice. The
// counter runs only when enable is high (after PHY initialisation).
module refresh_timer #(
  parameter int unsigned T_REFI       = 6240,  // 7.8 us at an 800 MHz clock
  parameter int unsigned MAX_POSTPONE = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic ref_ack,
  output logic ref_req,
  output logic ref_urgent   // as many refreshes owed as may be postponed
);
  localparam int unsigned TW = $clog2(T_REFI);
  localparam int unsigned PW = $clog2(MAX_POSTPONE+1);

  logic [TW-1:0] tmr;
  logic [PW-1:0] owed;
  logic          tick;

  assign tick = enable && (tmr == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr  <= TW'(T_REFI-1);
      owed <= '0;
    end else begin
      if (enable) tmr <= (tmr == '0) ? TW'(T_REFI-1) : tmr - 1'b1;
      case ({tick && owed != PW'(MAX_POSTPONE), ref_ack && owed != '0})
        2'b10:   owed <= owed + 1'b1;
        2'b01:   owed <= owed - 1'b1;
        default: owed <= owed;
      endcase
    end
  end

  assign ref_req    = (owed != '0);
  assign ref_urgent = (owed == PW'(MAX_POSTPONE));

endmodule
