// page_policy: delayed adaptive closed-page policy, one decision per bank.
//
// Each bank has a signed read history counter that goes up by one for every
// read issued to the bank and down by one for every activate. Every EPOCH
// cycles (10k in the document, counted here in controller cycles) the sign of
// each counter is sampled: above zero means the bank's reads find their row
// already open often enough, so the bank is put in delayed-close mode
// (keep_open high) and the scheduler keeps its row open while enough queued
// requests target that row; otherwise the bank goes back to plain closed page.
// The counter rule, its events and the 10k period are the document's; the
// counters restarting from zero each epoch, a zero count meaning closed page,
// and closed page after reset are this design's choices. A read and an
// activate to the same bank in one cycle cancel out.
module page_policy
  import ddr3_pkg::*;
#(
  parameter int unsigned EPOCH = 10000,
  parameter int unsigned HIST_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rd_evt,
  input  bank_t                rd_bank,
  input  logic                 act_evt,
  input  bank_t                act_bank,
  output logic [NUM_BANKS-1:0] keep_open,
  output logic                 epoch_tick
);
  localparam int unsigned EW = $clog2(EPOCH);

  logic signed [HIST_W-1:0] hist [NUM_BANKS];
  logic [EW-1:0]            ecnt;

  assign epoch_tick = (ecnt == EW'(EPOCH-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ecnt      <= '0;
      keep_open <= '0;
      for (int b = 0; b < NUM_BANKS; b++) hist[b] <= '0;
    end else begin
      ecnt <= epoch_tick ? '0 : ecnt + 1'b1;
      for (int b = 0; b < NUM_BANKS; b++) begin
        logic signed [HIST_W-1:0] h;
        h = hist[b];
        if (rd_evt  && rd_bank  == bank_t'(b) && h != {1'b0, {(HIST_W-1){1'b1}}}) h = h + 1'b1;
        if (act_evt && act_bank == bank_t'(b) && h != {1'b1, {(HIST_W-1){1'b0}}}) h = h - 1'b1;
        if (epoch_tick) begin
          keep_open[b] <= (h > 0);
          hist[b]      <= '0;
        end else begin
          hist[b]      <= h;
        end
      end
    end
  end

endmodule
