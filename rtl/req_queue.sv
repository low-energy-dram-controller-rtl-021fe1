// req_queue: an age-ordered request queue for the request scheduler.
//
// Entries are kept compacted in arrival order: entry 0 is the oldest. Any one
// entry (index rm_idx) can leave per cycle, the younger ones moving down one
// place, and one new request can join at the tail in the same cycle. The
// whole queue is visible on q/vld so the scheduler can search it. Pushing
// into a full queue is ignored (the scheduler does not do it).
module req_queue
  import ddr3_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  sched_req_t               push_req,
  input  logic                     rm,
  input  logic [$clog2(DEPTH)-1:0] rm_idx,
  output sched_req_t               q   [DEPTH],
  output logic [DEPTH-1:0]         vld,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     full
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [IW:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      logic [IW:0] tail;
      tail = cnt;
      if (rm && (IW+1)'(rm_idx) < cnt) begin
        for (int i = 0; i < DEPTH - 1; i++)
          if (i >= int'(rm_idx)) q[i] <= q[i+1];
        tail = cnt - 1'b1;
      end
      if (push && cnt != (IW+1)'(DEPTH)) begin
        q[tail[IW-1:0]] <= push_req;
        tail = tail + 1'b1;
      end
      cnt <= tail;
    end
  end

  always_comb
    for (int i = 0; i < DEPTH; i++) vld[i] = ((IW+1)'(i) < cnt);

  assign count = cnt;
  assign full  = (cnt == (IW+1)'(DEPTH));

endmodule
