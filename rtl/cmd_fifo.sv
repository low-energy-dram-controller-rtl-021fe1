// cmd_fifo: synchronous FIFO, used as the user interface Address/Command FIFO
// and, with another width, as the read return buffer of the AXI slave.
//
// A circular buffer of DEPTH words with read and write pointers one bit wider
// than the index, so full and empty are told apart by the extra bit. Writing
// when full or reading when empty is ignored. The output word is the head of
// the queue (first-word fall-through): rd_data is valid whenever empty is low,
// and rd_en pops it at the clock edge. almost_empty is high while at most
// AEMPTY_LEVEL words are stored; the Address/Command FIFO reports empty and
// almost-empty to the controller as the document describes. Depth, width and
// the almost-empty level are this design's choices.
module cmd_fifo #(
  parameter int unsigned WIDTH        = 28,
  parameter int unsigned DEPTH        = 16,
  parameter int unsigned AEMPTY_LEVEL = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             almost_empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  assign count        = wptr - rptr;
  assign empty        = (wptr == rptr);
  assign full         = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign almost_empty = (count <= (AW+1)'(AEMPTY_LEVEL));
  assign rd_data      = mem[rptr[AW-1:0]];

endmodule
