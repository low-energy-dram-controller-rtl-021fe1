// wdata_fifo: asynchronous FIFO, used as the user interface Write Data FIFO.
//
// The writer (bus side) and the reader (controller side) run on their own
// clocks. Each side keeps a binary pointer one bit wider than the index and
// publishes it in Gray code; the other side brings it across with two
// flip-flops. Full is computed in the write domain against the synchronised
// read pointer, empty in the read domain against the synchronised write
// pointer, so both flags are conservative (they clear two or three clocks
// late). The head word is shown on rd_data while empty is low (first-word
// fall-through) and rd_en pops it. That the Write Data FIFO is asynchronous
// follows the document; depth, the Gray-code scheme and the reset are this
// design's choices. DEPTH must be a power of two.
module wdata_fifo #(
  parameter int unsigned WIDTH = 144,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;
  wire [AW:0] wbin_nx = wbin + (AW+1)'(do_wr);
  wire [AW:0] rbin_nx = rbin + (AW+1)'(do_rd);

  // write domain
  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;
  end

  // Full when the Gray write pointer equals the read one with the two top bits inverted.
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read domain
  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];

endmodule
