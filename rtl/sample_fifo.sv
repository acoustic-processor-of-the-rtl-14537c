// sample_fifo: FIFO between the MADC card and the DSP on the DSP board.
//
// The MADC controller writes the marked samples of each conversion in a burst
// of 12 words; the signal processing side drains them at its own pace. The
// FIFO is a circular buffer of DEPTH words with one extra pointer bit to tell
// full from empty. rd_data always shows the oldest word (first-word
// fall-through); rd_en pops it. A write while full is refused and sets the
// sticky overflow flag, a read while empty is ignored. count gives the fill
// level. Both sides use the same clock.
//
// The document names the FIFO and its place in the data path only. Depth,
// width, fall-through reads, one clock and the overflow flag are choices of
// this design.
module sample_fifo #(
  parameter int unsigned WIDTH = acp_pkg::FIFO_W,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  assign count   = wptr - rptr;
  assign empty   = (wptr == rptr);
  assign full    = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign rd_data = mem[rptr[AW-1:0]];

  initial assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");

endmodule
