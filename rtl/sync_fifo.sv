// sync_fifo: first-word-fall-through FIFO used as the command FIFO and the
// response FIFO between the USB slave-FIFO state machine and the DANNA
// programming logic.
//
// `rdata` shows the oldest word whenever `empty` is low; `rd_en` removes it.
// Besides full/empty it gives the fill level and two programmable flags:
// `prog_full` is high when fewer than PROG_FULL_ROOM free places remain (the
// state machine only starts reading a USB DMA buffer when the whole buffer
// fits), and `prog_empty` is high while fewer than PROG_EMPTY_LEVEL words are
// stored (the state machine only starts writing when a whole status packet is
// waiting). `srst` empties the FIFO; the development kit drives it from a
// spare FX3 GPIO pin between runs so no stale data survives.
//
// Writes to a full FIFO and reads from an empty one are ignored and flagged
// by assertions. The original kit used vendor FIFO generator cores; this is a
// plain single-clock replacement and its depths are this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH            = 32,
  parameter int unsigned DEPTH            = 1024,
  parameter int unsigned PROG_FULL_ROOM   = 128,
  parameter int unsigned PROG_EMPTY_LEVEL = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     srst,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rdata,
  output logic                     full,
  output logic                     empty,
  output logic                     prog_full,
  output logic                     prog_empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  logic do_wr, do_rd;
  always_comb begin
    full       = count == (AW+1)'(DEPTH);
    empty      = count == '0;
    do_wr      = wr_en && !full;
    do_rd      = rd_en && !empty;
    prog_full  = ((AW+1)'(DEPTH) - count) < (AW+1)'(PROG_FULL_ROOM);
    prog_empty = count < (AW+1)'(PROG_EMPTY_LEVEL);
    rdata      = mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (srst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || srst) !(wr_en && full))
    else $error("sync_fifo: write while full");
  no_underflow: assert property (@(posedge clk) disable iff (!rst_n || srst) !(rd_en && empty))
    else $error("sync_fifo: read while empty");

endmodule
