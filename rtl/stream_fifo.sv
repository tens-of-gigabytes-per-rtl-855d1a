// stream_fifo: first-in first-out buffer for a valid/ready stream of W-bit
// transfers.
//
// Holds up to DEPTH transfers in a register array with a write and a read
// pointer and an occupancy count. The head entry is presented directly from the
// array (out_valid whenever the FIFO is not empty), so a transfer written in one
// cycle can leave in the next. in_ready is high while the FIFO is not full; a
// write and a read can happen in the same cycle, so a FIFO that is never full or
// empty passes one transfer per cycle.
//
// Interface: in_valid/in_ready/in_data, out_valid/out_ready/out_data.
// Timing: one cycle from input to output; full rate.
// The reference design does not describe its buffering; this FIFO and its
// depth are this design's choice (they let parsers run ahead of the record
// multiplexers, see trip_kernel). DEPTH must be a power of two.
module stream_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem_q [DEPTH];
  logic [AW-1:0] wptr_q, rptr_q;
  logic [AW:0]   cnt_q;
  logic          wr, rd;

  assign in_ready  = int'(cnt_q) < DEPTH;
  assign out_valid = cnt_q != '0;
  assign out_data  = mem_q[rptr_q];
  assign wr        = in_valid && in_ready;
  assign rd        = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (wr) mem_q[wptr_q] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr_q <= '0;
      rptr_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (wr) wptr_q <= wptr_q + 1'b1;
      if (rd) rptr_q <= rptr_q + 1'b1;
      cnt_q <= cnt_q + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
