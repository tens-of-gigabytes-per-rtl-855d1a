// record_mux: multiplexes one field stream of P parser instances onto a single
// stream, one whole record at a time.
//
// For a schema with N fields, N record_mux instances merge the P parsers' field
// streams so that only N Arrow column writers are needed instead of N*P. All N
// instances must take the parsers' records in the same order, or the columns of a
// row would not line up. One instance is the LEADER: when idle it picks, round
// robin, a parser whose input presents a record, and broadcasts the parser index
// on its ord_out port. The leader fits parsers whose fields are independent
// streams; where the fields of one parser block each other (a parser with a
// stream synchroniser), the order must come from logic that sees all fields, and
// every instance is a follower (see trip_kernel). Followers: they queue the order entries in a
// small FIFO and serve the parsers in that order. Serving a parser means
// forwarding its transfers up to and including the one carrying the record end
// (last[1]); a new choice is made the cycle after.
// End-of-buffer (last[2]) is not forwarded per parser: the mux counts buffer ends
// per parser (from forwarded transfers, and from transfers that carry only the
// buffer end, which are consumed whenever they reach the head of a stream that is
// not being served). Once every parser has delivered a buffer end, the leader
// places a flush entry in the order and then emits one transfer carrying only
// last[2]; a follower emits its own such transfer when it reaches the flush entry
// and its own count shows a buffer end from every parser. All merged columns are
// therefore closed after the same row.
//
// Interface: P input streams and one output stream of json_pkg::fld_t; order port
// of the leader (ord_out_*) to be broadcast to every follower's ord_in_* (a
// follower's ord_in_ready tells the leader it has room; the leader needs all
// followers ready). Unused order ports are tied off by the user.
// Timing: one idle cycle per record for the choice; otherwise one transfer per
// cycle, combinational from the selected input to the output.
// Multiplexing parser outputs onto one bundle of streams follows the reference
// design; record granularity, the leader/follower ordering and the buffer-end
// merging are this design's choices.
module record_mux
  import json_pkg::*;
#(
  parameter int P          = 8,
  parameter bit LEADER     = 1'b1,
  parameter int FIFO_DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [P-1:0]         in_valid,
  output logic [P-1:0]         in_ready,
  input  fld_t [P-1:0]         in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output fld_t                 out_data,
  // leader: chosen parser order, or a flush entry
  output logic                 ord_out_valid,
  input  logic                 ord_out_ready,
  output logic [$clog2(P)-1:0] ord_out_idx,
  output logic                 ord_out_flush,
  // follower: order from the leader
  input  logic                 ord_in_valid,
  output logic                 ord_in_ready,
  input  logic [$clog2(P)-1:0] ord_in_idx,
  input  logic                 ord_in_flush
);

  localparam int IW_ = $clog2(P);
  localparam int FW  = $clog2(FIFO_DEPTH);
  localparam int CW  = 4;

  logic            busy_q, fpend_q;
  logic [IW_-1:0]  cur_q, rr_q;
  logic [CW-1:0]   bufcnt_q [P];
  logic [P-1:0]    buf_only, has_buf, cand;
  logic            all_buf, flush;

  // order FIFO (followers): {flush, parser index}
  logic [IW_:0]    fifo_q [FIFO_DEPTH];
  logic [FW-1:0]   wptr_q, rptr_q;
  logic [FW:0]     fcnt_q;
  logic            pop;

  always_comb begin
    for (int p = 0; p < P; p++) begin
      buf_only[p] = in_data[p].last[2] && !in_data[p].last[1] && !in_data[p].last[0]
                    && in_data[p].strb == '0;
      has_buf[p]  = bufcnt_q[p] != '0;
    end
  end

  assign all_buf = &has_buf;
  assign flush   = fpend_q && all_buf;
  assign cand    = in_valid & ~buf_only;

  assign ord_in_ready = int'(fcnt_q) < FIFO_DEPTH;
  assign pop          = !LEADER && !busy_q && !fpend_q && fcnt_q != '0;

  // leader choice: first candidate at or after the round-robin pointer
  logic [IW_-1:0] pick;
  logic           pick_ok;
  always_comb begin
    pick    = '0;
    pick_ok = 1'b0;
    for (int k = 0; k < P; k++)
      if (!pick_ok && cand[(int'(rr_q) + k) % P]) begin
        pick    = IW_'((int'(rr_q) + k) % P);
        pick_ok = 1'b1;
      end
  end

  // leader: a flush entry as soon as every parser has ended a buffer, otherwise
  // the next parser
  assign ord_out_valid = LEADER && !busy_q && !fpend_q && (all_buf || pick_ok);
  assign ord_out_flush = all_buf;
  assign ord_out_idx   = pick;

  // data path
  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    in_ready  = '0;
    if (flush) begin
      out_valid     = 1'b1;
      out_data.last = 3'b100;
    end else if (busy_q && buf_only[cur_q]) begin
      // a buffer end still queued ahead of the served record: consume silently
      in_ready[cur_q] = bufcnt_q[cur_q] != '1;
    end else if (busy_q) begin
      out_valid        = in_valid[cur_q];
      out_data         = in_data[cur_q];
      out_data.last[2] = 1'b0;
      in_ready[cur_q]  = out_ready;
    end
    // consume buffer-end-only transfers of parsers not being served
    for (int p = 0; p < P; p++)
      if (buf_only[p] && !(busy_q && cur_q == IW_'(p)) && bufcnt_q[p] != '1)
        in_ready[p] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      fpend_q <= 1'b0;
      cur_q   <= '0;
      rr_q    <= '0;
      wptr_q  <= '0;
      rptr_q  <= '0;
      fcnt_q  <= '0;
      for (int p = 0; p < P; p++) bufcnt_q[p] <= '0;
    end else begin
      // buffer-end bookkeeping
      for (int p = 0; p < P; p++) begin
        logic inc;
        inc = in_valid[p] && in_ready[p] && in_data[p].last[2];
        if (flush && out_ready) bufcnt_q[p] <= bufcnt_q[p] - 1'b1 + CW'(inc);
        else if (inc)           bufcnt_q[p] <= bufcnt_q[p] + 1'b1;
      end
      if (flush && out_ready) fpend_q <= 1'b0;
      // record selection
      if (busy_q) begin
        if (in_valid[cur_q] && in_ready[cur_q] && in_data[cur_q].last[1]) busy_q <= 1'b0;
      end else if (ord_out_valid && ord_out_ready) begin
        if (all_buf) begin
          fpend_q <= 1'b1;
        end else begin
          busy_q <= 1'b1;
          cur_q  <= pick;
          rr_q   <= (int'(pick) == P - 1) ? '0 : pick + 1'b1;
        end
      end else if (pop) begin
        if (fifo_q[rptr_q][IW_]) begin
          fpend_q <= 1'b1;
        end else begin
          busy_q <= 1'b1;
          cur_q  <= fifo_q[rptr_q][IW_-1:0];
        end
      end
      // order FIFO
      if (!LEADER && ord_in_valid && ord_in_ready) begin
        fifo_q[wptr_q] <= {ord_in_flush, ord_in_idx};
        wptr_q         <= (int'(wptr_q) == FIFO_DEPTH - 1) ? '0 : wptr_q + 1'b1;
      end
      if (pop) rptr_q <= (int'(rptr_q) == FIFO_DEPTH - 1) ? '0 : rptr_q + 1'b1;
      fcnt_q <= fcnt_q + (FW+1)'(!LEADER && ord_in_valid && ord_in_ready) - (FW+1)'(pop);
    end
  end

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
