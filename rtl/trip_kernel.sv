// trip_kernel: P complex-schema parsers sharing one set of twelve Arrow column
// streams.
//
// Each of the P trip_parser instances takes its own JSON input buffer. Their
// twelve field streams are merged field by field by twelve record_mux instances:
// all twelve follow one record order that this module derives from all twelve
// fields of every parser (see below), so row r of every column comes from
// the same document. Every parser output passes a FIFO of FIFO_DEPTH transfers
// before its multiplexer, so parsers keep working while the multiplexers serve
// other parsers' records. Each merged field then passes an arrow_col_adapter that
// produces the column's value stream and, for the string and the five array
// members, its length stream. The merged columns are closed (last) once every
// parser has reached the end of a buffer.
// With N = 12 members this needs N column writers instead of N*P.
//
// Interface: P raw JSON byte streams in (json_pkg::beat_t); per member a value
// stream (json_pkg::col_t) and a length stream (json_pkg::len_t, always idle for
// integer and boolean members).
// Timing: one cycle of arbitration per record and field; the merged streams carry
// one transfer per cycle. The FIFO depth (16) is this design's choice.
// Multiplexing P parsers onto one bundle of N streams follows the reference
// design; the record-order scheme is this design's own.
module trip_kernel
  import json_pkg::*;
#(
  parameter int P          = 8,
  parameter int FIFO_DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [P-1:0]  in_valid,
  output logic [P-1:0]  in_ready,
  input  beat_t [P-1:0] in_data,
  output logic [11:0]   val_valid,
  input  logic [11:0]   val_ready,
  output col_t [11:0]   val_data,
  output logic [11:0]   len_valid,
  input  logic [11:0]   len_ready,
  output len_t [11:0]   len_data
);

  localparam int NF = 12;
  localparam int PW = $clog2(P);
  // members with a length stream: 0 timestamp (string), 4, 8..11 (arrays)
  localparam logic [NF-1:0] HAS_LEN = 12'b1111_0001_0001;

  logic [NF-1:0] pv [P];
  logic [NF-1:0] pr [P];
  fld_t [NF-1:0] pd [P];

  // each parser's field streams pass a FIFO, so that a parser can run up to
  // FIFO_DEPTH transfers ahead of the multiplexer of each field
  for (genvar p = 0; p < P; p++) begin : g_parser
    logic [NF-1:0] qv, qr;
    fld_t [NF-1:0] qd;
    trip_parser u_parser (
      .clk, .rst_n,
      .in_valid (in_valid[p]), .in_ready (in_ready[p]), .in_data (in_data[p]),
      .out_valid(qv),          .out_ready(qr),          .out_data(qd)
    );
    for (genvar f = 0; f < NF; f++) begin : g_fifo
      stream_fifo #(.W($bits(fld_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
        .clk, .rst_n,
        .in_valid (qv[f]),    .in_ready (qr[f]),    .in_data (qd[f]),
        .out_valid(pv[p][f]), .out_ready(pr[p][f]), .out_data(pd[p][f])
      );
    end
  end

  // Record order, broadcast to the twelve muxes. Per parser, ord_cnt counts the
  // records ordered and done_cnt[f] the record ends that field f's mux has taken
  // from it (both modulo 2^CNTW; they never differ by more than the order FIFO
  // depth plus one). A field whose mux has taken every ordered record and that
  // presents a transfer other than a bare buffer end shows a record not yet
  // ordered, so the parser is a candidate. Candidates are ordered round robin,
  // one per cycle while every mux has room. Looking at all fields of a parser
  // matters: its synchroniser stalls when any member's branch is full, so waiting
  // for one particular member (say the timestamp, which may come last in a
  // document) before ordering would serialise the parsers.
  // Buffer ends: bcnt counts, per parser, buffer ends taken by field 0's mux;
  // once every parser has one, a flush entry is ordered instead, and each mux
  // closes its column when it reaches that entry.
  localparam int CNTW = 5;
  localparam int BW   = 4;
  logic [CNTW-1:0] ord_cnt [P];
  logic [CNTW-1:0] done_cnt [P][NF];
  logic [BW-1:0]   bcnt [P];
  logic [P-1:0]    cand, has_b;
  logic [PW-1:0]   rr, pick;
  logic            pick_ok, all_b;

  logic          ord_valid, ord_flush, ord_ready;
  logic [PW-1:0] ord_idx;
  logic [NF-1:0] ord_room;
  assign ord_ready = &ord_room;

  always_comb begin
    for (int p = 0; p < P; p++) begin
      cand[p]  = 1'b0;
      has_b[p] = bcnt[p] != '0;
      for (int f = 0; f < NF; f++)
        if (pv[p][f] && done_cnt[p][f] == ord_cnt[p] &&
            (pd[p][f].strb != '0 || pd[p][f].last[1:0] != '0))
          cand[p] = 1'b1;
    end
    pick    = '0;
    pick_ok = 1'b0;
    for (int k = 0; k < P; k++)
      if (!pick_ok && cand[(int'(rr) + k) % P]) begin
        pick    = PW'((int'(rr) + k) % P);
        pick_ok = 1'b1;
      end
  end

  assign all_b     = &has_b;
  assign ord_valid = all_b || pick_ok;
  assign ord_flush = all_b;
  assign ord_idx   = pick;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr <= '0;
      for (int p = 0; p < P; p++) begin
        ord_cnt[p] <= '0;
        bcnt[p]    <= '0;
        for (int f = 0; f < NF; f++) done_cnt[p][f] <= '0;
      end
    end else begin
      if (ord_valid && ord_ready && !ord_flush) rr <= (int'(pick) == P - 1) ? '0 : pick + 1'b1;
      for (int p = 0; p < P; p++) begin
        if (ord_valid && ord_ready && !ord_flush && pick == PW'(p))
          ord_cnt[p] <= ord_cnt[p] + 1'b1;
        for (int f = 0; f < NF; f++)
          if (pv[p][f] && pr[p][f] && pd[p][f].last[1]) done_cnt[p][f] <= done_cnt[p][f] + 1'b1;
        bcnt[p] <= bcnt[p] - BW'(ord_valid && ord_ready && ord_flush)
                 + BW'(pv[p][0] && pr[p][0] && pd[p][0].last[2]);
      end
    end
  end

  for (genvar f = 0; f < NF; f++) begin : g_field
    logic [P-1:0] mv, mr;
    fld_t [P-1:0] md;
    logic         xv, xr;
    fld_t         xd;

    for (genvar p = 0; p < P; p++) begin : g_in
      assign mv[p]    = pv[p][f];
      assign md[p]    = pd[p][f];
      assign pr[p][f] = mr[p];
    end

    logic          unused_v, unused_f;
    logic [PW-1:0] unused_i;
    record_mux #(.P(P), .LEADER(1'b0)) u_mux (
      .clk, .rst_n,
      .in_valid (mv), .in_ready (mr), .in_data (md),
      .out_valid(xv), .out_ready(xr), .out_data(xd),
      .ord_out_valid(unused_v), .ord_out_ready(1'b0), .ord_out_idx(unused_i),
      .ord_out_flush(unused_f),
      .ord_in_valid (ord_valid && ord_ready), .ord_in_ready(ord_room[f]),
      .ord_in_idx   (ord_idx), .ord_in_flush(ord_flush)
    );

    arrow_col_adapter #(.IS_LIST(HAS_LEN[f])) u_adapt (
      .clk, .rst_n,
      .in_valid (xv), .in_ready (xr), .in_data (xd),
      .val_valid(val_valid[f]), .val_ready(val_ready[f]), .val_data(val_data[f]),
      .len_valid(len_valid[f]), .len_ready(len_ready[f]), .len_data(len_data[f])
    );
  end

endmodule
