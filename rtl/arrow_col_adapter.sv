// arrow_col_adapter: turns one parsed field stream into the streams an Arrow
// column writer consumes.
//
// Input is a json_pkg::fld_t stream (last[0] end of list/string, last[1] end of
// record, last[2] end of input buffer). Two outputs:
//   values  (col_t): every transfer that holds data (any strb bit) or closes the
//           buffer is passed on, with last = end of buffer. Transfers that only
//           mark a record or list end are dropped: the value buffer of an Arrow
//           column does not see record boundaries.
//   lengths (len_t, only when IS_LIST): the number of elements (list values, or
//           string characters = set strb bits) of each record, emitted on the
//           record end, so records without the member get length 0. A buffer end
//           that comes without a record end gives a transfer with dvalid=0 that
//           only closes the stream. Arrow offsets are the running sum of these
//           lengths, which the column writer forms.
// For integer and boolean columns (IS_LIST = 0) only the value stream is used.
//
// Interface: valid/ready in, two valid/ready outputs, each with its own register.
// Timing: one cycle latency; the input is accepted when both output registers can
// take a transfer.
// The reference design only says a small amount of control logic adapts the
// parser streams to the column writers using the last signals; this is the
// simplest logic that does so.
module arrow_col_adapter
  import json_pkg::*;
#(
  parameter bit IS_LIST = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  fld_t  in_data,
  output logic  val_valid,
  input  logic  val_ready,
  output col_t  val_data,
  output logic  len_valid,
  input  logic  len_ready,
  output len_t  len_data
);

  logic [31:0]  cnt_q;
  logic [31:0]  elems;
  logic         val_free, len_free;

  always_comb begin
    elems = '0;
    for (int i = 0; i < EPC; i++) elems += 32'(in_data.strb[i]);
  end

  assign val_free = !val_valid || val_ready;
  assign len_free = !len_valid || len_ready;
  assign in_ready = val_free && len_free;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      val_valid <= 1'b0;
      val_data  <= '0;
      len_valid <= 1'b0;
      len_data  <= '0;
    end else begin
      if (val_ready) val_valid <= 1'b0;
      if (len_ready) len_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (in_data.strb != '0 || in_data.last[2]) begin
          val_valid     <= 1'b1;
          val_data.last <= in_data.last[2];
          val_data.strb <= in_data.strb;
          val_data.data <= in_data.data;
        end
        if (IS_LIST) begin
          if (in_data.last[1]) begin
            len_valid       <= 1'b1;
            len_data.dvalid <= 1'b1;
            len_data.len    <= cnt_q + elems;
            len_data.last   <= in_data.last[2];
            cnt_q           <= '0;
          end else begin
            cnt_q <= cnt_q + elems;
            if (in_data.last[2]) begin
              len_valid       <= 1'b1;
              len_data.dvalid <= 1'b0;
              len_data.len    <= '0;
              len_data.last   <= 1'b1;
            end
          end
        end
      end
    end
  end

  a_hold_v : assert property (@(posedge clk) disable iff (!rst_n)
    val_valid && !val_ready |=> val_valid && $stable(val_data));
  a_hold_l : assert property (@(posedge clk) disable iff (!rst_n)
    len_valid && !len_ready |=> len_valid && $stable(len_data));

endmodule
