// json_array_parser: splits JSON array values into their elements.
//
// The input carries value bytes of array-typed members, each value ended by
// last[0]. The parser strips the opening '[' and closing ']' and the ','
// separators of the array itself; brackets, braces and commas inside strings or
// inside nested arrays/objects pass unchanged (tracked with a depth counter and a
// string/escape state). A new innermost last bit is added: the lane of a
// separator, and the lane of the closing bracket of a non-empty array, get the
// end-of-element bit. Output last bits are {in.last[NL-2:0], elem_end}, so the
// input's end of value becomes the end of the list.
//
// Interface: valid/ready streams of json_pkg::beat_t.
// Timing: one registered output stage, one transfer per cycle; transfers that end
// up empty are not emitted.
// The function follows the reference design's array parser; the encoding of the
// element end on the (stripped) separator lane is this design's choice.
module json_array_parser
  import json_pkg::*;
#(
  parameter int DEPTH_W = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_data
);

  typedef struct packed {
    logic [DEPTH_W-1:0] depth;     // 0: before '[', 1: array level
    logic               in_str;
    logic               esc;
    logic               has_elem;  // element bytes seen since the last separator
  } st_t;

  st_t   st_q, st_d;
  beat_t o;

  always_comb begin
    st_t s;
    logic eend;
    logic [7:0] c;
    s = st_q;
    o = '0;
    for (int i = 0; i < EPC; i++) begin
      c    = in_data[i].data;
      eend = 1'b0;
      o[i].data = c;
      if (in_data[i].strb) begin
        if (s.in_str) begin
          o[i].strb = 1'b1;
          if (s.esc)               s.esc = 1'b0;
          else if (c == CH_BSLASH) s.esc = 1'b1;
          else if (c == CH_QUOTE)  s.in_str = 1'b0;
        end else if (c == CH_QUOTE) begin
          o[i].strb  = 1'b1;
          s.in_str   = 1'b1;
          s.has_elem = 1'b1;
        end else if (s.depth == '0) begin
          if (c == CH_LBRACK) s.depth = 1;
        end else if (s.depth == 1) begin
          if (c == CH_COMMA) begin
            eend       = 1'b1;
            s.has_elem = 1'b0;
          end else if (c == CH_RBRACK) begin
            eend       = s.has_elem;
            s.has_elem = 1'b0;
            s.depth    = '0;
          end else begin
            o[i].strb  = 1'b1;
            s.has_elem = 1'b1;
            if (is_open(c)) s.depth = s.depth + 1'b1;
          end
        end else begin
          o[i].strb = 1'b1;
          if (is_open(c))       s.depth = s.depth + 1'b1;
          else if (is_close(c)) s.depth = s.depth - 1'b1;
        end
      end
      o[i].last = {in_data[i].last[NL-2:0], eend};
      if (in_data[i].last[0]) s = '0;
    end
    st_d = s;
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        st_q <= st_d;
        if (beat_nonempty(o)) begin
          out_valid <= 1'b1;
          out_data  <= o;
        end
      end
    end
  end

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
