// json_object_parser: strips the braces of JSON objects and splits their members
// into key and value bytes.
//
// The input is a byte stream that holds a sequence of JSON objects (top-level
// documents, or the single object that forms a member value when used nested).
// Bytes outside an object are dropped. Inside an object the parser tracks strings
// (with backslash escapes) and the nesting depth of { } and [ ], so that only
// structural characters of the object itself are acted on:
//   ':' switches from the key part to the value part and is dropped,
//   ',' ends a member value and is dropped, '}' ends the last member value and
//   the object and is dropped, white space outside strings is dropped.
// Remaining bytes leave with tag=1 for the key (quotes included) and tag=0 for
// the value. Each lane's last bits become {in.last[NL-3:0], obj_end, value_end}:
// two new innermost levels are added below the input's own last bits.
//
// Interface: valid/ready byte streams of json_pkg::beat_t, EPC lanes each.
// Timing: one registered output stage, one transfer per cycle, no back-pressure of
// its own. Transfers that end up with no byte and no last bit are not emitted.
// The function follows the reference design's object parser; the lane encoding,
// white-space removal and the register stage are this design's choices.
module json_object_parser
  import json_pkg::*;
#(
  parameter int DEPTH_W = 8   // width of the nesting depth counter
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
    logic [DEPTH_W-1:0] depth;   // 0: outside any object, 1: object level
    logic               in_str;
    logic               esc;
    logic               in_val;  // in the value part of a member
  } st_t;

  st_t   st_q, st_d;
  beat_t o;

  always_comb begin
    st_t  s;
    logic vend, oend;
    logic [7:0] c;
    s = st_q;
    o = '0;
    for (int i = 0; i < EPC; i++) begin
      c    = in_data[i].data;
      vend = 1'b0;
      oend = 1'b0;
      o[i].data = c;
      if (in_data[i].strb) begin
        if (s.depth == '0) begin
          if (c == CH_LBRACE) begin
            s.depth  = 1;
            s.in_val = 1'b0;
          end
        end else if (s.in_str) begin
          o[i].strb = 1'b1;
          if (s.esc)                 s.esc = 1'b0;
          else if (c == CH_BSLASH)   s.esc = 1'b1;
          else if (c == CH_QUOTE)    s.in_str = 1'b0;
        end else if (c == CH_QUOTE) begin
          o[i].strb = 1'b1;
          s.in_str  = 1'b1;
        end else if (is_space(c)) begin
          // dropped
        end else if (s.depth == 1) begin
          if (c == CH_COLON && !s.in_val) begin
            s.in_val = 1'b1;
          end else if (c == CH_COMMA && s.in_val) begin
            vend     = 1'b1;
            s.in_val = 1'b0;
          end else if (c == CH_RBRACE) begin
            vend     = s.in_val;
            oend     = 1'b1;
            s.depth  = '0;
            s.in_val = 1'b0;
          end else begin
            o[i].strb = 1'b1;
            if (is_open(c)) s.depth = s.depth + 1'b1;
          end
        end else begin
          o[i].strb = 1'b1;
          if (is_open(c))       s.depth = s.depth + 1'b1;
          else if (is_close(c)) s.depth = s.depth - 1'b1;
        end
      end
      o[i].tag  = o[i].strb & ~s.in_val;
      o[i].last = {in_data[i].last[NL-3:0], oend, vend};
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

  // Stream rule: a presented transfer stays until accepted.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
