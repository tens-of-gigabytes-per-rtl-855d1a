// json_key_filter: passes the value of one named object member and drops the rest.
//
// The input is the output of json_object_parser: key bytes (tag=1, quotes
// included) followed by value bytes (tag=0), each member value ended by last[0].
// A string matcher compares the key bytes, one by one as they arrive, with the
// expected key KEY (KEY_LEN characters, quotes included, e.g. "\"id\""). At the
// first value byte the decision is taken: if every key byte matched and the key
// had exactly KEY_LEN bytes, the value bytes and the value's last[0] are passed;
// otherwise they are dropped. The higher last bits (end of object, end of buffer)
// are passed for every member, so the output keeps the record structure even for
// records that lack the member. The order of members does not matter.
//
// Interface: valid/ready streams of json_pkg::beat_t, same last layout in and out.
// Timing: one registered output stage, one transfer per cycle; transfers that end
// up empty are not emitted.
// The matching rule follows the reference design's key filter; matching on the
// key-tagged bytes produced by the object parser is this design's choice.
module json_key_filter
  import json_pkg::*;
#(
  parameter int                    KEY_LEN = 4,
  parameter logic [8*KEY_LEN-1:0]  KEY     = "\"id\""
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

  localparam int IDX_W = $clog2(KEY_LEN + 2);

  typedef struct packed {
    logic [IDX_W-1:0] idx;       // key bytes seen so far
    logic             match;     // all key bytes so far equal KEY
    logic             in_key;    // the last byte seen was a key byte
    logic             pass;      // current member value is passed
  } st_t;

  st_t   st_q, st_d;
  beat_t o;

  function automatic logic [7:0] key_char(int unsigned j);
    return KEY[8*(KEY_LEN-1-j) +: 8];
  endfunction

  always_comb begin
    st_t s;
    s = st_q;
    o = '0;
    for (int i = 0; i < EPC; i++) begin
      o[i].data = in_data[i].data;
      if (in_data[i].strb && in_data[i].tag) begin
        // string matcher
        if (!s.in_key) begin
          s.idx   = '0;
          s.match = 1'b1;
        end
        if (int'(s.idx) < KEY_LEN && in_data[i].data == key_char(int'(s.idx)))
          s.idx = s.idx + 1'b1;
        else
          s.match = 1'b0;
        s.in_key = 1'b1;
      end else if (in_data[i].strb) begin
        if (s.in_key) begin
          s.pass   = s.match && int'(s.idx) == KEY_LEN;
          s.in_key = 1'b0;
        end
        o[i].strb = s.pass;
      end
      o[i].last[NL-1:1] = in_data[i].last[NL-1:1];
      o[i].last[0]      = in_data[i].last[0] & s.pass;
      if (in_data[i].last[0]) begin
        s.pass   = 1'b0;
        s.in_key = 1'b0;
      end
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
