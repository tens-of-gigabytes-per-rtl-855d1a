// listing1_parser: the example parser composition for documents such as
//   { "id": 11, "message": "Hi FPT!", "read": false,
//     "meta": { "refs": [42, 1337], "tag": null } }
// i.e. a record with an integer, a string, a boolean and a nested object that
// holds an integer array and a string.
//
// Structure: object parser -> synchroniser (4 outputs) -> key filters "id",
// "message", "read", "meta". "id" feeds an integer parser, "message" a string
// parser, "read" a bool parser. "meta" feeds a second (nested) object parser ->
// synchroniser (2 outputs) -> key filters "refs" (array parser -> integer parser)
// and "tag" (string parser). Each object parser adds two last levels, each array
// parser one, and each value parser consumes one, so the five outputs carry their
// record and buffer ends at different last positions; they are renamed onto the
// uniform field stream json_pkg::fld_t.
//
// Outputs (index): 0 id (integer), 1 message (string), 2 read (boolean),
// 3 meta.refs (integer list), 4 meta.tag (string; null gives an empty string).
// Interface: raw JSON bytes in (json_pkg::beat_t, last[0] on the last byte of the
// buffer); five field streams out.
// The block structure is the reference design's example parser; stream formats
// and the handling of null are this design's choices.
module listing1_parser
  import json_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  beat_t      in_data,
  output logic [4:0] out_valid,
  input  logic [4:0] out_ready,
  output fld_t [4:0] out_data
);

  localparam int BW = $bits(beat_t);

  // top-level object
  logic          obj_v, obj_r;
  beat_t         obj_d;
  logic [3:0]    sy_v, sy_r;
  logic [BW-1:0] sy_d;

  json_object_parser u_obj (
    .clk, .rst_n,
    .in_valid (in_valid), .in_ready (in_ready), .in_data (in_data),
    .out_valid(obj_v),    .out_ready(obj_r),    .out_data(obj_d)
  );

  stream_sync #(.N(4), .W(BW)) u_sync (
    .clk, .rst_n,
    .in_valid (obj_v), .in_ready (obj_r), .in_data (obj_d),
    .out_valid(sy_v),  .out_ready(sy_r),  .out_data(sy_d)
  );

  // "id": integer
  logic  id_v, id_r;
  beat_t id_d;
  int_t  id_i;
  json_key_filter #(.KEY_LEN(4), .KEY("\"id\"")) u_kf_id (
    .clk, .rst_n,
    .in_valid (sy_v[0]), .in_ready (sy_r[0]), .in_data (beat_t'(sy_d)),
    .out_valid(id_v),    .out_ready(id_r),    .out_data(id_d)
  );
  json_int_parser u_int_id (
    .clk, .rst_n,
    .in_valid (id_v),         .in_ready (id_r),         .in_data (id_d),
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_data(id_i)
  );
  // levels after the integer parser: [record, buffer]
  assign out_data[0] = int_to_fld(id_i, 1'b0, 0, 0, 1);

  // "message": string
  logic  ms_v, ms_r;
  beat_t ms_d, ms_s;
  json_key_filter #(.KEY_LEN(9), .KEY("\"message\"")) u_kf_msg (
    .clk, .rst_n,
    .in_valid (sy_v[1]), .in_ready (sy_r[1]), .in_data (beat_t'(sy_d)),
    .out_valid(ms_v),    .out_ready(ms_r),    .out_data(ms_d)
  );
  json_string_parser u_str_msg (
    .clk, .rst_n,
    .in_valid (ms_v),         .in_ready (ms_r),         .in_data (ms_d),
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_data(ms_s)
  );
  // levels: [string, record, buffer]
  assign out_data[1] = beat_to_fld(ms_s, 0, 1, 2);

  // "read": boolean
  logic  rd_v, rd_r;
  beat_t rd_d;
  bool_t rd_b;
  json_key_filter #(.KEY_LEN(6), .KEY("\"read\"")) u_kf_read (
    .clk, .rst_n,
    .in_valid (sy_v[2]), .in_ready (sy_r[2]), .in_data (beat_t'(sy_d)),
    .out_valid(rd_v),    .out_ready(rd_r),    .out_data(rd_d)
  );
  json_bool_parser u_bool_read (
    .clk, .rst_n,
    .in_valid (rd_v),         .in_ready (rd_r),         .in_data (rd_d),
    .out_valid(out_valid[2]), .out_ready(out_ready[2]), .out_data(rd_b)
  );
  assign out_data[2] = bool_to_fld(rd_b, 0, 1);

  // "meta": nested object
  logic          mt_v, mt_r, no_v, no_r;
  beat_t         mt_d, no_d;
  logic [1:0]    ns_v, ns_r;
  logic [BW-1:0] ns_d;
  json_key_filter #(.KEY_LEN(6), .KEY("\"meta\"")) u_kf_meta (
    .clk, .rst_n,
    .in_valid (sy_v[3]), .in_ready (sy_r[3]), .in_data (beat_t'(sy_d)),
    .out_valid(mt_v),    .out_ready(mt_r),    .out_data(mt_d)
  );
  json_object_parser u_obj_meta (
    .clk, .rst_n,
    .in_valid (mt_v), .in_ready (mt_r), .in_data (mt_d),
    .out_valid(no_v), .out_ready(no_r), .out_data(no_d)
  );
  stream_sync #(.N(2), .W(BW)) u_sync_meta (
    .clk, .rst_n,
    .in_valid (no_v), .in_ready (no_r), .in_data (no_d),
    .out_valid(ns_v), .out_ready(ns_r), .out_data(ns_d)
  );
  // levels after the nested object parser:
  // [member value, inner object, meta value, record, buffer]

  // "refs": integer array
  logic  rf_v, rf_r, ra_v, ra_r;
  beat_t rf_d, ra_d;
  int_t  rf_i;
  json_key_filter #(.KEY_LEN(6), .KEY("\"refs\"")) u_kf_refs (
    .clk, .rst_n,
    .in_valid (ns_v[0]), .in_ready (ns_r[0]), .in_data (beat_t'(ns_d)),
    .out_valid(rf_v),    .out_ready(rf_r),    .out_data(rf_d)
  );
  json_array_parser u_arr_refs (
    .clk, .rst_n,
    .in_valid (rf_v), .in_ready (rf_r), .in_data (rf_d),
    .out_valid(ra_v), .out_ready(ra_r), .out_data(ra_d)
  );
  json_int_parser u_int_refs (
    .clk, .rst_n,
    .in_valid (ra_v),         .in_ready (ra_r),         .in_data (ra_d),
    .out_valid(out_valid[3]), .out_ready(out_ready[3]), .out_data(rf_i)
  );
  // levels: [list, inner object, meta value, record, buffer]
  assign out_data[3] = int_to_fld(rf_i, 1'b1, 0, 3, 4);

  // "tag": string
  logic  tg_v, tg_r;
  beat_t tg_d, tg_s;
  json_key_filter #(.KEY_LEN(5), .KEY("\"tag\"")) u_kf_tag (
    .clk, .rst_n,
    .in_valid (ns_v[1]), .in_ready (ns_r[1]), .in_data (beat_t'(ns_d)),
    .out_valid(tg_v),    .out_ready(tg_r),    .out_data(tg_d)
  );
  json_string_parser u_str_tag (
    .clk, .rst_n,
    .in_valid (tg_v),         .in_ready (tg_r),         .in_data (tg_d),
    .out_valid(out_valid[4]), .out_ready(out_ready[4]), .out_data(tg_s)
  );
  // levels: [string, inner object, meta value, record, buffer]
  assign out_data[4] = beat_to_fld(tg_s, 0, 3, 4);

endmodule
