// battery_parser: schema-specific parser for the simple use-case, documents of
// the form { "voltage": [1337, 1024, 768, 384, 42] } (one member, a
// variable-length array of integers), one document per line of the input buffer.
//
// Chain: object parser -> key filter "voltage" -> array parser -> integer parser.
// The integer stream's last bits are [end of list, end of record, end of buffer];
// they are renamed onto the uniform field stream (json_pkg::fld_t) that the Arrow
// column adapter takes. Only one member is expected, so no stream synchroniser is
// needed between the object parser and the key filter.
//
// Interface: raw JSON bytes in (json_pkg::beat_t, EPC bytes per transfer, strb per
// lane, last[0] on the last byte of the input buffer); one field stream out.
// Timing: up to EPC input bytes per cycle, at most one integer out per cycle;
// latency of four register stages.
// The composition follows the reference design; stream formats are this
// design's own.
module battery_parser
  import json_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output fld_t  out_data
);

  localparam int                KLEN = 9;
  localparam logic [8*KLEN-1:0] KEY  = "\"voltage\"";

  logic  obj_v, obj_r, kf_v, kf_r, arr_v, arr_r;
  beat_t obj_d, kf_d, arr_d;
  int_t  int_d;

  json_object_parser u_obj (
    .clk, .rst_n,
    .in_valid (in_valid), .in_ready (in_ready), .in_data (in_data),
    .out_valid(obj_v),    .out_ready(obj_r),    .out_data(obj_d)
  );

  json_key_filter #(.KEY_LEN(KLEN), .KEY(KEY)) u_kf (
    .clk, .rst_n,
    .in_valid (obj_v), .in_ready (obj_r), .in_data (obj_d),
    .out_valid(kf_v),  .out_ready(kf_r),  .out_data(kf_d)
  );

  json_array_parser u_arr (
    .clk, .rst_n,
    .in_valid (kf_v),  .in_ready (kf_r),  .in_data (kf_d),
    .out_valid(arr_v), .out_ready(arr_r), .out_data(arr_d)
  );

  json_int_parser u_int (
    .clk, .rst_n,
    .in_valid (arr_v),     .in_ready (arr_r),     .in_data (arr_d),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(int_d)
  );

  assign out_data = int_to_fld(int_d, 1'b1, 0, 1, 2);

endmodule
