// trip_parser: schema-specific parser for the complex use-case, vehicle trip
// documents with twelve members: one string, four integers, two booleans and five
// arrays of integers, one document per line of the input buffer.
//
// Chain: an object parser feeds a stream synchroniser with twelve outputs; each
// output goes to a key filter for one member and then to the value parser of
// that member's type (string parser; integer parser; bool parser; array parser
// followed by integer parser). Every value stream is renamed onto the uniform
// field stream json_pkg::fld_t, so all twelve outputs share one format.
// Member names and types are given by the FIELD_* tables below: members 0 to 4
// are timestamp, odometer, hypermiling, avgspeed and sec_in_band; the names of
// members 5 to 11 are this design's placeholders (only their types are known:
// two integers, one boolean, four integer arrays), and can be changed by editing
// the tables. Members are matched by name, in any order.
//
// Interface: raw JSON bytes in (json_pkg::beat_t, last[0] on the last byte of the
// buffer); twelve field streams out, index = member number.
// Timing: EPC bytes per cycle in when no output back-pressures; every member's
// branch runs in parallel.
// The composition follows the reference design; the member tables beyond the
// five named members and the stream formats are this design's own.
module trip_parser
  import json_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  beat_t                   in_data,
  output logic [11:0]             out_valid,
  input  logic [11:0]             out_ready,
  output fld_t [11:0]             out_data
);

  localparam int NF   = 12;
  localparam int MAXK = 32;

  // member types
  localparam int T_STR  = 0;
  localparam int T_INT  = 1;
  localparam int T_BOOL = 2;
  localparam int T_LIST = 3;

  localparam int FIELD_TYPE [NF] = '{
    T_STR, T_INT, T_BOOL, T_INT, T_LIST,
    T_INT, T_INT, T_BOOL, T_LIST, T_LIST, T_LIST, T_LIST
  };
  localparam int FIELD_KLEN [NF] = '{11, 10, 13, 10, 13, 10, 5, 13, 21, 27, 26, 11};
  localparam logic [8*MAXK-1:0] FIELD_KEY [NF] = '{
    "\"timestamp\"",
    "\"odometer\"",
    "\"hypermiling\"",
    "\"avgspeed\"",
    "\"sec_in_band\"",
    "\"timezone\"",
    "\"vin\"",
    "\"orientation\"",
    "\"miles_in_time_range\"",
    "\"const_speed_miles_in_band\"",
    "\"vary_speed_miles_in_band\"",
    "\"sec_decel\""
  };

  logic          obj_v, obj_r;
  beat_t         obj_d;
  logic [NF-1:0] sy_v, sy_r;
  logic [$bits(beat_t)-1:0] sy_d;

  json_object_parser u_obj (
    .clk, .rst_n,
    .in_valid (in_valid), .in_ready (in_ready), .in_data (in_data),
    .out_valid(obj_v),    .out_ready(obj_r),    .out_data(obj_d)
  );

  stream_sync #(.N(NF), .W($bits(beat_t))) u_sync (
    .clk, .rst_n,
    .in_valid (obj_v), .in_ready (obj_r), .in_data (obj_d),
    .out_valid(sy_v),  .out_ready(sy_r),  .out_data(sy_d)
  );

  for (genvar g = 0; g < NF; g++) begin : g_field
    localparam int KL = FIELD_KLEN[g];
    logic  kf_v, kf_r;
    beat_t kf_d;

    json_key_filter #(.KEY_LEN(KL), .KEY(FIELD_KEY[g][8*KL-1:0])) u_kf (
      .clk, .rst_n,
      .in_valid (sy_v[g]), .in_ready (sy_r[g]), .in_data (beat_t'(sy_d)),
      .out_valid(kf_v),    .out_ready(kf_r),    .out_data(kf_d)
    );

    if (FIELD_TYPE[g] == T_STR) begin : g_str
      beat_t s_d;
      json_string_parser u_str (
        .clk, .rst_n,
        .in_valid (kf_v),         .in_ready (kf_r),         .in_data (kf_d),
        .out_valid(out_valid[g]), .out_ready(out_ready[g]), .out_data(s_d)
      );
      assign out_data[g] = beat_to_fld(s_d, 0, 1, 2);
    end else if (FIELD_TYPE[g] == T_INT) begin : g_int
      int_t i_d;
      json_int_parser u_int (
        .clk, .rst_n,
        .in_valid (kf_v),         .in_ready (kf_r),         .in_data (kf_d),
        .out_valid(out_valid[g]), .out_ready(out_ready[g]), .out_data(i_d)
      );
      assign out_data[g] = int_to_fld(i_d, 1'b0, 0, 0, 1);
    end else if (FIELD_TYPE[g] == T_BOOL) begin : g_bool
      bool_t b_d;
      json_bool_parser u_bool (
        .clk, .rst_n,
        .in_valid (kf_v),         .in_ready (kf_r),         .in_data (kf_d),
        .out_valid(out_valid[g]), .out_ready(out_ready[g]), .out_data(b_d)
      );
      assign out_data[g] = bool_to_fld(b_d, 0, 1);
    end else begin : g_list
      logic  a_v, a_r;
      beat_t a_d;
      int_t  i_d;
      json_array_parser u_arr (
        .clk, .rst_n,
        .in_valid (kf_v), .in_ready (kf_r), .in_data (kf_d),
        .out_valid(a_v),  .out_ready(a_r),  .out_data(a_d)
      );
      json_int_parser u_int (
        .clk, .rst_n,
        .in_valid (a_v),          .in_ready (a_r),          .in_data (a_d),
        .out_valid(out_valid[g]), .out_ready(out_ready[g]), .out_data(i_d)
      );
      assign out_data[g] = int_to_fld(i_d, 1'b1, 0, 1, 2);
    end
  end

endmodule
