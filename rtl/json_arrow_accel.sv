// json_arrow_accel: the accelerator's parsing kernels, from raw JSON byte streams
// to Arrow column streams, for the two use-cases plus the nested example schema.
//
// Three independent parts stand side by side, each with its own ports:
//   s_*  NUM_SIMPLE kernels for the simple schema ({"voltage": [ints]}). Every
//        kernel is a battery_parser and an arrow_col_adapter and has its own
//        input stream and its own voltage column streams (values and list
//        lengths), i.e. its own column writer.
//   c_*  one complex-schema kernel (trip_kernel): NUM_COMPLEX trip_parser
//        instances multiplexed onto one set of twelve column streams.
//   e_*  the nested example parser (listing1_parser) with five column adapters.
// Each input stream is the contents of one host buffer (newline-separated JSON
// documents), EPC bytes per transfer, last[0] of the lane holding the final byte
// set; the column writers that fetch these buffers and write the Arrow buffers to
// host memory, the control registers and the host link attach at these ports.
//
// Timing: each parser takes up to EPC = 8 bytes per cycle (1.6 GB/s at 200 MHz);
// throughput scales with the number of parser instances.
// Instance counts default to the 32 simple-schema and 8 complex-schema parsers of
// the reference design's larger (OpenCAPI) build; the example parser is this
// design's addition of the reference design's illustrative composition.
module json_arrow_accel
  import json_pkg::*;
#(
  parameter int NUM_SIMPLE  = 32,
  parameter int NUM_COMPLEX = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // simple schema
  input  logic [NUM_SIMPLE-1:0]   s_in_valid,
  output logic [NUM_SIMPLE-1:0]   s_in_ready,
  input  beat_t [NUM_SIMPLE-1:0]  s_in_data,
  output logic [NUM_SIMPLE-1:0]   s_val_valid,
  input  logic [NUM_SIMPLE-1:0]   s_val_ready,
  output col_t [NUM_SIMPLE-1:0]   s_val_data,
  output logic [NUM_SIMPLE-1:0]   s_len_valid,
  input  logic [NUM_SIMPLE-1:0]   s_len_ready,
  output len_t [NUM_SIMPLE-1:0]   s_len_data,
  // complex schema
  input  logic [NUM_COMPLEX-1:0]  c_in_valid,
  output logic [NUM_COMPLEX-1:0]  c_in_ready,
  input  beat_t [NUM_COMPLEX-1:0] c_in_data,
  output logic [11:0]             c_val_valid,
  input  logic [11:0]             c_val_ready,
  output col_t [11:0]             c_val_data,
  output logic [11:0]             c_len_valid,
  input  logic [11:0]             c_len_ready,
  output len_t [11:0]             c_len_data,
  // nested example schema
  input  logic                    e_in_valid,
  output logic                    e_in_ready,
  input  beat_t                   e_in_data,
  output logic [4:0]              e_val_valid,
  input  logic [4:0]              e_val_ready,
  output col_t [4:0]              e_val_data,
  output logic [4:0]              e_len_valid,
  input  logic [4:0]              e_len_ready,
  output len_t [4:0]              e_len_data
);

  // simple-schema kernels
  for (genvar k = 0; k < NUM_SIMPLE; k++) begin : g_simple
    logic pv, pr;
    fld_t pd;
    battery_parser u_parser (
      .clk, .rst_n,
      .in_valid (s_in_valid[k]), .in_ready (s_in_ready[k]), .in_data (s_in_data[k]),
      .out_valid(pv),            .out_ready(pr),            .out_data(pd)
    );
    arrow_col_adapter #(.IS_LIST(1'b1)) u_adapt (
      .clk, .rst_n,
      .in_valid (pv), .in_ready (pr), .in_data (pd),
      .val_valid(s_val_valid[k]), .val_ready(s_val_ready[k]), .val_data(s_val_data[k]),
      .len_valid(s_len_valid[k]), .len_ready(s_len_ready[k]), .len_data(s_len_data[k])
    );
  end

  // complex-schema kernel
  trip_kernel #(.P(NUM_COMPLEX)) u_trip (
    .clk, .rst_n,
    .in_valid (c_in_valid),  .in_ready (c_in_ready),  .in_data (c_in_data),
    .val_valid(c_val_valid), .val_ready(c_val_ready), .val_data(c_val_data),
    .len_valid(c_len_valid), .len_ready(c_len_ready), .len_data(c_len_data)
  );

  // nested example
  logic [4:0] ev, er;
  fld_t [4:0] ed;
  // members with a length stream: message, refs, tag
  localparam logic [4:0] E_HAS_LEN = 5'b11010;

  listing1_parser u_example (
    .clk, .rst_n,
    .in_valid (e_in_valid), .in_ready (e_in_ready), .in_data (e_in_data),
    .out_valid(ev),         .out_ready(er),         .out_data(ed)
  );

  for (genvar f = 0; f < 5; f++) begin : g_example_col
    arrow_col_adapter #(.IS_LIST(E_HAS_LEN[f])) u_adapt (
      .clk, .rst_n,
      .in_valid (ev[f]), .in_ready (er[f]), .in_data (ed[f]),
      .val_valid(e_val_valid[f]), .val_ready(e_val_ready[f]), .val_data(e_val_data[f]),
      .len_valid(e_len_valid[f]), .len_ready(e_len_ready[f]), .len_data(e_len_data[f])
    );
  end

endmodule
