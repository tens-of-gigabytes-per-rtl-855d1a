// json_string_parser: strips the outer quotation marks of JSON string values.
//
// The input carries value bytes of string-typed members, each value ended by
// last[0]. The parser follows the string state (inside/outside quotes, backslash
// escape) lane by lane and clears the strobe of the opening and closing quote and
// of anything outside the quotes (so the literal null becomes an empty string).
// The characters between the quotes pass unchanged, escape sequences included;
// last[0] on the value's final lane then marks the end of the string.
//
// Interface: valid/ready streams of json_pkg::beat_t, last layout unchanged.
// Timing: one registered output stage, one transfer per cycle; transfers that end
// up empty are not emitted.
// Stripping the quotes follows the reference design; keeping escape sequences
// undecoded and mapping null to an empty string are this design's choices.
module json_string_parser
  import json_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_data
);

  logic  in_str_q, esc_q, in_str_d, esc_d;
  beat_t o;

  always_comb begin
    logic s, e;
    logic [7:0] c;
    s = in_str_q;
    e = esc_q;
    o = '0;
    for (int i = 0; i < EPC; i++) begin
      c = in_data[i].data;
      o[i].data = c;
      o[i].last = in_data[i].last;
      if (in_data[i].strb) begin
        if (!s) begin
          if (c == CH_QUOTE) s = 1'b1;
        end else if (e) begin
          o[i].strb = 1'b1;
          e = 1'b0;
        end else if (c == CH_BSLASH) begin
          o[i].strb = 1'b1;
          e = 1'b1;
        end else if (c == CH_QUOTE) begin
          s = 1'b0;
        end else begin
          o[i].strb = 1'b1;
        end
      end
      if (in_data[i].last[0]) begin
        s = 1'b0;
        e = 1'b0;
      end
    end
    in_str_d = s;
    esc_d    = e;
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_str_q  <= 1'b0;
      esc_q     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        in_str_q <= in_str_d;
        esc_q    <= esc_d;
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
