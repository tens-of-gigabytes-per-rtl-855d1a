// json_bool_parser: converts the JSON literals true and false to one bit.
//
// The input carries the bytes of boolean values, each value ended by last[0].
// Like json_int_parser, the parser walks the lanes of the current transfer from a
// lane pointer to the first lane with a last bit; the first byte of a value
// decides it ('t' gives 1, anything else 0). It emits one transfer per lane that
// carries last bits: strb set if last[0] closed a value that had bytes, and the
// last bits shifted down by one level. Several values in one transfer hold the
// input for one cycle per value.
//
// Interface: valid/ready, json_pkg::beat_t in, json_pkg::bool_t out.
// Timing: registered output, one value per cycle at most.
// The reference design names a bool parser without describing it; deciding on the
// first character is this design's choice.
module json_bool_parser
  import json_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output bool_t out_data
);

  localparam int PW = $clog2(EPC);

  logic [PW-1:0] pos_q;
  logic          val_q, seen_q;

  logic          v, sn, found, tail_done, can_out;
  logic [PW-1:0] jf;
  logic [NL-1:0] fl;
  bool_t         o;

  always_comb begin
    v = val_q;
    sn = seen_q;
    found = 1'b0;
    jf = PW'(EPC - 1);
    fl = '0;
    for (int i = 0; i < EPC; i++) begin
      if (!found && i >= int'(pos_q)) begin
        if (in_data[i].strb && !sn) begin
          v  = in_data[i].data == 8'h74;  // 't'
          sn = 1'b1;
        end
        if (|in_data[i].last) begin
          found = 1'b1;
          jf    = PW'(i);
          fl    = in_data[i].last;
        end
      end
    end
    tail_done = 1'b1;
    for (int i = 0; i < EPC; i++)
      if (i > int'(jf) && (in_data[i].strb || |in_data[i].last)) tail_done = 1'b0;
    o.strb  = fl[0] & sn;
    o.value = v;
    o.last  = {1'b0, fl[NL-1:1]};
  end

  assign can_out  = !out_valid || out_ready;
  assign in_ready = !found || (can_out && tail_done);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos_q     <= '0;
      val_q     <= 1'b0;
      seen_q    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (in_valid) begin
        if (found && can_out) begin
          out_valid <= 1'b1;
          out_data  <= o;
          val_q     <= 1'b0;
          seen_q    <= 1'b0;
          pos_q     <= tail_done ? '0 : jf + 1'b1;
        end else if (!found) begin
          val_q  <= v;
          seen_q <= sn;
          pos_q  <= '0;
        end
      end
    end
  end

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
