// json_int_parser: converts decimal JSON numbers to two's-complement integers.
//
// The input carries the bytes of integer values, each value ended by last[0]
// (end of member value, or end of array element after json_array_parser). The
// parser walks the lanes of the current input transfer from a lane pointer up to
// the first lane that carries any last bit, accumulating acc = 10*acc + digit and
// noting a leading '-'. When it reaches such a lane it emits one output transfer:
// the value (negated if a '-' was seen) with strb set if last[0] closed a number
// that had digits, and the lane's last bits shifted down by one level (the value
// level is consumed). A lane with only higher last bits (e.g. end of a record
// whose member was absent) gives a transfer with strb low that only carries them.
// At most one value leaves per cycle: when a transfer holds several values (e.g.
// "10,20,30") the input is held and the lane pointer advances one value per cycle,
// so such a transfer takes one cycle per value. Digits after the last value end
// of a transfer are accumulated in the same cycle as that value leaves, so a
// transfer with one value end (plus the start of the next value) takes one cycle.
// Numbers are taken modulo 2^IW.
//
// Interface: valid/ready, json_pkg::beat_t in, json_pkg::int_t out.
// Timing: registered output, one value per cycle at most.
// Conversion to 64-bit two's complement and one value per transfer follow the
// reference design; the lane-pointer scheme is this design's choice.
module json_int_parser
  import json_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output int_t  out_data
);

  localparam int PW = $clog2(EPC);

  logic [PW-1:0] pos_q;
  logic [IW-1:0] acc_q;
  logic          neg_q, seen_q;

  logic [IW-1:0] a, ta;
  logic          n, sn, tn, tsn, found, tail_done;
  logic [PW-1:0] jf;
  logic [NL-1:0] fl;
  int_t          o;
  logic          can_out;

  always_comb begin
    a = acc_q;
    n = neg_q;
    sn = seen_q;
    found = 1'b0;
    jf = PW'(EPC - 1);
    fl = '0;
    for (int i = 0; i < EPC; i++) begin
      if (!found && i >= int'(pos_q)) begin
        if (in_data[i].strb) begin
          if (in_data[i].data == CH_MINUS) begin
            n = 1'b1;
          end else if (is_digit(in_data[i].data)) begin
            a  = a * IW'(10) + IW'(in_data[i].data - 8'h30);
            sn = 1'b1;
          end
        end
        if (|in_data[i].last) begin
          found = 1'b1;
          jf    = PW'(i);
          fl    = in_data[i].last;
        end
      end
    end
    // the lanes after the one that closed this value: if none of them closes
    // another value, their digits start the next value and the transfer is done
    ta        = '0;
    tn        = 1'b0;
    tsn       = 1'b0;
    tail_done = 1'b1;
    for (int i = 0; i < EPC; i++)
      if (i > int'(jf)) begin
        if (|in_data[i].last) tail_done = 1'b0;
        if (in_data[i].strb) begin
          if (in_data[i].data == CH_MINUS) begin
            tn = 1'b1;
          end else if (is_digit(in_data[i].data)) begin
            ta  = ta * IW'(10) + IW'(in_data[i].data - 8'h30);
            tsn = 1'b1;
          end
        end
      end
    o.strb  = fl[0] & sn;
    o.value = n ? -a : a;
    o.last  = {1'b0, fl[NL-1:1]};
  end

  assign can_out  = !out_valid || out_ready;
  assign in_ready = !found || (can_out && tail_done);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos_q     <= '0;
      acc_q     <= '0;
      neg_q     <= 1'b0;
      seen_q    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (in_valid) begin
        if (found && can_out) begin
          out_valid <= 1'b1;
          out_data  <= o;
          acc_q     <= tail_done ? ta : '0;
          neg_q     <= tail_done && tn;
          seen_q    <= tail_done && tsn;
          pos_q     <= tail_done ? '0 : jf + 1'b1;
        end else if (!found) begin
          acc_q  <= a;
          neg_q  <= n;
          seen_q <= sn;
          pos_q  <= '0;
        end
      end
    end
  end

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
