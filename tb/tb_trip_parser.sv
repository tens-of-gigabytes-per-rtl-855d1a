// tb_trip_parser: self-checking test of trip_parser, the complex-schema parser
// with twelve members.
//
// A buffer of 40 random trip documents (tb_json_pkg::trip_doc: timestamp string,
// four integers, two booleans, five arrays of 0..8 integers; members shuffled in
// half of the documents; random white space including newlines inside a
// document) is cut into random transfers with idle cycles. Each of the twelve
// outputs is back-pressured independently at random. Every output's rendered
// field stream must equal the expectation built from the documents, followed by
// the buffer end. A second buffer then checks that the parser continues cleanly
// after a buffer end.
module tb_trip_parser;
  import json_pkg::*;
  import tb_json_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid, in_ready;
  beat_t       in_data;
  logic [11:0] out_valid, out_ready;
  fld_t [11:0] out_data;
  int          checks = 0, failures = 0;
  string       got [12];

  trip_parser dut (.*);

  always #5 clk = ~clk;

  int n_in = 0;
  always_ff @(posedge clk) begin
    if (in_valid && in_ready) n_in <= n_in + 1;
    for (int f = 0; f < 12; f++) begin
      if (rst_n && out_valid[f] && out_ready[f])
        got[f] <= {got[f], (f == 0) ? render_fld_str(out_data[f]) : render_fld_int(out_data[f])};
      out_ready[f] <= $urandom % 4 != 0;
    end
  end

  initial begin
    beat_t   q[$];
    string   text;
    string   exp [12];
    trip_doc d;
    int      n0;
    in_valid = 1'b0;
    in_data  = '0;
    for (int f = 0; f < 12; f++) begin
      got[f] = "";
      exp[f] = "";
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < 2; b++) begin
      text = "";
      for (int r = 0; r < 40; r++) begin
        d = new(longint'(b * 1000 + r), 8);
        text = {text, d.txt};
        for (int f = 0; f < 12; f++) exp[f] = {exp[f], d.exp_fld(f)};
      end
      for (int f = 0; f < 12; f++) exp[f] = {exp[f], (f == 0) ? "<4>" : "<4> "};
      q.delete();
      beats_from_text(text, EPC, q);
      @(negedge clk);
      foreach (q[i]) begin
        repeat ($urandom % 2) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_data  = q[i];
        n0 = n_in;
        do @(negedge clk); while (n_in == n0);
      end
      in_valid = 1'b0;
    end
    repeat (100) @(posedge clk);

    for (int f = 0; f < 12; f++) begin
      checks++;
      if (got[f] != exp[f]) begin
        failures++;
        $display("FAIL member %0d (%s)", f, TRIP_KEY[f]);
        $display("got: %s", got[f]);
        $display("exp: %s", exp[f]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
