// tb_listing1_parser: self-checking test of listing1_parser, the example parser
// for records {id, message, read, meta {refs, tag}}.
//
// The buffer repeats three documents eight times: the example document spread
// over several lines (id 11, "Hi FPT!", false, refs [42, 1337], tag null), a
// compact one (404, "Beans", true, [11], "coffee"), and one with the members in
// reverse order, an empty string, an empty array and a tag before refs. It is cut
// into random transfers with idle cycles; each of the five outputs is
// back-pressured independently at random. Each output's rendered field stream
// (values, list/string ends <1>, record ends <2>, buffer end <4>) is compared with
// the expectation.
module tb_listing1_parser;
  import json_pkg::*;
  import tb_json_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid, in_ready;
  beat_t      in_data;
  logic [4:0] out_valid, out_ready;
  fld_t [4:0] out_data;
  int         checks = 0, failures = 0;
  string      got [5];

  listing1_parser dut (.*);

  always #5 clk = ~clk;

  int n_in = 0;
  always_ff @(posedge clk) begin
    if (in_valid && in_ready) n_in <= n_in + 1;
    for (int k = 0; k < 5; k++) begin
      if (rst_n && out_valid[k] && out_ready[k])
        got[k] <= {got[k], (k == 1 || k == 4) ? render_fld_str(out_data[k])
                                              : render_fld_int(out_data[k])};
      out_ready[k] <= $urandom % 3 != 0;
    end
  end

  localparam string DOC1 = {"( 'id': 11,\n  'message': 'Hi FPT!',\n  'read': false,\n",
                            "  'meta': (\n    'refs': [42, 1337],\n    'tag': null\n  )\n)\n"};
  localparam string DOC2 = "('id':404,'message':'Beans','read':true,'meta':('refs':[11],'tag':'coffee'))\n";
  localparam string DOC3 = "('meta':('tag':'x','refs':[]),'read':true,'message':'','id':7)\n";

  initial begin
    beat_t q[$];
    string text = "";
    string exp [5];
    int    n0;
    in_valid = 1'b0;
    in_data  = '0;
    for (int k = 0; k < 5; k++) begin
      got[k] = "";
      exp[k] = "";
    end
    for (int r = 0; r < 8; r++) begin
      text   = {text, j(DOC1), j(DOC2), j(DOC3)};
      exp[0] = {exp[0], "11 <2> 404 <2> 7<2> "};
      exp[1] = {exp[1], "Hi FPT!<1><2>Beans<1><2><1><2>"};
      exp[2] = {exp[2], "0 <2> 1 <2> 1 <2> "};
      exp[3] = {exp[3], "42 1337 <1> <2> 11 <1> <2> <1> <2> "};
      exp[4] = {exp[4], "<1><2>coffee<1><2>x<1><2>"};
    end
    exp[0] = {exp[0], "<4> "};
    exp[1] = {exp[1], "<4>"};
    exp[2] = {exp[2], "<4> "};
    exp[3] = {exp[3], "<4> "};
    exp[4] = {exp[4], "<4>"};
    beats_from_text(text, EPC, q);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
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
    repeat (60) @(posedge clk);

    for (int k = 0; k < 5; k++) begin
      checks++;
      if (got[k] != exp[k]) begin
        failures++;
        $display("FAIL output %0d", k);
        $display("got: %s", got[k]);
        $display("exp: %s", exp[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
