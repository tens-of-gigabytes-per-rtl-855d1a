// tb_battery_parser: self-checking test of battery_parser, the simple-schema
// parser for documents {"voltage": [..integers..]}.
//
// Part 1: a buffer of 80 random documents, arrays of 1..16 non-negative integers
// below 2^31, random white space around every token, cut into random transfers
// with idle cycles while the output is back-pressured at random. The field stream
// must list every value in order, the list end and record end after each document
// and the buffer end at the close.
// Part 2 (rate): 40 documents whose values are all nine digits long, packed into
// full 8-byte transfers, output always ready. Only a transfer holding both a
// document's last value end and its record end carries two ends, so the parser
// must take the 370 transfers in at most 370 + 40 cycles: close to 8 bytes per
// cycle, the peak input rate of one parser.
module tb_battery_parser;
  import json_pkg::*;
  import tb_json_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, in_ready, out_valid, out_ready;
  beat_t in_data;
  fld_t  out_data;
  int    checks = 0, failures = 0;
  bit    rand_ready = 1'b1;
  string got = "";

  battery_parser dut (.*);

  always #5 clk = ~clk;

  int n_in = 0, cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) n_in <= n_in + 1;
    if (rst_n && out_valid && out_ready) got <= {got, render_fld_int(out_data)};
    out_ready <= rand_ready ? ($urandom % 3 != 0) : 1'b1;
  end

  task automatic send(ref beat_t q[$], input bit gaps);
    int n0;
    @(negedge clk);
    foreach (q[i]) begin
      if (gaps) repeat ($urandom % 2) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_data  = q[i];
      n0 = n_in;
      do @(negedge clk); while (n_in == n0);
    end
    in_valid = 1'b0;
  endtask

  function automatic string ws();
    case ($urandom % 4)
      0: return "";
      1: return " ";
      2: return "  ";
      default: return "\t";
    endcase
  endfunction

  initial begin
    beat_t q[$];
    string text = "", exp = "";
    int    n, v, t0, t1, nb;
    in_valid = 1'b0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // part 1
    for (int r = 0; r < 80; r++) begin
      n = 1 + $urandom % 16;
      text = {text, ws(), "{", ws(), "\"voltage\"", ws(), ":", ws(), "["};
      for (int e = 0; e < n; e++) begin
        v = int'($urandom >> ($urandom % 32)) & 32'h7fff_ffff;
        text = {text, (e > 0) ? "," : "", ws(), $sformatf("%0d", v), ws()};
        exp  = {exp, $sformatf("%0d ", v)};
      end
      text = {text, "]", ws(), "}\n"};
      exp  = {exp, "<1><2> "};
    end
    exp = {exp, "<4> "};
    beats_from_text(text, EPC, q);
    send(q, 1'b1);
    repeat (40) @(posedge clk);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL values");
      $display("got: %s", got);
      $display("exp: %s", exp);
    end

    // part 2: input rate with one value end per transfer at most
    rand_ready = 1'b0;
    text = "";
    for (int r = 0; r < 40; r++) begin
      text = {text, "{\"voltage\":["};
      for (int e = 0; e < 6; e++)
        text = {text, (e > 0) ? "," : "", $sformatf("%0d", 100000000 + $urandom % 800000000)};
      text = {text, "]}\n"};
    end
    q.delete();
    for (int i = 0; i < text.len(); i += EPC) begin
      beat_t b;
      b = '0;
      for (int k = 0; k < EPC; k++)
        if (i + k < text.len()) begin
          b[k].strb = 1'b1;
          b[k].data = text[i+k];
          if (i + k == text.len() - 1) b[k].last[0] = 1'b1;
        end
      q.push_back(b);
    end
    nb = q.size();
    repeat (3) @(posedge clk);
    t0 = cyc;
    send(q, 1'b0);
    t1 = cyc;
    checks++;
    if (t1 - t0 > nb + 40 + 2) begin
      failures++;
      $display("FAIL rate: %0d transfers (%0d bytes) took %0d cycles", nb, text.len(), t1 - t0);
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
