// tb_json_int_parser: self-checking test of json_int_parser.
//
// Part 1: random documents {"v": [ints]} (0..6 values each, random sign and
// magnitude up to 2^62, random white space) pass a json_object_parser, a key
// filter and an array parser; the integer parser's output must list the values
// generated, the list/record end after each array and the buffer end at the
// close. Random transfers, idle cycles and output back-pressure.
// Part 2 drives the parser directly (element ends already marked on the
// separator lanes). A transfer holding "1,2,3]" carries three complete values and
// must be held for two extra cycles, one value leaving per cycle; a transfer
// holding "10,20,30" whose third value is closed by the next transfer must take
// two cycles, the digits of 30 being accumulated while 20 leaves.
module tb_json_int_parser;
  import json_pkg::*;
  import tb_json_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, in_ready;
  beat_t in_data;
  int    checks = 0, failures = 0;
  string got = "";
  bit    direct = 1'b0, rand_ready = 1'b1;

  always #5 clk = ~clk;

  logic  o_v, o_r, k_v, k_r, a_v, a_r;
  beat_t o_d, k_d, a_d;
  json_object_parser u_obj (
    .clk, .rst_n, .in_valid(in_valid && !direct), .in_ready, .in_data,
    .out_valid(o_v), .out_ready(o_r), .out_data(o_d)
  );
  json_key_filter #(.KEY_LEN(3), .KEY("\"v\"")) u_kf (
    .clk, .rst_n, .in_valid(o_v), .in_ready(o_r), .in_data(o_d),
    .out_valid(k_v), .out_ready(k_r), .out_data(k_d)
  );
  json_array_parser u_arr (
    .clk, .rst_n, .in_valid(k_v), .in_ready(k_r), .in_data(k_d),
    .out_valid(a_v), .out_ready(a_r), .out_data(a_d)
  );

  // the parser under test takes the array parser's output, or the testbench's
  // own transfers in part 2
  logic  d_v, d_r, out_valid, out_ready;
  beat_t d_d;
  int_t  out_data;
  logic  dut_in_ready;
  assign d_v = direct ? in_valid : a_v;
  assign d_d = direct ? in_data : a_d;
  assign a_r = !direct && d_r;
  assign d_r = dut_in_ready;
  json_int_parser dut (
    .clk, .rst_n, .in_valid(d_v), .in_ready(dut_in_ready), .in_data(d_d),
    .out_valid, .out_ready, .out_data
  );

  int n_in = 0, cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && (direct ? dut_in_ready : in_ready)) n_in <= n_in + 1;
    if (rst_n && out_valid && out_ready) got <= {got, render_int(out_data)};
    out_ready <= rand_ready ? ($urandom % 4 != 0) : 1'b1;
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

  initial begin
    beat_t  q[$];
    string  text = "", exp = "";
    longint v;
    int     n, n0, t0, t1;
    in_valid = 1'b0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // part 1
    for (int r = 0; r < 60; r++) begin
      n = $urandom % 7;
      text = {text, j("('v': [")};
      for (int e = 0; e < n; e++) begin
        v = longint'({$urandom, $urandom}) >>> ($urandom % 63);
        text = {text, (e > 0) ? ((($urandom % 2) != 0) ? ", " : ",") : "", $sformatf("%0d", v)};
        exp  = {exp, $sformatf("%0d ", v)};
      end
      text = {text, j("])\n")};
      exp  = {exp, "<3> "};
    end
    exp = {exp, "<4> "};
    beats_from_text(text, EPC, q);
    send(q, 1'b1);
    repeat (50) @(posedge clk);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL values");
      $display("got: %s", got);
      $display("exp: %s", exp);
    end

    // part 2: "10,20,30" in one transfer, one value per cycle
    direct     = 1'b1;
    rand_ready = 1'b0;
    got        = "";
    repeat (3) @(posedge clk);
    // (a) "1,2,3]": three values closed in one transfer, held three cycles
    // (b) "10,20,30" with the third value closed by the next transfer: held two
    for (int t = 0; t < 2; t++) begin
      beat_t b, c;
      string s;
      b = '0;
      c = '0;
      s = (t == 0) ? "1,2,3]" : "10,20,30";
      for (int i = 0; i < s.len(); i++) begin
        if (s[i] == ",") b[i].last[0] = 1'b1;
        else if (s[i] == "]") b[i].last = 8'h03;
        else begin
          b[i].strb = 1'b1;
          b[i].data = s[i];
        end
      end
      c[0].last = 8'h03;  // closes the last element and the list
      got = "";
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = b;
      t0 = cyc;
      n0 = n_in;
      do @(negedge clk); while (n_in == n0);
      t1 = cyc;
      if (t == 1) begin
        in_data = c;
        n0 = n_in;
        do @(negedge clk); while (n_in == n0);
      end
      in_valid = 1'b0;
      repeat (5) @(posedge clk);
      checks++;
      if (t1 - t0 != 3 - t) begin
        failures++;
        $display("FAIL transfer %s was held %0d cycles, expected %0d", s, t1 - t0, 3 - t);
      end
      checks++;
      if (got != ((t == 0) ? "1 2 3<1> " : "10 20 30<1> ")) begin
        failures++;
        $display("FAIL direct values: %s", got);
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
