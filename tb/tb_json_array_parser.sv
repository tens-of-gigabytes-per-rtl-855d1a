// tb_json_array_parser: self-checking test of json_array_parser.
//
// Documents pass a json_object_parser and a key filter for member "a"; the array parser
// must strip the brackets and separators of the array itself only (not those in a
// string or a nested array/object), mark each element end, give an empty array no
// element, and shift the outer last bits up by one level.
module tb_json_array_parser;
  import json_pkg::*;
  import tb_json_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, in_ready;
  beat_t in_data;
  int    checks = 0, failures = 0;
  string got = "";

  always #5 clk = ~clk;

  logic  o_v, o_r;
  beat_t o_d;
  json_object_parser u_obj (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(o_v), .out_ready(o_r), .out_data(o_d)
  );
  logic  k_v, k_r;
  beat_t k_d;
  json_key_filter #(.KEY_LEN(3), .KEY("\"a\"")) u_kf (
    .clk, .rst_n, .in_valid(o_v), .in_ready(o_r), .in_data(o_d),
    .out_valid(k_v), .out_ready(k_r), .out_data(k_d)
  );
  logic  out_valid, out_ready;
  beat_t out_data;
  json_array_parser dut (
    .clk, .rst_n, .in_valid(k_v), .in_ready(k_r), .in_data(k_d),
    .out_valid, .out_ready, .out_data
  );


  int n_in = 0, cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) n_in <= n_in + 1;
    if (rst_n && out_valid && out_ready) got <= {got, render_beat(out_data)};
    out_ready <= $urandom % 4 != 0;
  end

  task automatic send(ref beat_t q[$]);
    int n0;
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
  endtask

  localparam string DOC = "('a':[1,'x,]',[2,3],(),[]])\n('a':[])\n";
  localparam string EXP = "1<1>'x,]'<1>[2,3]<1>()<1>[]<1><6><6>";
  localparam string FIN = "<8>";

  initial begin
    beat_t q[$];
    string text = "", exp = "";
    in_valid = 1'b0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 20; r++) begin
      text = {text, j(DOC)};
      exp  = {exp, j(EXP)};
    end
    exp = {exp, FIN};
    beats_from_text(text, EPC, q);
    send(q);
    repeat (50) @(posedge clk);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL output");
      $display("got: %s", got);
      $display("exp: %s", exp);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
