// tb_json_object_parser: self-checking test of json_object_parser.
//
// Phase 1 sends a buffer of newline-separated documents (nested objects and
// arrays, strings holding structural characters and an escaped quote, white
// space, an empty object), cut into random transfers with random idle cycles,
// while the output is back-pressured at random. The rendered output (bytes and
// last bits) and the key/value tags are compared with the hand-derived
// expectation. Phase 2 streams full 8-byte transfers with the output always ready
// and checks that one transfer is taken per cycle.
module tb_json_object_parser;
  import json_pkg::*;
  import tb_json_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, in_ready, out_valid, out_ready;
  beat_t in_data, out_data;
  int    checks = 0, failures = 0;
  bit    rand_ready = 1'b1;
  string got = "", got_tags = "";

  json_object_parser dut (.*);

  always #5 clk = ~clk;

  // one unit of the buffer and what the parser must make of it
  localparam string DOC = "('id': 11, 's': 'a,)\\'b')\n('m':('x':[1, 2]) ,'e':[])\n ()\n";
  localparam string EXP = "'id'11<1>'s''a,)\\'b'<3>'m'('x':[1,2])<1>'e'[]<3><2>";
  localparam string EXP_TAGS = {"kkkkvv", "kkkvvvvvvvv", "kkkvvvvvvvvvvv", "kkkvv"};
  localparam int    REPS = 20;

  always_ff @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      got      <= {got, render_beat(out_data)};
      got_tags <= {got_tags, render_tags(out_data)};
    end
    out_ready <= rand_ready ? ($urandom % 4 != 0) : 1'b1;
  end

  // input transfers are counted at the clock edge; stimulus changes at the
  // falling edge, so the driver never races the design
  int n_in = 0, cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) n_in <= n_in + 1;
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
    beat_t q[$];
    string text = "", exp = "", exp_tags = "";
    int    t0, t1;
    int    nb;
    in_valid = 1'b0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // phase 1: function under random stalls
    for (int r = 0; r < REPS; r++) begin
      text     = {text, j(DOC)};
      exp      = {exp, j(EXP)};
      exp_tags = {exp_tags, EXP_TAGS};
    end
    exp = {exp, "<4>"};  // buffer end on the final newline
    beats_from_text(text, EPC, q);
    send(q, 1'b1);
    repeat (20) @(posedge clk);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL output len %0d vs %0d", got.len(), exp.len()); $display("got: %s", got); $display("exp: %s", exp);
    end
    checks++;
    if (got_tags != exp_tags) begin
      failures++;
      $display("FAIL tags\n got %s\n exp %s", got_tags, exp_tags);
    end

    // phase 2: one full transfer per cycle
    rand_ready = 1'b0;
    q.delete();
    text = "";
    for (int r = 0; r < 8; r++) text = {text, j("('ab':'cdefgh')\n")};  // 16 bytes
    beats_from_text(text, EPC, q);
    q.delete();
    for (int i = 0; i < text.len(); i += EPC) begin
      beat_t b = '0;
      for (int k = 0; k < EPC; k++) begin
        b[k].strb = 1'b1;
        b[k].data = text[i+k];
      end
      q.push_back(b);
    end
    nb = q.size();
    @(posedge clk);
    t0 = cyc;
    send(q, 1'b0);
    t1 = cyc;
    checks++;
    if (t1 - t0 > nb + 2) begin
      failures++;
      $display("FAIL rate: %0d transfers took %0d cycles", nb, t1 - t0);
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
