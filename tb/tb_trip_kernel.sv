// tb_trip_kernel: self-checking test of trip_kernel with P = 3 parsers sharing
// one set of twelve column streams.
//
// Each parser gets two input buffers of 3..12 random trip documents (members
// shuffled in half of them, arrays of 0..6 integers); buffers differ in length so
// parsers finish them at different times. Inputs idle at random; every value and
// length output is back-pressured independently at random. The column streams
// are collected and checked row by row (tb_json_pkg::trip_cols): every document
// appears exactly once, all twelve columns of a row come from the same document,
// each parser's documents keep their order, every column is closed exactly twice
// (once per merged buffer end), and rows from different parsers interleave.
module tb_trip_kernel;
  import json_pkg::*;
  import tb_json_pkg::*;

  localparam int P    = 3;
  localparam int NBUF = 2;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [P-1:0] in_valid, in_ready;
  beat_t [P-1:0] in_data;
  logic [11:0] val_valid, val_ready, len_valid, len_ready;
  col_t [11:0] val_data;
  len_t [11:0] len_data;
  int          checks = 0, failures = 0;

  trip_kernel #(.P(P)) dut (.*);

  always #5 clk = ~clk;

  trip_cols cols = new();
  trip_doc  docs [longint];
  beat_t    q [P][$];
  int       n_in [P];

  always_ff @(posedge clk) begin
    for (int p = 0; p < P; p++) if (in_valid[p] && in_ready[p]) n_in[p] <= n_in[p] + 1;
    for (int f = 0; f < 12; f++) begin
      if (rst_n && val_valid[f] && val_ready[f]) cols.take_val(f, val_data[f]);
      if (rst_n && len_valid[f] && len_ready[f]) cols.take_len(f, len_data[f]);
      val_ready[f] <= $urandom % 4 != 0;
      len_ready[f] <= $urandom % 4 != 0;
    end
  end

  task automatic drive(int p);
    int n0;
    @(negedge clk);
    foreach (q[p][i]) begin
      repeat ($urandom % 2) begin
        in_valid[p] = 1'b0;
        @(negedge clk);
      end
      in_valid[p] = 1'b1;
      in_data[p]  = q[p][i];
      n0 = n_in[p];
      do @(negedge clk); while (n_in[p] == n0);
    end
    in_valid[p] = 1'b0;
  endtask

  initial begin
    string   text;
    trip_doc d;
    longint  id;
    int      err;
    in_valid = '0;
    in_data  = '0;
    for (int p = 0; p < P; p++) begin
      n_in[p] = 0;
      for (int b = 0; b < NBUF; b++) begin
        text = "";
        for (int r = 0; r < 3 + $urandom % 10; r++) begin
          id = longint'(p * 10000 + b * 1000 + r);
          d  = new(id, 6);
          docs[id] = d;
          text = {text, d.txt};
        end
        beats_from_text(text, EPC, q[p]);
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      drive(0);
      drive(1);
      drive(2);
    join
    repeat (200) @(posedge clk);

    checks++;
    err = cols.check(docs, NBUF);
    if (err != 0) begin
      failures++;
      $display("FAIL columns: %0d errors", err);
    end
    checks++;
    if (cols.switches == 0) begin
      failures++;
      $display("FAIL rows of different parsers never interleaved");
    end
    $display("rows %0d, parser switches %0d, empty lists %0d", cols.vals[1].size(),
             cols.switches, cols.empty_lists);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
