// tb_json_arrow_accel: end-to-end, self-checking test of json_arrow_accel at its
// default size (32 simple-schema kernels, one complex-schema kernel of 8 parsers,
// the nested example parser), from raw JSON input buffers to Arrow column
// streams.
//
// Phase 1 (function, random timing). Every simple kernel gets one buffer of 4..12
// voltage documents (arrays of 1..64 integers); every complex parser gets two
// buffers of 2..6 trip documents (members shuffled in half of them, arrays of
// 0..12 integers); the example parser gets the three example documents (the
// nested one with a null tag, a compact one, one with reordered members and empty
// values) four times. Inputs idle at random and every output is back-pressured
// independently at random. Checks:
//   - each simple kernel's value column holds the voltages in order, its length
//     column one length per document, each closed once;
//   - the complex columns, row by row, against the documents (every document once,
//     all twelve columns of a row from one document, each parser's order kept,
//     every column closed twice and after the same row);
//   - the five example columns (values, string characters, lengths).
// Phase 2 (rate). All outputs ready; every simple kernel streams 24 documents of
// 8 nine-digit voltages packed in full 8-byte transfers and every complex parser
// 6 documents, all at once. The simple kernels together must take at least 200
// bytes per cycle (32 parsers at up to 8 bytes per cycle: 40 GB/s at 200 MHz,
// above the 19.4 GB/s peak measured end to end behind the host link); the complex
// kernel must take at least 40 bytes per cycle (8 GB/s at 200 MHz; about 10 GB/s
// was measured end to end with 8 parsers), which needs the parsers to work in
// parallel behind the shared column streams.
// Mechanism counters: each of the following must have happened at least once,
// or a failure is counted: output back-pressure; input stalls; a transfer held
// while the integer parser emits several values; records of different complex
// parsers interleaved on the merged columns; merged buffer ends (column close
// after all parsers ended a buffer); values from a nested object; a null string;
// an empty array.
module tb_json_arrow_accel;
  import json_pkg::*;
  import tb_json_pkg::*;

  localparam int NS = 32;
  localparam int NC = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;
  bit   rand_ready = 1'b1;

  always #5 clk = ~clk;

  logic [NS-1:0] s_in_valid, s_in_ready, s_val_valid, s_val_ready, s_len_valid, s_len_ready;
  beat_t [NS-1:0] s_in_data;
  col_t [NS-1:0] s_val_data;
  len_t [NS-1:0] s_len_data;
  logic [NC-1:0] c_in_valid, c_in_ready;
  beat_t [NC-1:0] c_in_data;
  logic [11:0]   c_val_valid, c_val_ready, c_len_valid, c_len_ready;
  col_t [11:0]   c_val_data;
  len_t [11:0]   c_len_data;
  logic          e_in_valid, e_in_ready;
  beat_t         e_in_data;
  logic [4:0]    e_val_valid, e_val_ready, e_len_valid, e_len_ready;
  col_t [4:0]    e_val_data;
  len_t [4:0]    e_len_data;

  json_arrow_accel dut (.*);

  // ---- collection ------------------------------------------------------------
  longint   s_vals [NS][$];
  int       s_lens [NS][$];
  int       s_vlast [NS], s_llast [NS];
  trip_cols cols = new();
  longint   e_vals [5][$];   // integers and booleans (0, 2, 3)
  string    e_text [5];      // characters (1, 4)
  int       e_lens [5][$];
  int       e_vlast [5], e_llast [5];

  // mechanism counters
  int m_backpressure = 0, m_in_stall = 0, m_multi_value = 0;

  int  n_s [NS], n_c [NC], n_e = 0, cyc = 0;
  longint bytes_s = 0, bytes_c = 0;

  function automatic int nbytes(beat_t b);
    int n = 0;
    for (int i = 0; i < EPC; i++) n += int'(b[i].strb);
    return n;
  endfunction

  // input bytes taken per cycle
  always_ff @(posedge clk) begin
    longint sb, cb;
    sb = 0;
    cb = 0;
    for (int k = 0; k < NS; k++) if (s_in_valid[k] && s_in_ready[k]) sb += longint'(nbytes(s_in_data[k]));
    for (int k = 0; k < NC; k++) if (c_in_valid[k] && c_in_ready[k]) cb += longint'(nbytes(c_in_data[k]));
    bytes_s <= bytes_s + sb;
    bytes_c <= bytes_c + cb;
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int k = 0; k < NS; k++) begin
        if (s_in_valid[k] && s_in_ready[k]) n_s[k] <= n_s[k] + 1;
        if (s_val_valid[k] && s_val_ready[k]) begin
          if (s_val_data[k].strb[0]) s_vals[k].push_back(longint'(s_val_data[k].data));
          if (s_val_data[k].last) s_vlast[k]++;
        end
        if (s_len_valid[k] && s_len_ready[k]) begin
          if (s_len_data[k].dvalid) s_lens[k].push_back(int'(s_len_data[k].len));
          if (s_len_data[k].last) s_llast[k]++;
        end
        s_val_ready[k] <= rand_ready ? ($urandom % 3 != 0) : 1'b1;
        s_len_ready[k] <= rand_ready ? ($urandom % 3 != 0) : 1'b1;
      end
      for (int k = 0; k < NC; k++)
        if (c_in_valid[k] && c_in_ready[k]) n_c[k] <= n_c[k] + 1;
      for (int f = 0; f < 12; f++) begin
        if (c_val_valid[f] && c_val_ready[f]) cols.take_val(f, c_val_data[f]);
        if (c_len_valid[f] && c_len_ready[f]) cols.take_len(f, c_len_data[f]);
        c_val_ready[f] <= rand_ready ? ($urandom % 4 != 0) : 1'b1;
        c_len_ready[f] <= rand_ready ? ($urandom % 4 != 0) : 1'b1;
      end
      if (e_in_valid && e_in_ready) n_e <= n_e + 1;
      for (int f = 0; f < 5; f++) begin
        if (e_val_valid[f] && e_val_ready[f]) begin
          if (f == 1 || f == 4) begin
            for (int i = 0; i < EPC; i++)
              if (e_val_data[f].strb[i]) e_text[f] = {e_text[f], string'(e_val_data[f].data[8*i +: 8])};
          end else if (e_val_data[f].strb[0]) begin
            e_vals[f].push_back(longint'(e_val_data[f].data));
          end
          if (e_val_data[f].last) e_vlast[f]++;
        end
        if (e_len_valid[f] && e_len_ready[f]) begin
          if (e_len_data[f].dvalid) e_lens[f].push_back(int'(e_len_data[f].len));
          if (e_len_data[f].last) e_llast[f]++;
        end
        e_val_ready[f] <= $urandom % 3 != 0;
        e_len_ready[f] <= $urandom % 3 != 0;
      end
      // mechanisms
      if ((|(c_val_valid & ~c_val_ready)) || (|(s_val_valid & ~s_val_ready))) m_backpressure++;
      if (|(s_in_valid & ~s_in_ready) || |(c_in_valid & ~c_in_ready)) m_in_stall++;
      if (dut.g_simple[0].u_parser.u_int.in_valid && dut.g_simple[0].u_parser.u_int.found &&
          dut.g_simple[0].u_parser.u_int.can_out && !dut.g_simple[0].u_parser.u_int.tail_done)
        m_multi_value++;
    end
  end

  // ---- stimulus ----------------------------------------------------------------
  beat_t sq [NS][$];
  beat_t cq [NC][$];
  beat_t eq [$];

  task automatic drive_s(int k, bit gaps);
    int n0;
    @(negedge clk);
    foreach (sq[k][i]) begin
      if (gaps) repeat ($urandom % 2) begin
        s_in_valid[k] = 1'b0;
        @(negedge clk);
      end
      s_in_valid[k] = 1'b1;
      s_in_data[k]  = sq[k][i];
      n0 = n_s[k];
      do @(negedge clk); while (n_s[k] == n0);
    end
    s_in_valid[k] = 1'b0;
  endtask

  task automatic drive_c(int k, bit gaps);
    int n0;
    @(negedge clk);
    foreach (cq[k][i]) begin
      if (gaps) repeat ($urandom % 2) begin
        c_in_valid[k] = 1'b0;
        @(negedge clk);
      end
      c_in_valid[k] = 1'b1;
      c_in_data[k]  = cq[k][i];
      n0 = n_c[k];
      do @(negedge clk); while (n_c[k] == n0);
    end
    c_in_valid[k] = 1'b0;
  endtask

  task automatic drive_e();
    int n0;
    @(negedge clk);
    foreach (eq[i]) begin
      repeat ($urandom % 2) begin
        e_in_valid = 1'b0;
        @(negedge clk);
      end
      e_in_valid = 1'b1;
      e_in_data  = eq[i];
      n0 = n_e;
      do @(negedge clk); while (n_e == n0);
    end
    e_in_valid = 1'b0;
  endtask

  // packs text into full transfers, last[0] on the final byte
  function automatic void pack(string text, ref beat_t q[$]);
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
  endfunction

  localparam string DOC1 = {"( 'id': 11,\n  'message': 'Hi FPT!',\n  'read': false,\n",
                            "  'meta': (\n    'refs': [42, 1337],\n    'tag': null\n  )\n)\n"};
  localparam string DOC2 = "('id':404,'message':'Beans','read':true,'meta':('refs':[11],'tag':'coffee'))\n";
  localparam string DOC3 = "('meta':('tag':'x','refs':[]),'read':true,'message':'','id':7)\n";

  // expected simple-kernel columns
  longint  s_exp_vals [NS][$];
  int      s_exp_lens [NS][$];
  trip_doc docs [longint];

  task automatic fork_all(bit gaps, bit with_e);
    for (int k = 0; k < NS; k++) begin
      automatic int kk = k;
      fork drive_s(kk, gaps); join_none
    end
    for (int k = 0; k < NC; k++) begin
      automatic int kk = k;
      fork drive_c(kk, gaps); join_none
    end
    if (with_e) fork drive_e(); join_none
    wait fork;
  endtask

  initial begin
    string   text;
    trip_doc d;
    longint  id, v;
    int      n, nd, err, t0, t1, tc;
    longint  b0s, b0c;
    s_in_valid = '0;
    s_in_data  = '0;
    c_in_valid = '0;
    c_in_data  = '0;
    e_in_valid = 1'b0;
    e_in_data  = '0;
    for (int k = 0; k < NS; k++) begin
      n_s[k]     = 0;
      s_vlast[k] = 0;
      s_llast[k] = 0;
    end
    for (int k = 0; k < NC; k++) n_c[k] = 0;
    for (int f = 0; f < 5; f++) begin
      e_text[f]  = "";
      e_vlast[f] = 0;
      e_llast[f] = 0;
    end

    // ---- phase 1 stimulus ----
    for (int k = 0; k < NS; k++) begin
      text = "";
      nd = 4 + $urandom % 9;
      for (int r = 0; r < nd; r++) begin
        n = 1 + $urandom % 64;
        text = {text, "{\"voltage\": ["};
        for (int e = 0; e < n; e++) begin
          v = longint'($urandom % 5000);
          text = {text, (e > 0) ? ", " : "", $sformatf("%0d", v)};
          s_exp_vals[k].push_back(v);
        end
        text = {text, "]}\n"};
        s_exp_lens[k].push_back(n);
      end
      beats_from_text(text, EPC, sq[k]);
    end
    for (int k = 0; k < NC; k++)
      for (int b = 0; b < 2; b++) begin
        text = "";
        nd = 2 + $urandom % 5;
        for (int r = 0; r < nd; r++) begin
          id = longint'(k * 10000 + b * 1000 + r);
          d  = new(id, 12);
          docs[id] = d;
          text = {text, d.txt};
        end
        beats_from_text(text, EPC, cq[k]);
      end
    text = "";
    for (int r = 0; r < 4; r++) text = {text, j(DOC1), j(DOC2), j(DOC3)};
    beats_from_text(text, EPC, eq);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork_all(1'b1, 1'b1);
    repeat (300) @(posedge clk);

    // ---- phase 1 checks ----
    begin
      int bad = 0;
      for (int k = 0; k < NS; k++)
        if (s_vals[k] != s_exp_vals[k] || s_lens[k] != s_exp_lens[k] || s_vlast[k] != 1 || s_llast[k] != 1) begin
          if (bad == 0)
            $display("  simple kernel %0d: %0d/%0d values, %0d/%0d lengths, closed %0d/%0d", k,
                     s_vals[k].size(), s_exp_vals[k].size(), s_lens[k].size(), s_exp_lens[k].size(),
                     s_vlast[k], s_llast[k]);
          bad++;
        end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL %0d simple kernels with wrong columns", bad);
      end
    end
    checks++;
    err = cols.check(docs, 2);
    if (err != 0) begin
      failures++;
      $display("FAIL complex columns: %0d errors", err);
    end
    begin
      longint id_exp[$], rd_exp[$], rf_exp[$];
      int     ml_exp[$], rl_exp[$], tl_exp[$];
      string  m_exp = "", t_exp = "";
      for (int r = 0; r < 4; r++) begin
        id_exp = {id_exp, 11, 404, 7};
        rd_exp = {rd_exp, 0, 1, 1};
        rf_exp = {rf_exp, 42, 1337, 11};
        ml_exp = {ml_exp, 7, 5, 0};
        rl_exp = {rl_exp, 2, 1, 0};
        tl_exp = {tl_exp, 0, 6, 1};
        m_exp  = {m_exp, "Hi FPT!Beans"};
        t_exp  = {t_exp, "coffeex"};
      end
      checks++;
      if (e_vals[0] != id_exp || e_vals[2] != rd_exp || e_vals[3] != rf_exp ||
          e_text[1] != m_exp || e_text[4] != t_exp || e_lens[1] != ml_exp ||
          e_lens[3] != rl_exp || e_lens[4] != tl_exp) begin
        failures++;
        $display("FAIL example columns: id %0d message '%s' tag '%s' refs %0d", e_vals[0].size(),
                 e_text[1], e_text[4], e_vals[3].size());
      end
      checks++;
      if (e_vlast != '{1, 1, 1, 1, 1} || e_llast != '{0, 1, 0, 1, 1}) begin
        failures++;
        $display("FAIL example columns not closed once each");
      end
    end

    // ---- mechanisms ----
    begin
      int nested = 0, nulls = 0;
      foreach (e_lens[3][r]) if (e_lens[3][r] > 0) nested++;
      foreach (e_lens[4][r]) if (e_lens[4][r] == 0) nulls++;
      $display("mechanisms: back-pressure %0d cycles, input stalls %0d, multi-value holds %0d,",
               m_backpressure, m_in_stall, m_multi_value);
      $display("  parser switches on merged columns %0d, merged buffer ends %0d, nested rows %0d,",
               cols.switches, cols.val_lasts[1], nested);
      $display("  null strings %0d, empty arrays %0d", nulls, cols.empty_lists);
      checks++;
      if (m_backpressure == 0 || m_in_stall == 0 || m_multi_value == 0 || cols.switches == 0 ||
          cols.val_lasts[1] == 0 || nested == 0 || nulls == 0 || cols.empty_lists == 0) begin
        failures++;
        $display("FAIL a mechanism never happened");
      end
    end

    // ---- phase 2: rate ----
    rand_ready = 1'b0;
    for (int k = 0; k < NS; k++) begin
      sq[k].delete();
      text = "";
      for (int r = 0; r < 24; r++) begin
        text = {text, "{\"voltage\":["};
        for (int e = 0; e < 8; e++)
          text = {text, (e > 0) ? "," : "", $sformatf("%0d", 100000000 + $urandom % 800000000)};
        text = {text, "]}\n"};
      end
      pack(text, sq[k]);
    end
    for (int k = 0; k < NC; k++) begin
      cq[k].delete();
      text = "";
      for (int r = 0; r < 6; r++) begin
        d = new(longint'(k * 10000 + 5000 + r), 12);
        text = {text, d.txt};
      end
      pack(text, cq[k]);
    end
    repeat (20) @(posedge clk);
    b0s = bytes_s;
    b0c = bytes_c;
    t0  = cyc;
    fork
      begin
        for (int k = 0; k < NS; k++) begin
          automatic int kk = k;
          fork drive_s(kk, 1'b0); join_none
        end
        wait fork;
        t1 = cyc;
      end
      begin
        for (int k = 0; k < NC; k++) begin
          automatic int kk = k;
          fork drive_c(kk, 1'b0); join_none
        end
        wait fork;
        tc = cyc;
        $display("complex kernel: %0d bytes in %0d cycles, %0.1f bytes per cycle",
                 bytes_c - b0c, tc - t0, real'(bytes_c - b0c) / real'(tc - t0));
      end
    join
    $display("simple kernels: %0d bytes in %0d cycles, %0.1f bytes per cycle",
             bytes_s - b0s, t1 - t0, real'(bytes_s - b0s) / real'(t1 - t0));
    checks++;
    if (real'(bytes_c - b0c) / real'(tc - t0) < 40.0) begin
      failures++;
      $display("FAIL complex-kernel rate below 40 bytes per cycle");
    end
    checks++;
    if (real'(bytes_s - b0s) / real'(t1 - t0) < 200.0) begin
      failures++;
      $display("FAIL simple-kernel rate below 200 bytes per cycle");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
