// tb_record_mux: self-checking test of record_mux, one leader and one follower
// merging two fields of P = 3 parsers.
//
// Each parser sends two buffers of 3..8 records, each buffer closed by a
// transfer that carries only the buffer end. Field A has one transfer per record;
// field B has one to three, sometimes with the record end in a transfer of its
// own. Inputs stall at random and the outputs are back-pressured at random.
// Checks: every record of every parser arrives once and in its parser's order;
// field B's records come in the same parser order as field A's and with their
// transfers intact; each output carries exactly two buffer-end transfers, the
// first only after every parser's first buffer is complete, the second as the
// final transfer; no other transfer carries a buffer end.
module tb_record_mux;
  import json_pkg::*;

  localparam int P = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [P-1:0] a_v, a_r, b_v, b_r;
  fld_t [P-1:0] a_d, b_d;
  logic         ao_v, ao_r, bo_v, bo_r;
  fld_t         ao_d, bo_d;
  logic         ord_v, ord_r, ord_f, unused_r, unused_v, unused_f;
  logic [1:0]   ord_i, unused_i;

  record_mux #(.P(P), .LEADER(1'b1)) dut (
    .clk, .rst_n, .in_valid(a_v), .in_ready(a_r), .in_data(a_d),
    .out_valid(ao_v), .out_ready(ao_r), .out_data(ao_d),
    .ord_out_valid(ord_v), .ord_out_ready(ord_r), .ord_out_idx(ord_i), .ord_out_flush(ord_f),
    .ord_in_valid(1'b0), .ord_in_ready(unused_r), .ord_in_idx(2'd0), .ord_in_flush(1'b0)
  );
  record_mux #(.P(P), .LEADER(1'b0), .FIFO_DEPTH(4)) u_follow (
    .clk, .rst_n, .in_valid(b_v), .in_ready(b_r), .in_data(b_d),
    .out_valid(bo_v), .out_ready(bo_r), .out_data(bo_d),
    .ord_out_valid(unused_v), .ord_out_ready(1'b0), .ord_out_idx(unused_i), .ord_out_flush(unused_f),
    .ord_in_valid(ord_v && ord_r), .ord_in_ready(ord_r), .ord_in_idx(ord_i), .ord_in_flush(ord_f)
  );

  // record id: parser * 256 + buffer * 64 + sequence number
  fld_t aq [P][$];
  fld_t bq [P][$];
  int   nrec [P][2];
  int   na [P], nb [P];

  int   a_ids[$], b_ids[$];
  int   a_bufs = 0, b_bufs = 0, bad_last = 0, bad_b = 0, early_flush = 0;
  int   a_after = 0, b_after = 0;
  int   b_cur = -1, b_parts = 0;
  int   seen_a [P][2];

  always_ff @(posedge clk) begin
    ao_r <= $urandom % 3 != 0;
    bo_r <= $urandom % 3 != 0;
    if (rst_n) begin
      for (int p = 0; p < P; p++) begin
        if (a_v[p] && a_r[p]) na[p] <= na[p] + 1;
        if (b_v[p] && b_r[p]) nb[p] <= nb[p] + 1;
      end
      if (ao_v && ao_r) begin
        if (ao_d.last[2]) begin
          if (ao_d.strb != '0 || ao_d.last[1:0] != '0) bad_last <= bad_last + 1;
          a_bufs <= a_bufs + 1;
          a_after <= 0;
          // the first merged buffer end needs every parser's first buffer
          if (a_bufs == 0)
            for (int p = 0; p < P; p++) if (seen_a[p][0] != nrec[p][0]) early_flush <= early_flush + 1;
        end else begin
          a_ids.push_back(int'(ao_d.data));
          seen_a[ao_d.data[9:8]][ao_d.data[6]] <= seen_a[ao_d.data[9:8]][ao_d.data[6]] + 1;
          a_after <= a_after + 1;
        end
      end
      if (bo_v && bo_r) begin
        if (bo_d.last[2]) begin
          if (bo_d.strb != '0 || bo_d.last[1:0] != '0) bad_last <= bad_last + 1;
          b_bufs <= b_bufs + 1;
          b_after <= 0;
        end else begin
          // transfers of one record: data = id * 4 + part
          if (bo_d.strb[0]) begin
            if (b_cur < 0) b_cur = int'(bo_d.data) >> 2;
            if (int'(bo_d.data) != b_cur * 4 + b_parts) bad_b <= bad_b + 1;
            b_parts++;
          end
          if (bo_d.last[1]) begin
            b_ids.push_back(b_cur);
            b_cur   = -1;
            b_parts = 0;
          end
          b_after <= b_after + 1;
        end
      end
    end
  end

  task automatic drive_a(int p);
    int n0;
    @(negedge clk);
    foreach (aq[p][i]) begin
      repeat ($urandom % 4) begin
        a_v[p] = 1'b0;
        @(negedge clk);
      end
      a_v[p] = 1'b1;
      a_d[p] = aq[p][i];
      n0 = na[p];
      do @(negedge clk); while (na[p] == n0);
    end
    a_v[p] = 1'b0;
  endtask

  task automatic drive_b(int p);
    int n0;
    @(negedge clk);
    foreach (bq[p][i]) begin
      repeat ($urandom % 3) begin
        b_v[p] = 1'b0;
        @(negedge clk);
      end
      b_v[p] = 1'b1;
      b_d[p] = bq[p][i];
      n0 = nb[p];
      do @(negedge clk); while (nb[p] == n0);
    end
    b_v[p] = 1'b0;
  endtask

  initial begin
    fld_t f;
    int   id, k;
    int   exp_ids [P][$];
    a_v = '0;
    b_v = '0;
    a_d = '0;
    b_d = '0;
    for (int p = 0; p < P; p++) begin
      na[p] = 0;
      nb[p] = 0;
      for (int bf = 0; bf < 2; bf++) begin
        seen_a[p][bf] = 0;
        nrec[p][bf] = 3 + $urandom % 6;
        for (int r = 0; r < nrec[p][bf]; r++) begin
          id = p * 256 + bf * 64 + r;
          exp_ids[p].push_back(id);
          f = '0;
          f.strb[0] = 1'b1;
          f.data    = 64'(id);
          f.last[1] = 1'b1;
          aq[p].push_back(f);
          k = 1 + $urandom % 3;
          for (int t = 0; t < k; t++) begin
            f = '0;
            f.strb[0] = 1'b1;
            f.data    = 64'(id * 4 + t);
            bq[p].push_back(f);
          end
          if (($urandom % 2) != 0) bq[p][$].last[1:0] = 2'b11;
          else begin
            f = '0;
            f.last[1] = 1'b1;
            bq[p].push_back(f);
          end
        end
        f = '0;
        f.last[2] = 1'b1;
        aq[p].push_back(f);
        bq[p].push_back(f);
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      drive_a(0); drive_a(1); drive_a(2);
      drive_b(0); drive_b(1); drive_b(2);
    join
    repeat (40) @(posedge clk);

    // every record of every parser, in that parser's order
    checks++;
    begin
      int pos [P];
      int bad = 0;
      for (int p = 0; p < P; p++) pos[p] = 0;
      foreach (a_ids[i]) begin
        int p;
        p = a_ids[i] >> 8;
        if (pos[p] >= exp_ids[p].size() || a_ids[i] != exp_ids[p][pos[p]]) bad++;
        else pos[p]++;
      end
      for (int p = 0; p < P; p++) if (pos[p] != exp_ids[p].size()) bad++;
      if (bad != 0) begin
        failures++;
        $display("FAIL leader records: %0d errors, %0d records", bad, a_ids.size());
      end
    end
    checks++;
    if (b_ids != a_ids || bad_b != 0) begin
      failures++;
      $display("FAIL follower order/contents: %0d vs %0d records, %0d bad parts",
               b_ids.size(), a_ids.size(), bad_b);
    end
    checks++;
    if (a_bufs != 2 || b_bufs != 2 || a_after != 0 || b_after != 0 || bad_last != 0 || early_flush != 0) begin
      failures++;
      $display("FAIL buffer ends: %0d/%0d, trailing %0d/%0d, malformed %0d, early %0d",
               a_bufs, b_bufs, a_after, b_after, bad_last, early_flush);
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
