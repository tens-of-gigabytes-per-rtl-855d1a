// tb_arrow_col_adapter: self-checking test of arrow_col_adapter.
//
// A list column (IS_LIST = 1) and a scalar column (IS_LIST = 0) adapter get field
// streams generated here. The list stream holds 80 records of 0..9 elements, each
// element either alone or followed by the list end in the same transfer, the
// record end often in a transfer of its own, and a final buffer end alone. The
// value stream must hold exactly the elements in order with last only on the
// closing transfer; the length stream must give each record's element count and
// end with a transfer that only closes it. The scalar adapter must pass one value
// per record, drop the record-only transfers and never emit a length.
module tb_arrow_col_adapter;
  import json_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // list adapter
  logic l_iv, l_ir, l_vv, l_vr, l_lv, l_lr;
  fld_t l_id;
  col_t l_vd;
  len_t l_ld;
  arrow_col_adapter #(.IS_LIST(1'b1)) dut (
    .clk, .rst_n, .in_valid(l_iv), .in_ready(l_ir), .in_data(l_id),
    .val_valid(l_vv), .val_ready(l_vr), .val_data(l_vd),
    .len_valid(l_lv), .len_ready(l_lr), .len_data(l_ld)
  );
  // scalar adapter
  logic s_iv, s_ir, s_vv, s_vr, s_lv, s_lr;
  fld_t s_id;
  col_t s_vd;
  len_t s_ld;
  arrow_col_adapter #(.IS_LIST(1'b0)) u_scalar (
    .clk, .rst_n, .in_valid(s_iv), .in_ready(s_ir), .in_data(s_id),
    .val_valid(s_vv), .val_ready(s_vr), .val_data(s_vd),
    .len_valid(s_lv), .len_ready(s_lr), .len_data(s_ld)
  );

  fld_t      lq[$], sq[$];
  longint    exp_vals[$], exp_svals[$];
  int        exp_lens[$];
  longint    got_vals[$], got_svals[$];
  int        got_lens[$];
  int        val_last_at = -1, len_close = 0, s_last_at = -1, s_len_seen = 0;
  int        n_l = 0, n_s = 0;

  always_ff @(posedge clk) begin
    l_vr <= $urandom % 3 != 0;
    l_lr <= $urandom % 3 != 0;
    s_vr <= $urandom % 3 != 0;
    s_lr <= $urandom % 2 != 0;
    if (rst_n) begin
      if (l_iv && l_ir) n_l <= n_l + 1;
      if (s_iv && s_ir) n_s <= n_s + 1;
      if (l_vv && l_vr) begin
        if (l_vd.strb[0]) got_vals.push_back(longint'(l_vd.data));
        if (l_vd.last) val_last_at <= got_vals.size() + int'(l_vd.strb[0]);
      end
      if (l_lv && l_lr) begin
        if (l_ld.dvalid) got_lens.push_back(int'(l_ld.len));
        if (l_ld.last && !l_ld.dvalid) len_close <= len_close + 1;
      end
      if (s_vv && s_vr) begin
        if (s_vd.strb[0]) got_svals.push_back(longint'(s_vd.data));
        if (s_vd.last) s_last_at <= got_svals.size() + int'(s_vd.strb[0]);
      end
      if (s_lv) s_len_seen <= s_len_seen + 1;
    end
  end

  initial begin
    fld_t f;
    int   n, n0;
    l_iv = 1'b0;
    s_iv = 1'b0;
    l_id = '0;
    s_id = '0;
    // build the streams
    for (int r = 0; r < 80; r++) begin
      n = $urandom % 10;
      exp_lens.push_back(n);
      for (int e = 0; e < n; e++) begin
        f = '0;
        f.strb[0] = 1'b1;
        f.data    = {$urandom, $urandom};
        exp_vals.push_back(longint'(f.data));
        if (e == n - 1 && ($urandom % 2) != 0) begin
          f.last[0] = 1'b1;
          if (($urandom % 2) != 0) f.last[1] = 1'b1;
        end
        lq.push_back(f);
      end
      if (!(n > 0 && lq[$].last[1])) begin
        f = '0;
        f.last[1:0] = 2'b11;
        lq.push_back(f);
      end
      // scalar: value then record end, or both in one transfer
      f = '0;
      f.strb[0] = 1'b1;
      f.data    = {$urandom, $urandom};
      exp_svals.push_back(longint'(f.data));
      if (($urandom % 2) != 0) begin
        f.last[1] = 1'b1;
        sq.push_back(f);
      end else begin
        sq.push_back(f);
        f = '0;
        f.last[1] = 1'b1;
        sq.push_back(f);
      end
    end
    f = '0;
    f.last[2] = 1'b1;
    lq.push_back(f);
    sq.push_back(f);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      begin
        @(negedge clk);
        foreach (lq[i]) begin
          repeat ($urandom % 2) begin
            l_iv = 1'b0;
            @(negedge clk);
          end
          l_iv = 1'b1;
          l_id = lq[i];
          n0 = n_l;
          do @(negedge clk); while (n_l == n0);
        end
        l_iv = 1'b0;
      end
      begin
        int m0;
        @(negedge clk);
        foreach (sq[i]) begin
          s_iv = 1'b1;
          s_id = sq[i];
          m0 = n_s;
          do @(negedge clk); while (n_s == m0);
        end
        s_iv = 1'b0;
      end
    join
    repeat (20) @(posedge clk);

    checks++;
    if (got_vals != exp_vals) begin
      failures++;
      $display("FAIL list values: got %0d expected %0d", got_vals.size(), exp_vals.size());
    end
    checks++;
    if (got_lens != exp_lens) begin
      failures++;
      $display("FAIL lengths: got %0d entries, expected %0d", got_lens.size(), exp_lens.size());
      foreach (got_lens[i]) if (i < 10) $display("  got %0d exp %0d", got_lens[i], exp_lens[i]);
    end
    checks++;
    if (val_last_at != exp_vals.size() || len_close != 1) begin
      failures++;
      $display("FAIL list close: value last after %0d of %0d, %0d closing lengths",
               val_last_at, exp_vals.size(), len_close);
    end
    checks++;
    if (got_svals != exp_svals || s_last_at != exp_svals.size() || s_len_seen != 0) begin
      failures++;
      $display("FAIL scalar column: %0d of %0d values, last after %0d, %0d lengths",
               got_svals.size(), exp_svals.size(), s_last_at, s_len_seen);
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
