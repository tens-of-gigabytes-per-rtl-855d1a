// tb_stream_fifo: self-checking test of stream_fifo (W = 16, DEPTH = 4).
//
// 500 numbered transfers pass with random idle input cycles and random output
// back-pressure: all must arrive once and in order, and the FIFO must have been
// seen full. Then, input always valid and output always ready, 100 transfers
// must pass in at most 102 cycles (one per cycle).
module tb_stream_fifo;

  localparam int W  = 16;
  localparam int NT = 500;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int           checks = 0, failures = 0;
  bit           rand_ready = 1'b1;
  int           nrecv = 0, bad = 0, full_seen = 0, n_in = 0, cyc = 0;

  stream_fifo #(.W(W), .DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) n_in <= n_in + 1;
    if (rst_n && out_valid && out_ready) begin
      if (out_data != W'(nrecv)) bad <= bad + 1;
      nrecv <= nrecv + 1;
    end
    if (rst_n && !in_ready) full_seen <= full_seen + 1;
    out_ready <= rand_ready ? ($urandom % 3 == 0) : 1'b1;
  end

  task automatic send(input int first, input int cnt, input bit gaps);
    int n0;
    @(negedge clk);
    for (int i = first; i < first + cnt; i++) begin
      if (gaps) repeat ($urandom % 2) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_data  = W'(i);
      n0 = n_in;
      do @(negedge clk); while (n_in == n0);
    end
    in_valid = 1'b0;
  endtask

  initial begin
    int t0, t1;
    in_valid = 1'b0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    send(0, NT, 1'b1);
    repeat (20) @(posedge clk);
    checks++;
    if (nrecv != NT || bad != 0) begin
      failures++;
      $display("FAIL received %0d of %0d, %0d out of order", nrecv, NT, bad);
    end
    checks++;
    if (full_seen == 0) begin
      failures++;
      $display("FAIL the FIFO never filled");
    end
    rand_ready = 1'b0;
    repeat (3) @(posedge clk);
    t0 = cyc;
    send(NT, 100, 1'b0);
    t1 = cyc;
    repeat (5) @(posedge clk);
    checks++;
    if (t1 - t0 > 102 || nrecv != NT + 100 || bad != 0) begin
      failures++;
      $display("FAIL 100 transfers took %0d cycles (%0d received)", t1 - t0, nrecv - NT);
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
