// tb_stream_sync: self-checking test of stream_sync with three outputs.
//
// 300 numbered transfers are offered with random idle cycles while each output
// is made ready at random, independently. Every output must receive every
// transfer exactly once and in order. A second phase with all outputs ready checks
// one transfer per cycle.
module tb_stream_sync;

  localparam int N = 3;
  localparam int W = 16;
  localparam int NT = 300;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid, in_ready;
  logic [W-1:0] in_data, out_data;
  logic [N-1:0] out_valid, out_ready;
  int           checks = 0, failures = 0;
  bit           rand_ready = 1'b1;
  int           nrecv [N];
  int           bad = 0;

  stream_sync #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int n_in = 0, cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) n_in <= n_in + 1;
    for (int k = 0; k < N; k++) begin
      if (rst_n && out_valid[k] && out_ready[k]) begin
        if (out_data != W'(nrecv[k])) bad <= bad + 1;
        nrecv[k] <= nrecv[k] + 1;
      end
      out_ready[k] <= rand_ready ? ($urandom % 3 != 0) : 1'b1;
    end
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
    for (int k = 0; k < N; k++) nrecv[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    send(0, NT, 1'b1);
    repeat (10) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (nrecv[k] != NT) begin
        failures++;
        $display("FAIL output %0d received %0d of %0d", k, nrecv[k], NT);
      end
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %0d transfers out of order or duplicated", bad);
    end
    // full rate
    rand_ready = 1'b0;
    repeat (3) @(posedge clk);
    t0 = cyc;
    send(NT, 50, 1'b0);
    t1 = cyc;
    checks++;
    if (t1 - t0 > 52) begin
      failures++;
      $display("FAIL 50 transfers took %0d cycles", t1 - t0);
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
