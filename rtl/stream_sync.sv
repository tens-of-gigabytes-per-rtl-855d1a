// stream_sync: duplicates one valid/ready stream onto N output streams.
//
// Every output sees every input transfer. Each output has a "done" flag that is
// set once that output has accepted the current transfer; the input is released
// (in_ready) in the cycle in which every output has either accepted it earlier or
// accepts it now, and the flags are cleared. Outputs therefore proceed
// independently within one transfer and no output's valid depends on another
// output's ready.
//
// Interface: in_* one stream of W bits; out_* N streams carrying the same data.
// Timing: no register on the data path, no added latency, one transfer per cycle
// when all outputs are ready.
// Duplicating the object content stream for every member follows the reference
// design's synchroniser; the done-flag scheme is this design's choice.
module stream_sync #(
  parameter int N = 4,
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic [N-1:0] out_valid,
  input  logic [N-1:0] out_ready,
  output logic [W-1:0] out_data
);

  logic [N-1:0] done_q;

  assign out_data  = in_data;
  assign out_valid = {N{in_valid}} & ~done_q;
  assign in_ready  = &(done_q | out_ready);

  always_ff @(posedge clk) begin
    if (!rst_n)
      done_q <= '0;
    else if (in_valid && in_ready)
      done_q <= '0;
    else
      done_q <= done_q | (out_valid & out_ready);
  end

endmodule
