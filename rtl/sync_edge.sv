// sync_edge: brings an asynchronous input (detector pulse, energy-step line, telemetry
// clock or request) into the clock domain through a two-flop synchroniser and flags its
// rising edge. level_o is the synchronised level; rise_o is high for one clock on the
// cycle after a 0->1 transition of level_o's input stage. Latency: 2 clocks to
// level_o, 3 clocks to rise_o. The synchroniser is this design's own choice; the
// source design treats these as inputs of its state machines.
module sync_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic async_i,
  output logic level_o,
  output logic rise_o
);
  logic s1, s2, s3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0; s2 <= 1'b0; s3 <= 1'b0;
    end else begin
      s1 <= async_i; s2 <= s1; s3 <= s2;
    end
  end
  assign level_o = s2;
  assign rise_o  = s2 & ~s3;
endmodule
