// tm_serializer: parallel-to-serial converter of a telemetry output. load_i (one clock)
// takes word_i; its MSB appears on data_o the next clock, and each bit_i strobe (the
// telemetry bit clock, synchronised) moves to the next bit. busy_o stays high until W
// bits have been clocked out; after that data_o is 0. A load while busy restarts with
// the new word. MSB-first order and the idle level are this design's choices.
module tm_serializer #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_i,
  input  logic [W-1:0] word_i,
  input  logic         bit_i,
  output logic         data_o,
  output logic         busy_o
);
  logic [W-1:0]         shreg;
  logic [$clog2(W+1)-1:0] left;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      left  <= '0;
    end else if (load_i) begin
      shreg <= word_i;
      left  <= ($clog2(W+1))'(W);
    end else if (bit_i && left != 0) begin
      shreg <= {shreg[W-2:0], 1'b0};
      left  <= left - 1'b1;
    end
  end
  assign data_o = shreg[W-1];
  assign busy_o = (left != 0);
endmodule
