// lf_tm_output: the LF "Next O/P requested" process. Each telemetry request pops one
// 10-bit word from the output FIFO and loads it into the parallel-to-serial converter.
// If the FIFO is empty an all-zero word is sent instead and underrun_o pulses (the
// source does not say what is sent when there is no data).
// Timing: tm_req_i (one-clock strobe) at clock c pops at c; the FIFO answers at c+1 and
// load_o/word_o are high at c+2. An empty FIFO gives load_o at c+1.
module lf_tm_output
  import sval_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tm_req_i,
  input  logic                fifo_empty_i,
  output logic                fifo_pop_o,
  input  logic [LF_OUT_W-1:0] fifo_rdata_i,
  input  logic                fifo_rvalid_i,
  output logic                load_o,
  output logic [LF_OUT_W-1:0] word_o,
  output logic                underrun_o
);
  assign fifo_pop_o = tm_req_i && !fifo_empty_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_o     <= 1'b0;
      word_o     <= '0;
      underrun_o <= 1'b0;
    end else begin
      underrun_o <= tm_req_i && fifo_empty_i;
      load_o     <= fifo_rvalid_i || (tm_req_i && fifo_empty_i);
      word_o     <= fifo_rvalid_i ? fifo_rdata_i : '0;
    end
  end
endmodule
