// lf_scale_out: the LF "scaling & O/P" process. On start_i it reads the 16 ACF sums of
// channel 1 (ACF1) and then of channel 2 (ACF2) from their M1 arrays and pushes one
// 10-bit telemetry word per sum into the output FIFO, in lag order 1..16. In multibit
// mode a sum is compressed with sval_pkg::compress10 (4-bit exponent, 6-bit mantissa,
// exact below 64); in one-bit mode the sum is at most 16 and is sent as it is. The
// source gives the 10-bit output and the order of the arrays; the compression law and
// the word order are this design's own.
// Timing: one word per clock after a one-clock read latency: busy_o is high for 33
// clocks and done_o pulses after the last push. m1_raddr_o goes to both channels;
// the data come back the next clock on m1_rdata_i[ch].
module lf_scale_out
  import sval_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start_i,
  input  logic                one_bit_i,
  output logic [3:0]          m1_raddr_o,
  input  logic [15:0]         m1_rdata_i [2],
  output logic                push_o,
  output logic [LF_OUT_W-1:0] wdata_o,
  output logic                busy_o,
  output logic                done_o
);
  logic [5:0]  w;        // read counter 0..32
  logic        one_bit;
  logic [4:0]  prev;     // word read in the previous clock: {channel, lag-1}
  logic [15:0] v;

  assign m1_raddr_o = w[3:0];
  assign prev       = 5'(w - 6'd1);
  assign v          = m1_rdata_i[prev[4]];
  assign push_o     = busy_o && (w != 0);
  assign wdata_o    = one_bit ? ((v > 16'h3ff) ? 10'h3ff : v[9:0]) : compress10(v);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w       <= '0;
      busy_o  <= 1'b0;
      done_o  <= 1'b0;
      one_bit <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_o) begin
        busy_o  <= 1'b1;
        w       <= '0;
        one_bit <= one_bit_i;
      end else if (busy_o) begin
        if (w == 6'd32) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
          w      <= '0;
        end else begin
          w <= w + 1'b1;
        end
      end
    end
  end
endmodule
