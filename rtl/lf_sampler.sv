// lf_sampler: "I/P sample" process of one LF channel. After start_i it counts detector
// pulses in consecutive sampling intervals of DIV_EVEN clocks (even energy levels) or
// DIV_ODD clocks (odd energy levels; odd_i is sampled at start_i) and writes each count
// into the "samples being taken" array M3 (32x8). After the 32nd sample it stops and
// pulses done_o. Counts saturate at 255. The source gives the series length (32) and
// the even/odd bandwidths (0-10 kHz / 0-3.3 kHz); the interval lengths in clocks, the
// counting of pulses per interval and the 8-bit saturation are this design's choices.
// Interface: pulse_i one-clock strobe per pulse; m_* is the write side of M3.
// Timing: sample k (0..31) is written at the end of interval k, i.e. DIV*(k+1) clocks
// after start_i; done_o is high the clock after the last write.
module lf_sampler #(
  parameter int unsigned DIV_EVEN = 400,
  parameter int unsigned DIV_ODD  = 1200,
  parameter int unsigned N        = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,
  input  logic                 odd_i,
  input  logic                 pulse_i,
  output logic                 m_we_o,
  output logic [$clog2(N)-1:0] m_addr_o,
  output logic [7:0]           m_wdata_o,
  output logic                 busy_o,
  output logic                 done_o
);
  localparam int unsigned DW = $clog2((DIV_ODD > DIV_EVEN ? DIV_ODD : DIV_EVEN) + 1);
  logic [DW-1:0]        div_cnt, div_last;
  logic [7:0]           cnt;
  logic [$clog2(N)-1:0] k;
  logic                 tick;
  logic [8:0]           sum;

  assign tick = busy_o && (div_cnt == div_last);
  assign sum  = {1'b0, cnt} + {8'd0, pulse_i};

  always_comb begin
    m_we_o    = tick;
    m_addr_o  = k;
    m_wdata_o = sum[8] ? 8'hff : sum[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_o   <= 1'b0;
      done_o   <= 1'b0;
      div_cnt  <= '0;
      div_last <= '0;
      cnt      <= '0;
      k        <= '0;
    end else begin
      done_o <= 1'b0;
      if (start_i) begin
        busy_o   <= 1'b1;
        div_cnt  <= '0;
        div_last <= DW'((odd_i ? DIV_ODD : DIV_EVEN) - 1);
        cnt      <= '0;
        k        <= '0;
      end else if (busy_o) begin
        if (tick) begin
          div_cnt <= '0;
          cnt     <= '0;
          k       <= k + 1'b1;
          if (k == $clog2(N)'(N - 1)) begin
            busy_o <= 1'b0;
            done_o <= 1'b1;
          end
        end else begin
          div_cnt <= div_cnt + 1'b1;
          cnt     <= m_wdata_o;
        end
      end
    end
  end
endmodule
