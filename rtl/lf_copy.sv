// lf_copy: the copy half of the "copy/start processing" process of one LF channel. On
// start_i it copies the N samples of M3 (samples being taken) into M2 (samples ready
// for processing), freeing M3 for the next sampling run. One word per clock: address k
// is read from M3 in clock k and written to M2 in clock k+1, so the copy takes N+1
// clocks and done_o pulses the clock after the last write.
module lf_copy #(
  parameter int unsigned N = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,
  output logic [$clog2(N)-1:0] src_addr_o,
  input  logic [7:0]           src_rdata_i,
  output logic                 dst_we_o,
  output logic [$clog2(N)-1:0] dst_addr_o,
  output logic [7:0]           dst_wdata_o,
  output logic                 busy_o,
  output logic                 done_o
);
  localparam int unsigned AW = $clog2(N);
  logic [AW:0] k;
  assign src_addr_o  = k[AW-1:0];
  assign dst_we_o    = busy_o && (k != 0);
  assign dst_addr_o  = AW'(k - 1'b1);
  assign dst_wdata_o = src_rdata_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k      <= '0;
      busy_o <= 1'b0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_o) begin
        busy_o <= 1'b1;
        k      <= '0;
      end else if (busy_o) begin
        if (k == (AW+1)'(N)) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
          k      <= '0;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end
endmodule
