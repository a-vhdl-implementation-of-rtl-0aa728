// hf_output: the HF "Next O/P requested" process. Each telemetry request hands the next
// byte of the 64x8 output array to the parallel-to-serial converter. When all 64 bytes
// have gone out, the next request first copies another 64-byte block of the 1Kx8
// histogramme into the output array and then serves byte 0 of it. Blocks are taken in
// turn, energy level 0 to 15 and round again (the source only says "another block").
// The histogramme is not cleared by the copy.
// Interface: tm_req_i is a one-clock request strobe; a request that cannot be served
// at once (copy running, array address just changed, enable_i low during power-up) is
// held. h_* is read port B of the histogramme RAM and o_* the output array RAM, both
// with registered reads. load_o/byte_o go to the serialiser; copy_o flags the end of a
// block copy and block_o names the block now in the output array.
// Timing: a byte request is answered the next clock (load_o); a request that needs a
// block copy is answered 68 clocks after it (1 + 65 copy clocks + 2), the source's
// 1T..68T for this process.
module hf_output
  import sval_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable_i,
  input  logic                tm_req_i,
  output logic [HIST_AW-1:0]  h_addr_o,
  input  logic [7:0]          h_rdata_i,
  output logic [5:0]          o_addr_o,
  output logic                o_we_o,
  output logic [7:0]          o_wdata_o,
  input  logic [7:0]          o_rdata_i,
  output logic                load_o,
  output logic [7:0]          byte_o,
  output logic                copy_o,
  output logic [ENERGY_W-1:0] block_o
);
  typedef enum logic {IDLE, COPY} state_t;
  state_t              state;
  logic [5:0]          idx;        // next byte of the output array to send
  logic [6:0]          k;          // copy counter 0..64
  logic [ENERGY_W-1:0] next_blk;   // histogramme block to copy next
  logic                need_copy;
  logic                rd_valid;   // o_rdata_i holds array[idx]
  logic                req_pend;
  logic                serve;

  assign serve    = (tm_req_i | req_pend) & enable_i;
  assign h_addr_o = {next_blk, k[5:0]};

  always_comb begin
    o_addr_o  = idx;
    o_we_o    = 1'b0;
    o_wdata_o = h_rdata_i;
    if (state == COPY && k != 0) begin
      o_addr_o = 6'(k - 7'd1);
      o_we_o   = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      idx       <= '0;
      k         <= '0;
      next_blk  <= '0;
      block_o   <= '0;
      need_copy <= 1'b1;
      rd_valid  <= 1'b0;
      req_pend  <= 1'b0;
      load_o    <= 1'b0;
      byte_o    <= '0;
      copy_o    <= 1'b0;
    end else begin
      load_o <= 1'b0;
      copy_o <= 1'b0;
      if (tm_req_i) req_pend <= 1'b1;
      unique case (state)
        IDLE: begin
          rd_valid <= 1'b1;
          if (serve) begin
            if (need_copy) begin
              state    <= COPY;
              k        <= '0;
              rd_valid <= 1'b0;
            end else if (rd_valid) begin
              load_o   <= 1'b1;
              byte_o   <= o_rdata_i;
              idx      <= idx + 1'b1;
              rd_valid <= 1'b0;
              req_pend <= 1'b0;
              if (idx == 6'd63) need_copy <= 1'b1;
            end
          end
        end
        COPY: begin
          k <= k + 1'b1;
          if (k == 7'd64) begin
            state     <= IDLE;
            need_copy <= 1'b0;
            idx       <= '0;
            block_o   <= next_blk;
            next_blk  <= next_blk + 1'b1;
            copy_o    <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
