// lf_acf_proc: the ACF "sample processing" process of one LF channel.
// From a series X[0..N-1] (N = 32) in M2 it computes, for lag L = 1..N/2,
//     R_L = sum_{i=0}^{N/2-1} X[i] * X[i+L]
// (the source's shift/multiply over the first half of the series) and writes R_L to
// M1[L-1]. In one-bit mode each sample is first reduced to one bit (X != 0), so the
// product is an AND and R_L counts coincidences. The structure follows the source's
// nested-loop state machine (outer loop over lags, inner loop of MACs, write-back
// state), with one multiply-accumulate per clock.
// M2 is single-ported, so the first-half operands X[0..N/2-1] are kept in registers,
// captured while the copy process writes them into M2 (pre_* snoop port); the inner
// loop then reads only X[i+L] from M2. Sums are accumulated at full width and
// saturated to 16 bits on write-back; the source writes each sum into M1 directly.
// Timing: busy_o is high for exactly (N/2) * (N/2 + 2) = 288 clocks from the clock
// after start_i (1 set-up, 16 MAC and 1 write-back clock per lag), the source's 288T
// for multibit ACF processing; done_o pulses on the clock after.
module lf_acf_proc #(
  parameter int unsigned N = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start_i,
  input  logic                   one_bit_i,
  input  logic                   pre_we_i,
  input  logic [$clog2(N)-1:0]   pre_addr_i,
  input  logic [7:0]             pre_data_i,
  output logic [$clog2(N)-1:0]   m2_addr_o,
  input  logic [7:0]             m2_rdata_i,
  output logic                   m1_we_o,
  output logic [$clog2(N)-2:0]   m1_addr_o,
  output logic [15:0]            m1_wdata_o,
  output logic                   busy_o,
  output logic                   done_o
);
  localparam int unsigned AW   = $clog2(N);
  localparam int unsigned H    = N / 2;
  localparam int unsigned HW   = AW - 1;
  localparam int unsigned ACCW = 16 + $clog2(H);

  typedef enum logic [1:0] {IDLE, SETUP, MAC, WB} state_t;
  state_t          state;
  logic [7:0]      x_lo [H];
  logic [HW-1:0]   j;        // lag - 1
  logic [HW-1:0]   i;
  logic            one_bit;
  logic [ACCW-1:0] acc;
  logic [7:0]      opa, opb;
  logic [15:0]     prod;

  always_comb begin
    opa  = one_bit ? {7'd0, x_lo[i] != 8'd0}   : x_lo[i];
    opb  = one_bit ? {7'd0, m2_rdata_i != 8'd0} : m2_rdata_i;
    prod = opa * opb;
    m2_addr_o = AW'(j) + 1'b1;                         // SETUP: X[0 + L]
    if (state == MAC) m2_addr_o = AW'(i) + AW'(j) + AW'(2); // next: X[i + 1 + L]
    m1_we_o    = (state == WB);
    m1_addr_o  = j;
    m1_wdata_o = (acc > ACCW'(16'hffff)) ? 16'hffff : acc[15:0];
    busy_o     = (state != IDLE);
  end

  always_ff @(posedge clk) begin
    if (pre_we_i && pre_addr_i < AW'(H)) x_lo[pre_addr_i[HW-1:0]] <= pre_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      j       <= '0;
      i       <= '0;
      acc     <= '0;
      one_bit <= 1'b0;
      done_o  <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        IDLE: if (start_i) begin
          one_bit <= one_bit_i;
          j       <= '0;
          state   <= SETUP;
        end
        SETUP: begin
          acc   <= '0;
          i     <= '0;
          state <= MAC;
        end
        MAC: begin
          acc <= acc + ACCW'(prod);
          i   <= i + 1'b1;
          if (i == HW'(H - 1)) state <= WB;
        end
        WB: begin
          j <= j + 1'b1;
          if (j == HW'(H - 1)) begin
            state  <= IDLE;
            done_o <= 1'b1;
          end else begin
            state <= SETUP;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
