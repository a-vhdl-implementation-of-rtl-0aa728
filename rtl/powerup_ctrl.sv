// powerup_ctrl: the power-up process. After reset it sweeps addr_o over all 2**AW
// locations with busy_o high (the histogramme generator writes zero to each), then
// drops busy_o and raises done_o for good. The LF module does not start its ACF work
// before done_o. Takes exactly 2**AW clocks after reset is released. Clearing the
// histogramme at power-up is this design's reading of the source's power-up flag.
module powerup_ctrl #(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          busy_o,
  output logic [AW-1:0] addr_o,
  output logic          done_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_o <= '0;
      done_o <= 1'b0;
    end else if (!done_o) begin
      addr_o <= addr_o + 1'b1;
      if (addr_o == '1) done_o <= 1'b1;
    end
  end
  assign busy_o = !done_o;
endmodule
