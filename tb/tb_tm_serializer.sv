// tb_tm_serializer: loads random words, clocks them out with irregularly spaced bit
// strobes and rebuilds each word from data_o (MSB first); also checks busy and that a
// load in mid-word restarts with the new word.
module tb_tm_serializer;
  localparam int W = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, bitc, data, busy; logic [W-1:0] word, got;
  int checks = 0, failures = 0;
  tm_serializer #(.W(W)) dut (.clk, .rst_n, .load_i(load), .word_i(word), .bit_i(bitc),
                              .data_o(data), .busy_o(busy));
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic send_word(input logic [W-1:0] w, input int nbits);
    @(negedge clk); load = 1; word = w;
    @(negedge clk); load = 0;
    got = '0;
    for (int b = 0; b < nbits; b++) begin
      got = {got[W-2:0], data};
      repeat ($urandom % 4) @(negedge clk);
      bitc = 1; @(negedge clk); bitc = 0;
    end
  endtask
  initial begin
    load = 0; bitc = 0; word = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (100) begin
      logic [W-1:0] w;
      w = W'($urandom);
      send_word(w, W);
      checks += 2;
      if (got !== w) begin failures++; $display("got %h exp %h", got, w); end
      if (busy) failures++;
    end
    // interrupted word
    send_word(W'(10'h3a5), 3);
    send_word(W'(10'h15a), W);
    checks++;
    if (got !== W'(10'h15a)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
