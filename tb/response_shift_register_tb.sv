// response_shift_register_tb: shifts in random 128-bit responses with gaps between bits and
// checks that the first bit measured ends in bit 0, and that the register holds afterwards.
module response_shift_register_tb;
  localparam int unsigned N = 128;
  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0, bit_in = 1'b0;
  logic [N-1:0] response, sent;
  int checks = 0, failures = 0;

  response_shift_register #(.RESP_BITS(N)) dut (.clk, .rst_n, .shift, .bit_in, .response);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (response !== '0) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      for (int w = 0; w < N / 32; w++) sent[w*32 +: 32] = $urandom;
      for (int i = 0; i < N;) begin
        // a new bit on about two cycles out of three, the wrong bit on the others
        @(negedge clk);
        shift  = ($urandom_range(2) != 0);
        bit_in = shift ? sent[i] : ~sent[i];
        if (shift) i++;
      end
      @(negedge clk);
      shift = 1'b0;
      repeat (3) @(negedge clk);
      checks++;
      if (response !== sent) begin
        failures++;
        $display("got %h expected %h", response, sent);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
