// cascade_parity_tb: feeds random bit blocks of random length into the parity accumulator
// and compares with a parity counted in the testbench; also checks clear and hold.
module cascade_parity_tb;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, bit_in = 1'b0, parity;
  int checks = 0, failures = 0;
  int ones;

  cascade_parity dut (.clk, .rst_n, .clear, .en, .bit_in, .parity);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      clear <= 1'b1;
      en    <= 1'b1;   // clear must win
      bit_in <= 1'b1;
      @(posedge clk);
      clear <= 1'b0;
      ones = 0;
      for (int k = 0, n = $urandom_range(128, 1); k < n; k++) begin
        en     <= ($urandom_range(3) != 0);
        bit_in <= $urandom_range(1);
        @(posedge clk);
        if (en && bit_in) ones++;
      end
      en <= 1'b0;
      bit_in <= 1'b1;
      @(posedge clk);
      checks++;
      if (parity !== ones[0]) failures++;
      @(posedge clk);   // holds while en is low
      checks++;
      if (parity !== ones[0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
