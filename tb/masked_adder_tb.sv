// masked_adder_tb: with the correct activation word the masked adder must add; with a word
// that has wrong bits it must give wrong results. The sum is computed in the testbench.
module masked_adder_tb;
  localparam int unsigned W = 32;
  localparam logic [2*W-1:0] REF = 64'h0123_4567_89AB_CDEF;
  logic [W-1:0]   a, b, sum;
  logic [2*W-1:0] key;
  logic           cout;
  logic [W:0]     expected;
  int checks = 0, failures = 0, wrong;

  masked_adder #(.WIDTH(W), .AW_REF(REF)) dut (.a, .b, .key, .sum, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = REF;
    for (int t = 0; t < 500; t++) begin
      a = $urandom; b = $urandom;
      if (t == 0) begin a = '1; b = 1; end   // full carry chain
      expected = {1'b0, a} + {1'b0, b};
      #1;
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        $display("correct key: %h + %h gave %h", a, b, {cout, sum});
      end
    end
    // every single wrong key bit must be visible on some input
    for (int k = 0; k < 2*W; k++) begin
      key = REF;
      key[k] = ~key[k];
      wrong = 0;
      for (int t = 0; t < 64; t++) begin
        a = $urandom; b = $urandom;
        if (t == 0) begin a = '1; b = 1; end
        if (t == 1) begin a = 0; b = 0; end
        expected = {1'b0, a} + {1'b0, b};
        #1;
        if ({cout, sum} !== expected) wrong++;
      end
      checks++;
      if (wrong == 0) begin
        failures++;
        $display("wrong key bit %0d went unnoticed", k);
      end
    end
    // an all-zero word (the reset value of the AW register) must corrupt most results
    key = '0;
    wrong = 0;
    for (int t = 0; t < 100; t++) begin
      a = $urandom; b = $urandom;
      expected = {1'b0, a} + {1'b0, b};
      #1;
      if ({cout, sum} !== expected) wrong++;
    end
    checks++;
    if (wrong < 90) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
