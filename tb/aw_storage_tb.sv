// aw_storage_tb: checks reset to zero, capture on load and hold without load.
module aw_storage_tb;
  localparam int unsigned W = 128;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [W-1:0] aw_in, aw, expected;
  int checks = 0, failures = 0;

  aw_storage #(.WIDTH(W)) dut (.clk, .rst_n, .load, .aw_in, .aw);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aw_in = '1;
    repeat (2) @(posedge clk);
    checks++;
    if (aw !== '0) failures++;
    rst_n <= 1'b1;
    expected = '0;
    for (int t = 0; t < 200; t++) begin
      for (int w = 0; w < W / 32; w++) aw_in[w*32 +: 32] <= $urandom;
      load <= ($urandom_range(1) == 1);
      @(posedge clk);
      if (load) expected = aw_in;
      #1;
      checks++;
      if (aw !== expected) failures++;
    end
    rst_n <= 1'b0;
    #1;
    checks++;
    if (aw !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
