// response_mux_tb: checks that every index of random 128-bit responses selects the right bit.
module response_mux_tb;
  localparam int unsigned N = 128;
  logic [N-1:0]         response;
  logic [$clog2(N)-1:0] index;
  logic                 bit_out;
  int checks = 0, failures = 0;

  response_mux #(.RESP_BITS(N)) dut (.response, .index, .bit_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int w = 0; w < N / 32; w++) response[w*32 +: 32] = $urandom;
      for (int i = 0; i < N; i++) begin
        index = i[$clog2(N)-1:0];
        #1;
        checks++;
        if (bit_out !== ((response >> i) & 1'b1)) begin
          failures++;
          $display("mismatch at index %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
