// otp_decrypt_tb: encrypts random words with random keys in the testbench and checks that
// the one-time pad recovers them, and that a key with one wrong bit corrupts exactly one bit.
module otp_decrypt_tb;
  localparam int unsigned W = 128;
  logic [W-1:0] ciphertext, key, plaintext, word;
  int checks = 0, failures = 0;

  otp_decrypt #(.WIDTH(W)) dut (.ciphertext, .key, .plaintext);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int w = 0; w < W / 32; w++) begin
        word[w*32 +: 32] = $urandom;
        key[w*32 +: 32]  = $urandom;
      end
      for (int i = 0; i < W; i++) ciphertext[i] = word[i] == key[i] ? 1'b0 : 1'b1;
      #1;
      checks++;
      if (plaintext !== word) failures++;
      key[t % W] = ~key[t % W];
      #1;
      checks++;
      if ($countones(plaintext ^ word) != 1 || plaintext[t % W] == word[t % W]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
