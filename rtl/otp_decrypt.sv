// otp_decrypt: one-time-pad decryption of the activation word.
//
// The server encrypts the activation word (AW) with the device's error-corrected PUF
// response as key; the device recovers it by XORing the ciphertext with its own response:
// AW = [AW]_r ^ r. This is the lightweight cipher chosen in the published implementation (one
// LUT per bit). Purely combinational.
module otp_decrypt #(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] ciphertext,  // [AW]_r from the server
  input  logic [WIDTH-1:0] key,         // PUF response r
  output logic [WIDTH-1:0] plaintext    // AW
);

  always_comb plaintext = ciphertext ^ key;

endmodule
