// cascade_parity: one-flip-flop parity accumulator of the CASCADE key reconciliation engine.
//
// CASCADE corrects PUF response errors by comparing block parities between the server's
// reference response and the device's fresh response; the device's only job is to return
// the parity of the bits the server names. `clear` zeroes the parity, and each cycle with
// `en` high XORs `bit_in` into it. `clear` wins over `en`. The result is valid the cycle
// after the last enabled bit. Synchronous clear and active-low asynchronous reset are this
// design's choices.
module cascade_parity (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,   // start a new block
  input  logic en,      // fold bit_in into the parity
  input  logic bit_in,  // selected response bit
  output logic parity   // XOR of all bits folded in since the last clear
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     parity <= 1'b0;
    else if (clear) parity <= 1'b0;
    else if (en)    parity <= parity ^ bit_in;
  end

endmodule
