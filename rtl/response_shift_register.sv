// response_shift_register: collects the serial PUF response into a 128-bit register.
//
// The PUF delivers one bit per `shift` pulse. Bits enter at the top and move down, so after
// RESP_BITS shifts the first bit measured sits in response[0] and the last in
// response[RESP_BITS-1]. The register keeps its value between measurements. The bit order
// and the reset to zero are this design's choices.
module response_shift_register #(
  parameter int unsigned RESP_BITS = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift,    // a new bit is present on bit_in
  input  logic                 bit_in,   // PUF response bit
  output logic [RESP_BITS-1:0] response  // collected response
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     response <= '0;
    else if (shift) response <= {bit_in, response[RESP_BITS-1:1]};
  end

endmodule
