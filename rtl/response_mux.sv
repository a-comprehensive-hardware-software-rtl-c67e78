// response_mux: 128:1 multiplexer that picks the PUF response bit addressed by a 7-bit index.
//
// It is the "MUX response bits" stage of the CASCADE parity engine: the index chosen by
// index_mux selects one bit of the stored response, and that bit is folded into the running
// parity. Purely combinational. The published implementation uses a large multiplexer here (rather than a
// RAM) to stay portable across FPGA families; the implementation as an indexed part-select
// is this design's choice.
module response_mux #(
  parameter int unsigned RESP_BITS = 128
) (
  input  logic [RESP_BITS-1:0]         response,  // stored PUF response
  input  logic [$clog2(RESP_BITS)-1:0] index,     // bit to select
  output logic                         bit_out    // response[index]
);

  always_comb bit_out = response[index];

endmodule
