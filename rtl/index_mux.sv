// index_mux: selects one 7-bit response index out of the 128 carried by a CASCADE parity
// request frame (the "MUX indexes 128x7:7" of the device).
//
// The server sends a whole block of indexes in one frame; the controller steps `sel` from 0
// to len-1 and this multiplexer presents the index of the current position to response_mux.
// Purely combinational.
module index_mux #(
  parameter int unsigned N_IDX = 128,  // indexes per frame
  parameter int unsigned IDX_W = 7     // bits per index
) (
  input  logic [N_IDX-1:0][IDX_W-1:0] indexes,  // frame contents, entry 0 first
  input  logic [$clog2(N_IDX)-1:0]    sel,      // position in the frame
  output logic [IDX_W-1:0]            index     // indexes[sel]
);

  always_comb index = indexes[sel];

endmodule
