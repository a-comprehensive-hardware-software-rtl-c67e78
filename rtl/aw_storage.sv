// aw_storage: register that holds the decrypted activation word (AW) and drives the
// activation inputs of the protected IP core.
//
// `load` captures `aw_in` on the clock edge; the word then stays until the next load or a
// reset. Reset clears it to all zeros, which is not the correct AW of the example cores, so
// a freshly powered device is locked until it is activated. The reset value is this
// design's choice.
module aw_storage #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,   // capture aw_in
  input  logic [WIDTH-1:0] aw_in,  // decrypted AW
  output logic [WIDTH-1:0] aw      // stored AW
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    aw <= '0;
    else if (load) aw <= aw_in;
  end

endmodule
