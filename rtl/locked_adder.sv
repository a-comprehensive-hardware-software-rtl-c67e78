// locked_adder: example IP core protected by combinational logic locking.
//
// Logic locking inserts AND/OR gates whose extra input is an activation-word (AW) bit.
// With the correct bit the gate passes its net; with the wrong bit it forces the net to a
// fixed value (0 for an AND, 1 for an OR), and the forced value propagates to the outputs.
// The published scheme shows the technique on an unspecified core; the core here is a WIDTH-bit
// ripple-carry adder chosen for illustration, with one locking gate on every sum bit (key
// bits [WIDTH-1:0]) and one on every carry out of a bit position (key bits
// [2*WIDTH-1:WIDTH]). Where AW_REF holds 1 the gate is an AND (correct key 1), where it
// holds 0 an OR (correct key 0), so AW_REF is the correct activation word. The choice of
// nets is this design's own (the published flow finds them on the netlist graph).
// Purely combinational: sum = a + b when key == AW_REF.
module locked_adder #(
  parameter int unsigned        WIDTH  = 32,
  parameter logic [2*WIDTH-1:0] AW_REF = 64'h9D3B_51E7_20C4_AF86
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic [2*WIDTH-1:0] key,   // activation inputs
  output logic [WIDTH-1:0]   sum,
  output logic               cout
);

  logic [WIDTH:0] carry;  // carry[i] enters bit i, after its locking gate

  function automatic logic lock_gate(input logic net, input logic k, input logic is_and);
    return is_and ? (net & k) : (net | k);
  endfunction

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign sum[i]     = lock_gate(a[i] ^ b[i] ^ carry[i], key[i], AW_REF[i]);
    assign carry[i+1] = lock_gate((a[i] & b[i]) | (carry[i] & (a[i] ^ b[i])), key[WIDTH+i], AW_REF[WIDTH+i]);
  end

  assign cout = carry[WIDTH];

endmodule
