// masked_adder: example IP core protected by logic masking.
//
// Logic masking inserts XOR/XNOR gates on internal nets; each gate has one extra input
// driven by an activation-word (AW) bit. With the correct bit the gate passes its net
// unchanged, with the wrong bit it inverts it, so the core computes garbage until it is
// activated. The published scheme shows the technique on an unspecified core; the core here is a
// WIDTH-bit ripple-carry adder chosen for illustration, with one masking gate on every sum
// bit (key bits [WIDTH-1:0]) and one on every carry out of a bit position (key bits
// [2*WIDTH-1:WIDTH]). Where AW_REF holds 0 the gate is an XOR, where it holds 1 an XNOR, so
// AW_REF is the correct activation word. Which nets get gates is this design's choice
// (the published flow selects them by fault analysis, centrality or at random).
// Purely combinational: sum = a + b when key == AW_REF.
module masked_adder #(
  parameter int unsigned             WIDTH  = 32,
  parameter logic [2*WIDTH-1:0]      AW_REF = 64'h7E15_C2A9_36D0_4B8F
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic [2*WIDTH-1:0] key,   // activation inputs
  output logic [WIDTH-1:0]   sum,
  output logic               cout
);

  logic [WIDTH:0] carry;  // carry[i] enters bit i, after its masking gate

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    // XOR gate where AW_REF is 0, XNOR gate where it is 1
    assign sum[i]     = (a[i] ^ b[i] ^ carry[i]) ^ key[i] ^ AW_REF[i];
    assign carry[i+1] = ((a[i] & b[i]) | (carry[i] & (a[i] ^ b[i]))) ^ key[WIDTH+i] ^ AW_REF[WIDTH+i];
  end

  assign cout = carry[WIDTH];

endmodule
