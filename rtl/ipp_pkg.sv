// ipp_pkg: sizes, command encodings and the reference activation word shared by the
// device side of the IP protection scheme.
//
// The device holds a 128-bit PUF response. The CASCADE error-correction engine addresses
// one response bit with a 7-bit index, and a parity request frame carries up to 128 such
// indexes at once. The activation word (AW) is 128 bits wide, like the response, so that a
// one-time pad with the response as key can decrypt it. The command and reply encodings
// are this design's own choice; the published scheme does not define the link protocol.
package ipp_pkg;

  localparam int unsigned RESP_BITS = 128;                 // PUF response / OTP key width
  localparam int unsigned IDX_W     = $clog2(RESP_BITS);   // 7-bit response index
  localparam int unsigned AW_BITS   = 128;                 // activation word width
  localparam int unsigned LEN_W     = IDX_W + 1;           // frame length 0..128

  // Commands sent by the activation server over the communication link.
  typedef enum logic [1:0] {
    CMD_GENERATE      = 2'd0,  // measure the PUF again into the response register
    CMD_READ_RESPONSE = 2'd1,  // enrolment: read the raw response (refused once the fuse is blown)
    CMD_PARITY        = 2'd2,  // CASCADE: parity of the response bits at cmd_indexes[0..len-1]
    CMD_LOAD_AW       = 2'd3   // one-time-pad decrypt cmd_data and store it as the AW
  } cmd_op_e;

  // Kind of reply returned for each command.
  typedef enum logic [1:0] {
    RSP_ACK      = 2'd0,
    RSP_RESPONSE = 2'd1,
    RSP_PARITY   = 2'd2,
    RSP_DENIED   = 2'd3
  } rsp_kind_e;

  // Activation word that unlocks the example protected cores: bits [63:0] are the keys of
  // the masked adder, bits [127:64] those of the locked adder. In a real flow it is the word
  // produced by the netlist-modification tool.
  localparam logic [AW_BITS-1:0] DEFAULT_AW = 128'h9D3B_51E7_20C4_AF86_7E15_C2A9_36D0_4B8F;

endpackage
