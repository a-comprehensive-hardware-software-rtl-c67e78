// ip_protection_module: device-side IP protection module (error correction, decryption of
// the activation word, AW storage and their controller).
//
// The fresh PUF response r sits in an external shift register. The module serves three
// requests of the activation server. For enrolment it returns r itself, until a fuse is
// blown. For error correction with the CASCADE protocol it returns the parity of the
// response bits whose indexes the server lists in a frame of up to N_IDX 7-bit indexes:
// index_mux picks the index at position `sel`, response_mux picks the addressed bit and
// cascade_parity XORs it in, one index per clock. The server compares these parities with
// its stored reference r0 and repairs its copy until it equals r; the device never changes
// its response. Finally the server sends [AW]_r = AW ^ r, which otp_decrypt turns back into
// the AW and aw_storage keeps; the stored AW drives the activation inputs of the protected
// core.
//
// Timing: see ipp_controller. A PARITY frame of length L is answered L+1 clocks after it is
// accepted. cmd_indexes must stay stable while the frame is processed. The structure
// follows the published scheme's resource breakdown of the module; the interfaces are this design's.
module ip_protection_module #(
  parameter int unsigned RESP_BITS = 128,  // response = key = AW width
  parameter int unsigned N_IDX     = 128   // indexes per parity frame
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  // command from the communication link
  input  logic                                          cmd_valid,
  output logic                                          cmd_ready,
  input  ipp_pkg::cmd_op_e                                       cmd_op,
  input  logic [$clog2(N_IDX+1)-1:0]                    cmd_len,
  input  logic [N_IDX-1:0][$clog2(RESP_BITS)-1:0]       cmd_indexes,
  input  logic [RESP_BITS-1:0]                          cmd_data,     // [AW]_r for LOAD_AW
  input  logic                                          fuse_blown,
  // reply to the communication link
  output logic                                          rsp_valid,
  output ipp_pkg::rsp_kind_e                                     rsp_kind,
  output logic                                          rsp_parity,
  output logic [RESP_BITS-1:0]                          rsp_data,     // r for RESPONSE, else 0
  // PUF and response register
  output logic                                          puf_start,
  input  logic                                          puf_done,
  input  logic [RESP_BITS-1:0]                          response,
  // activation word to the protected core, status
  output logic [RESP_BITS-1:0]                          aw,
  output logic                                          resp_loaded   // a full measurement is held
);

  localparam int unsigned IW = $clog2(RESP_BITS);

  logic [$clog2(N_IDX)-1:0] sel;
  logic [IW-1:0]            index;
  logic                     resp_bit;
  logic                     par_clear, par_en, aw_load;
  logic [RESP_BITS-1:0]     aw_plain;

  ipp_controller #(.N_IDX(N_IDX)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_len, .fuse_blown,
    .puf_start, .puf_done,
    .sel, .par_clear, .par_en,
    .aw_load, .resp_loaded,
    .rsp_valid, .rsp_kind
  );

  index_mux #(.N_IDX(N_IDX), .IDX_W(IW)) u_index_mux (
    .indexes(cmd_indexes), .sel, .index
  );

  response_mux #(.RESP_BITS(RESP_BITS)) u_response_mux (
    .response, .index, .bit_out(resp_bit)
  );

  cascade_parity u_parity (
    .clk, .rst_n, .clear(par_clear), .en(par_en), .bit_in(resp_bit), .parity(rsp_parity)
  );

  otp_decrypt #(.WIDTH(RESP_BITS)) u_otp (
    .ciphertext(cmd_data), .key(response), .plaintext(aw_plain)
  );

  aw_storage #(.WIDTH(RESP_BITS)) u_aw (
    .clk, .rst_n, .load(aw_load), .aw_in(aw_plain), .aw
  );

  // The raw response leaves the module only in an enrolment reply.
  always_comb rsp_data = (rsp_valid && rsp_kind == ipp_pkg::RSP_RESPONSE) ? response : '0;

  // The link must hold the index frame while the parity is being computed.
  a_frame_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                   (par_en && $past(par_en)) |-> $stable(cmd_indexes));

endmodule
