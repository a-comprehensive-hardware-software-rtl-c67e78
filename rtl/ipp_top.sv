// ipp_top: device side of a remotely activable IP core on an FPGA.
//
// An IP core is shipped with extra activation inputs (logic masking and logic locking
// gates) so that it only works once it is fed the right activation word (AW). The AW never
// travels in clear: the activation server encrypts it with the instance's own PUF response
// r, and the device decrypts it internally with a one-time pad. The server knows r because
// it stored a reference response r0 at enrolment and, at activation, repairs the
// measurement noise between r0 and the fresh r with the CASCADE protocol, asking the device
// only for parities of chosen subsets of r. Each instance thus needs its own encrypted AW,
// which lets the core's designer count (meter) and license every activation.
//
// Blocks: tero_puf_model (PUF) -> response_shift_register -> ip_protection_module
// (controller, CASCADE parity engine, one-time pad, AW storage) -> the protected cores.
// The example protected core is a pair of ADDER_WIDTH-bit adders: AW[63:0] unlocks the
// masked adder and AW[127:64] the locked adder (ADDER_WIDTH = 32 uses all 128 AW bits).
//
// The communication link between server and device is outside this module: its command
// and reply fields are ports (see ipp_controller for the handshake and timing). The fuse
// that disables the enrolment readout is the `fuse_blown` input. The PUF is a behavioural
// model; on an FPGA it is replaced by the TERO-PUF macro with the same ports.
module ipp_top
  import ipp_pkg::*;
#(
  parameter int unsigned        ADDER_WIDTH     = 32,
  parameter logic [AW_BITS-1:0] ACTIVATION_WORD = DEFAULT_AW,
  parameter logic [31:0]        DEVICE_ID       = 32'h5EED_0001,
  parameter int unsigned        NOISE_THRESHOLD = 2000,
  parameter int unsigned        CYCLES_PER_BIT  = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // communication link: commands from the activation server
  input  logic                              cmd_valid,
  output logic                              cmd_ready,
  input  cmd_op_e                           cmd_op,
  input  logic [LEN_W-1:0]                  cmd_len,
  input  logic [RESP_BITS-1:0][IDX_W-1:0]   cmd_indexes,
  input  logic [AW_BITS-1:0]                cmd_data,
  // communication link: replies
  output logic                              rsp_valid,
  output rsp_kind_e                         rsp_kind,
  output logic                              rsp_parity,
  output logic [RESP_BITS-1:0]              rsp_data,
  output logic                              resp_loaded,  // PUF response register is valid
  // one-time-programmable fuse, blown after enrolment
  input  logic                              fuse_blown,
  // protected core: masked adder
  input  logic [ADDER_WIDTH-1:0]            m_a,
  input  logic [ADDER_WIDTH-1:0]            m_b,
  output logic [ADDER_WIDTH-1:0]            m_sum,
  output logic                              m_cout,
  // protected core: locked adder
  input  logic [ADDER_WIDTH-1:0]            l_a,
  input  logic [ADDER_WIDTH-1:0]            l_b,
  output logic [ADDER_WIDTH-1:0]            l_sum,
  output logic                              l_cout
);

  localparam int unsigned KEY_BITS = 2 * ADDER_WIDTH;

  logic                 puf_start, puf_bit_valid, puf_bit, puf_done;
  logic [RESP_BITS-1:0] response;
  logic [AW_BITS-1:0]   aw;

  tero_puf_model #(
    .RESP_BITS(RESP_BITS), .DEVICE_ID(DEVICE_ID),
    .NOISE_THRESHOLD(NOISE_THRESHOLD), .CYCLES_PER_BIT(CYCLES_PER_BIT)
  ) u_puf (
    .clk, .rst_n, .start(puf_start), .busy(),
    .bit_valid(puf_bit_valid), .bit_out(puf_bit), .done(puf_done)
  );

  response_shift_register #(.RESP_BITS(RESP_BITS)) u_resp_sr (
    .clk, .rst_n, .shift(puf_bit_valid), .bit_in(puf_bit), .response
  );

  ip_protection_module #(.RESP_BITS(RESP_BITS), .N_IDX(RESP_BITS)) u_ipp (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_len, .cmd_indexes, .cmd_data, .fuse_blown,
    .rsp_valid, .rsp_kind, .rsp_parity, .rsp_data,
    .puf_start, .puf_done, .response,
    .aw, .resp_loaded
  );

  masked_adder #(.WIDTH(ADDER_WIDTH), .AW_REF(ACTIVATION_WORD[KEY_BITS-1:0])) u_masked (
    .a(m_a), .b(m_b), .key(aw[KEY_BITS-1:0]), .sum(m_sum), .cout(m_cout)
  );

  locked_adder #(.WIDTH(ADDER_WIDTH), .AW_REF(ACTIVATION_WORD[2*KEY_BITS-1:KEY_BITS])) u_locked (
    .a(l_a), .b(l_b), .key(aw[2*KEY_BITS-1:KEY_BITS]), .sum(l_sum), .cout(l_cout)
  );

  // The two example cores together take at most the whole activation word.
  initial assert (2 * KEY_BITS <= AW_BITS) else $error("ADDER_WIDTH too large for the AW");

endmodule
