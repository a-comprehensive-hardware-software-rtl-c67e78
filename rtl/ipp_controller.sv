// ipp_controller: finite-state machine of the device-side IP protection module.
//
// It executes the four commands of the activation server one at a time:
//   CMD_GENERATE      starts a PUF measurement and waits for its last bit;
//   CMD_READ_RESPONSE answers RESPONSE (enrolment), or DENIED once the fuse is blown;
//   CMD_PARITY        steps `sel` over positions 0..len-1 of the index frame, one per
//                     clock, while the parity accumulator folds in the addressed bits;
//   CMD_LOAD_AW       pulses `aw_load` so the one-time-pad output is stored as the AW.
// READ_RESPONSE, PARITY and LOAD_AW are answered DENIED until a complete measurement is in
// the response register.
//
// Handshake: a command is taken in a cycle with cmd_valid and cmd_ready; cmd_ready is high
// only in IDLE. Exactly one reply follows as a one-cycle rsp_valid pulse with rsp_kind:
// one cycle after acceptance for READ_RESPONSE and LOAD_AW, len+1 cycles after it for
// PARITY, and one cycle after the PUF's `done` for GENERATE. The command fields must stay
// unchanged until the reply (the link keeps the frame in its registers). The published scheme
// names the controller and lists the operations; the command set, state encoding and timing
// are this design's choices.
module ipp_controller
  import ipp_pkg::*;
#(
  parameter int unsigned N_IDX = 128  // indexes per parity frame
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // command from the communication link
  input  logic                         cmd_valid,
  output logic                         cmd_ready,
  input  cmd_op_e                      cmd_op,
  input  logic [$clog2(N_IDX+1)-1:0]   cmd_len,     // PARITY: number of indexes (0..N_IDX)
  input  logic                         fuse_blown,  // raw response readout disabled
  // PUF
  output logic                         puf_start,
  input  logic                         puf_done,
  // CASCADE parity engine
  output logic [$clog2(N_IDX)-1:0]     sel,         // current frame position
  output logic                         par_clear,
  output logic                         par_en,
  // activation word
  output logic                         aw_load,
  // status and reply
  output logic                         resp_loaded, // response register holds a full measurement
  output logic                         rsp_valid,
  output rsp_kind_e                    rsp_kind
);

  localparam int unsigned CLEN_W = $clog2(N_IDX + 1);
  localparam int unsigned SEL_W = $clog2(N_IDX);

  typedef enum logic [1:0] {S_IDLE, S_GEN, S_PAR, S_RESP} state_e;

  state_e           state;
  logic [CLEN_W-1:0] len_q;
  logic [SEL_W-1:0] cnt;
  logic             accept;

  always_comb begin
    accept    = cmd_valid && (state == S_IDLE);
    cmd_ready = (state == S_IDLE);
    rsp_valid = (state == S_RESP);
    puf_start = accept && (cmd_op == CMD_GENERATE);
    par_clear = accept && (cmd_op == CMD_PARITY);
    aw_load   = accept && (cmd_op == CMD_LOAD_AW) && resp_loaded;
    par_en    = (state == S_PAR);
    sel       = cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      len_q       <= '0;
      cnt         <= '0;
      resp_loaded <= 1'b0;
      rsp_kind    <= RSP_ACK;
    end else begin
      unique case (state)
        S_IDLE: if (accept) begin
          unique case (cmd_op)
            CMD_GENERATE: begin
              resp_loaded <= 1'b0;
              state       <= S_GEN;
            end
            CMD_READ_RESPONSE: begin
              rsp_kind <= (fuse_blown || !resp_loaded) ? RSP_DENIED : RSP_RESPONSE;
              state    <= S_RESP;
            end
            CMD_PARITY: begin
              len_q <= cmd_len;
              cnt   <= '0;
              if (!resp_loaded) begin
                rsp_kind <= RSP_DENIED;
                state    <= S_RESP;
              end else if (cmd_len == '0) begin
                rsp_kind <= RSP_PARITY;
                state    <= S_RESP;
              end else begin
                state <= S_PAR;
              end
            end
            CMD_LOAD_AW: begin
              rsp_kind <= resp_loaded ? RSP_ACK : RSP_DENIED;
              state    <= S_RESP;
            end
            default: state <= S_IDLE;
          endcase
        end
        S_GEN: if (puf_done) begin
          resp_loaded <= 1'b1;
          rsp_kind    <= RSP_ACK;
          state       <= S_RESP;
        end
        S_PAR: begin
          cnt <= cnt + 1'b1;
          if (CLEN_W'(cnt) == len_q - 1'b1) begin
            rsp_kind <= RSP_PARITY;
            state    <= S_RESP;
          end
        end
        S_RESP: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The reply never overlaps an accepted command.
  a_one_at_a_time: assert property (@(posedge clk) disable iff (!rst_n) !(rsp_valid && cmd_ready));

endmodule
