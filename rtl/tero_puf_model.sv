// tero_puf_model: behavioural model of a Transient-Effect Ring Oscillator (TERO) PUF.
//
// This is a model, not the PUF: a real TERO-PUF derives each bit from the number of
// oscillations of pairs of cross-coupled ring oscillators, which depends on manufacturing
// variation and needs hand placement on the FPGA. Here each device is a DEVICE_ID; its
// reference response bit i is one bit of a 32-bit integer hash of (DEVICE_ID, i), and every
// measurement flips a bit with probability NOISE_THRESHOLD/65536, drawn from a free-running
// xorshift generator. The generator runs on every clock, so two measurements taken at
// different times see different noise, like a real PUF.
//
// Interface: a `start` pulse begins a measurement of RESP_BITS bits. One bit comes out on
// `bit_out` with a one-cycle `bit_valid` every CYCLES_PER_BIT clocks; `done` pulses with the
// last bit. `busy` is high while a measurement runs; `start` is ignored then. The published scheme
// gives the PUF type and its low error rate; the hash, noise rate and bit timing are this
// model's own.
module tero_puf_model #(
  parameter int unsigned RESP_BITS       = 128,
  parameter logic [31:0] DEVICE_ID       = 32'h5EED_0001,
  parameter int unsigned NOISE_THRESHOLD = 2000,  // flips per 65536 bits (about 3 %)
  parameter int unsigned CYCLES_PER_BIT  = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,      // begin a measurement
  output logic busy,       // measurement running
  output logic bit_valid,  // bit_out holds a new response bit
  output logic bit_out,    // response bit
  output logic done        // last bit of the measurement
);

  localparam int unsigned BIT_CNT_W = $clog2(RESP_BITS + 1);
  localparam int unsigned CYC_CNT_W = (CYCLES_PER_BIT > 1) ? $clog2(CYCLES_PER_BIT) : 1;

  // Integer hash (multiply-xorshift finaliser) standing in for manufacturing variation.
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7FEB_352D;
    h = h ^ (h >> 15);
    h = h * 32'h846C_A68B;
    h = h ^ (h >> 16);
    return h;
  endfunction

  function automatic logic [31:0] xorshift32(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  function automatic logic [31:0] reference_bit(input logic [31:0] id, input logic [31:0] i);
    return mix32(id ^ (i * 32'h9E37_79B9)) >> 31;
  endfunction

  logic [31:0]          noise_state;
  logic [BIT_CNT_W-1:0] bit_idx;
  logic [CYC_CNT_W-1:0] cyc_cnt;
  logic                 flip;

  always_comb flip = ({16'd0, noise_state[15:0]} < NOISE_THRESHOLD);

  // Free-running xorshift32 noise source.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) noise_state <= DEVICE_ID | 32'h1;
    else        noise_state <= xorshift32(noise_state);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      bit_idx   <= '0;
      cyc_cnt   <= '0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      done      <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      done      <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          bit_idx <= '0;
          cyc_cnt <= '0;
        end
      end else if (cyc_cnt == CYC_CNT_W'(CYCLES_PER_BIT - 1)) begin
        cyc_cnt   <= '0;
        bit_valid <= 1'b1;
        bit_out   <= reference_bit(DEVICE_ID, 32'(bit_idx))[0] ^ flip;
        bit_idx   <= bit_idx + 1'b1;
        if (bit_idx == BIT_CNT_W'(RESP_BITS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else begin
        cyc_cnt <= cyc_cnt + 1'b1;
      end
    end
  end

endmodule
