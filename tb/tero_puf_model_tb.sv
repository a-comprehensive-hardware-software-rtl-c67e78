// tero_puf_model_tb: checks the PUF model's bit timing, that a noiseless measurement equals
// the device's reference response (recomputed here), that noisy measurements stay close to
// it but differ from each other, and that two devices give unrelated responses.
module tero_puf_model_tb;
  localparam int unsigned N = 128, CPB = 4;
  localparam logic [31:0] ID_A = 32'h0BAD_CAFE, ID_B = 32'h1234_5678;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0] busy, bit_valid, bit_out, done;
  logic [N-1:0] meas [3];
  int           nbits [3];
  int checks = 0, failures = 0;

  // device A noiseless, device A noisy, device B noiseless
  tero_puf_model #(.RESP_BITS(N), .DEVICE_ID(ID_A), .NOISE_THRESHOLD(0), .CYCLES_PER_BIT(CPB)) d0 (
    .clk, .rst_n, .start, .busy(busy[0]), .bit_valid(bit_valid[0]), .bit_out(bit_out[0]), .done(done[0]));
  tero_puf_model #(.RESP_BITS(N), .DEVICE_ID(ID_A), .NOISE_THRESHOLD(4000), .CYCLES_PER_BIT(CPB)) d1 (
    .clk, .rst_n, .start, .busy(busy[1]), .bit_valid(bit_valid[1]), .bit_out(bit_out[1]), .done(done[1]));
  tero_puf_model #(.RESP_BITS(N), .DEVICE_ID(ID_B), .NOISE_THRESHOLD(0), .CYCLES_PER_BIT(CPB)) d2 (
    .clk, .rst_n, .start, .busy(busy[2]), .bit_valid(bit_valid[2]), .bit_out(bit_out[2]), .done(done[2]));

  always #5 clk = ~clk;

  // Reference bit: top bit of a multiply-xorshift hash of id ^ (i * golden ratio).
  function automatic bit ref_bit(int unsigned id, int unsigned i);
    int unsigned h;
    h = id ^ (i * 32'h9E37_79B9);
    h ^= h >> 16; h *= 32'h7FEB_352D;
    h ^= h >> 15; h *= 32'h846C_A68B;
    h ^= h >> 16;
    return h[31];
  endfunction

  always @(posedge clk) for (int d = 0; d < 3; d++) if (bit_valid[d]) begin
    meas[d][nbits[d]] <= bit_out[d];
    nbits[d]          <= nbits[d] + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(output int cycles);
    for (int d = 0; d < 3; d++) nbits[d] = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start  = 1'b0;
    cycles = 0;  // start was sampled on the edge just before this negedge
    while (!done[0]) begin @(negedge clk); cycles++; end
    @(negedge clk);
  endtask

  logic [N-1:0] ref_a, ref_b, first_noisy;
  int cycles, hd;

  initial begin
    for (int i = 0; i < N; i++) begin
      ref_a[i] = ref_bit(ID_A, i);
      ref_b[i] = ref_bit(ID_B, i);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int m = 0; m < 4; m++) begin
      measure(cycles);
      checks++;
      if (cycles != N * CPB) begin failures++; $display("took %0d cycles", cycles); end
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (nbits[d] != N) failures++;
      end
      checks++;
      if (meas[0] !== ref_a) failures++;
      checks++;
      if (meas[2] !== ref_b) failures++;
      hd = $countones(meas[1] ^ ref_a);
      checks++;
      if (hd == 0 || hd > 24) begin failures++; $display("noisy distance %0d", hd); end
      if (m == 0) first_noisy = meas[1];
      else begin
        checks++;
        if (meas[1] === first_noisy) failures++;
      end
      repeat ($urandom_range(50)) @(posedge clk);
    end
    hd = $countones(ref_a ^ ref_b);
    checks++;
    if (hd < 40 || hd > 88) begin failures++; $display("inter-device distance %0d", hd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
